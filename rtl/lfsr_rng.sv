// lfsr_rng: random bit generator for the on-chip test patterns.
//
// A 31-bit Fibonacci LFSR with polynomial x^31 + x^28 + 1 (PRBS31) produces
// STEP new bits per enabled cycle, the oldest in bit 0, so a STEP=3 and a
// STEP=12 instance with the same seed produce the same bit sequence. The test
// chip uses one copy to feed the encoder and an identical copy to regenerate
// the reference data at the decoder output, so no large FIFO is needed. The
// document names the generators only; the LFSR and its polynomial are this
// design's choice.
//
// Interface: load (priority) sets the state to seed; en advances by STEP bits;
// bits shows the STEP bits of the current step (combinational from the state).
module lfsr_rng #(
  parameter int          STEP = 3,
  parameter logic [30:0] SEED = 31'h2A5F_1C37
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [30:0]     seed,
  input  logic            en,
  output logic [STEP-1:0] bits
);

  logic [30:0] state, nstate;

  always_comb begin
    logic [30:0] s;
    s = state;
    for (int i = 0; i < STEP; i++) begin
      logic fb;
      fb      = s[30] ^ s[27];
      bits[i] = fb;
      s       = {s[29:0], fb};
    end
    nstate = s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= (seed == '0) ? SEED : seed;
    else if (en)   state <= nstate;
  end

endmodule
