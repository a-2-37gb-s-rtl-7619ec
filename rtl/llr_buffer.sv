// llr_buffer: data-buffer SRAM between the channel side and the decoder.
//
// The encoder, puncturer and channel deliver IN_LANES LLR pairs per cycle
// (3 on the test chip) while the decoder takes OUT_LANES = 12 per enabled
// cycle. The buffer packs OUT_LANES/IN_LANES consecutive input words into one
// decoder word (lane order = time order) and queues it in a DEPTH-word
// two-port memory used as a circular FIFO. The decoder pops a word with rd_en
// whenever rd_valid is high. afull warns the source one word before the
// memory is full so that nothing is lost.
// The document only says that an SRAM buffers data; the packing, depth and
// flags are this design's choices.
module llr_buffer
  import ldpccc_pkg::*;
#(
  parameter int IN_LANES  = ENC_RHO,
  parameter int OUT_LANES = DEC_RHO,
  parameter int DEPTH     = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic wr_valid,
  input  llr_t wr_llr_u [IN_LANES],
  input  llr_t wr_llr_v [IN_LANES],
  input  logic rd_en,
  output logic rd_valid,
  output llr_t rd_llr_u [OUT_LANES],
  output llr_t rd_llr_v [OUT_LANES],
  output logic afull
);

  localparam int NW = OUT_LANES / IN_LANES;   // input words per decoder word
  localparam int AW = $clog2(DEPTH);
  localparam int WW = 2 * W * OUT_LANES;

  logic [WW-1:0]         mem [DEPTH];
  logic [WW-1:0]         asm_q;               // word being assembled
  logic [$clog2(NW+1)-1:0] fill;
  logic [AW-1:0]         wptr, rptr;
  logic [AW:0]           count;

  logic [WW-1:0] asm_d;
  logic          push, pop;

  always_comb begin
    asm_d = asm_q;
    for (int i = 0; i < IN_LANES; i++) begin
      asm_d[(int'(fill)*IN_LANES + i)*2*W +: 2*W] = {wr_llr_v[i], wr_llr_u[i]};
    end
  end

  assign push = wr_valid && (int'(fill) == NW - 1);
  assign pop  = rd_en && rd_valid;

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= asm_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_q <= '0;
      fill  <= '0;
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (clear) begin
      fill  <= '0;
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (wr_valid) begin
        asm_q <= asm_d;
        fill  <= push ? '0 : fill + 1'b1;
      end
      if (push) wptr <= (int'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
      if (pop)  rptr <= (int'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assign rd_valid = count != '0;
  assign afull    = int'(count) >= DEPTH - 1;

  always_comb begin
    for (int i = 0; i < OUT_LANES; i++)
      {rd_llr_v[i], rd_llr_u[i]} = mem[rptr][i*2*W +: 2*W];
  end

  initial assert (OUT_LANES % IN_LANES == 0 && DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("llr_buffer: OUT_LANES must be a multiple of IN_LANES, DEPTH a power of two");

  // a word is never pushed into a full memory
  assert property (@(posedge clk) rst_n && push |-> int'(count) < DEPTH || pop);

endmodule
