// ldpccc_decoder: pipelined LDPC-CC decoder of NPROC identical processors.
//
// Each processor performs one decoding iteration on a sliding window; the
// processors are chained, so a block of RHO information and RHO parity LLRs
// entering the first one leaves the last one NPROC*NP enabled cycles later
// (5 x 43 = 215 with the defaults), and one block of RHO decoded information
// bits comes out per enabled cycle after that: RHO bits per clock.
//
// Test circuits: bypass[i] routes the input of processor i straight to its
// output so that a faulty processor can be skipped, and final_sel names the
// processor whose hard decisions form the decoder output. Both follow the
// document's BYPASS/FINAL description; their encoding (a bit mask and a
// processor index) is this design's choice.
//
// Interface: en advances the whole pipeline by one block and takes in_llr_*
// (valid with in_valid); flush shifts known-zero slots into every processor
// (hold it NP cycles after reset). out_valid/out_bits give the decoded
// information bits, lane i = time RHO*X + i. Channel LLRs are 6-bit (6,2).
module ldpccc_decoder
  import ldpccc_pkg::*;
#(
  parameter int           RHO   = DEC_RHO,
  parameter int           NP_N  = NPROC,
  parameter int           ALPHA = 7,
  parameter bank_depths_t DEPTH = BANK_DEPTH
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    flush,
  input  logic                    in_valid,
  input  llr_t                    in_llr_u [RHO],
  input  llr_t                    in_llr_v [RHO],
  input  logic [NP_N-1:0]         bypass,
  input  logic [$clog2(NP_N+1)-1:0] final_sel,
  output logic                    out_valid,
  output logic [RHO-1:0]          out_bits
);

  // hard decisions and valid at every stage: 0 = channel, i+1 = after processor i
  logic [NP_N:0][RHO-1:0] stg_hd;
  logic [NP_N:0]          stg_vld;

  slot_t ch_slot [2][RHO];
  always_comb begin
    for (int q = 0; q < RHO; q++) begin
      // channel values enter with no check messages yet: s = L, a = b = 0
      ch_slot[0][q] = '{s: sum_t'(in_llr_u[q]), a: '0, b: '0, hd: in_llr_u[q] < 0};
      ch_slot[1][q] = '{s: sum_t'(in_llr_v[q]), a: '0, b: '0, hd: in_llr_v[q] < 0};
      stg_hd[0][q]  = in_llr_u[q] < 0;
    end
  end
  assign stg_vld[0] = in_valid;

  for (genvar i = 0; i < NP_N; i++) begin : g_proc
    slot_t s_in  [2][RHO];
    slot_t s_prc [2][RHO];
    slot_t s_out [2][RHO];
    logic  v_in, v_prc, v_out;

    if (i == 0) begin : g_first
      assign s_in = ch_slot;
      assign v_in = in_valid;
    end else begin : g_next
      assign s_in = g_proc[i-1].s_out;
      assign v_in = g_proc[i-1].v_out;
    end

    ldpccc_processor #(.RHO(RHO), .ALPHA(ALPHA), .DEPTH(DEPTH)) u_proc (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (en),
      .flush    (flush),
      .in_valid (v_in),
      .in_slot  (s_in),
      .out_valid(v_prc),
      .out_slot (s_prc)
    );

    // BYPASS: skip this processor
    assign s_out = bypass[i] ? s_in : s_prc;
    assign v_out = bypass[i] ? v_in : v_prc;

    for (genvar q = 0; q < RHO; q++) begin : g_hd
      assign stg_hd[i+1][q] = s_out[0][q].hd;
    end
    assign stg_vld[i+1] = v_out;
  end

  // FINAL: hard decisions of the information bits at the chosen processor
  always_comb begin
    int sel;
    sel = (int'(final_sel) < NP_N) ? int'(final_sel) + 1 : NP_N;
    out_valid = stg_vld[sel];
    out_bits  = stg_hd[sel];
  end

endmodule
