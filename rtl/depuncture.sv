// depuncture: puts zero LLRs where the transmitter punctured bits.
//
// The receiver knows the rate and regenerates the puncturing pattern with its
// own position counter modulo L_punc; every information or parity LLR whose
// pattern bit is 0 is replaced by 0 (no knowledge), as the document specifies,
// and the decoder then runs unchanged for all five rates. RHO LLR pairs per
// enabled cycle; the output is registered (one cycle latency).
//
// Interface: in_valid/in_llr_* in; out_valid/out_llr_* one cycle later;
// clear restarts the pattern.
module depuncture
  import ldpccc_pkg::*;
#(
  parameter int RHO = ENC_RHO
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  rate_e rate,
  input  logic  in_valid,
  input  llr_t  in_llr_u  [RHO],
  input  llr_t  in_llr_v  [RHO],
  output logic  out_valid,
  output llr_t  out_llr_u [RHO],
  output llr_t  out_llr_v [RHO]
);

  logic [3:0] pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < RHO; i++) begin
        out_llr_u[i] <= '0;
        out_llr_v[i] <= '0;
      end
    end else if (clear) begin
      pos       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < RHO; i++) begin
          int idx;
          idx = (int'(pos) + i) % punc_len(rate);
          out_llr_u[i] <= punc_keep(rate, 0, idx) ? in_llr_u[i] : '0;
          out_llr_v[i] <= punc_keep(rate, 1, idx) ? in_llr_v[i] : '0;
        end
        pos <= 4'((int'(pos) + RHO) % punc_len(rate));
      end
    end
  end

endmodule
