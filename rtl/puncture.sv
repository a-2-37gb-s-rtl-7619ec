// puncture: rate-compatible puncturing of the rate-1/2 code stream.
//
// For the selected rate the transmitter sends, within each pattern of L_punc
// time instants, only the information and parity bits whose pattern bit is 1
// (rates 1/2, 2/3, 3/4, 4/5, 5/6 with L_punc = 1, 6, 6, 4, 10; the patterns are
// the document's). Each enabled cycle takes RHO code-bit pairs and marks, per
// bit, whether it is transmitted; a position counter modulo L_punc keeps the
// pattern aligned with time. Marking instead of packing the survivors into a
// narrower stream is this design's choice: on the test chip the channel is
// on-chip, and the de-puncturer replaces every unsent bit by a zero LLR.
//
// Interface: in_valid/in_u/in_v in; out_* registered one cycle later with
// keep_u/keep_v (1 = transmitted). clear restarts the pattern.
module puncture
  import ldpccc_pkg::*;
#(
  parameter int RHO = ENC_RHO
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  rate_e          rate,
  input  logic           in_valid,
  input  logic [RHO-1:0] in_u,
  input  logic [RHO-1:0] in_v,
  output logic           out_valid,
  output logic [RHO-1:0] out_u,
  output logic [RHO-1:0] out_v,
  output logic [RHO-1:0] keep_u,
  output logic [RHO-1:0] keep_v
);

  logic [3:0] pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      out_valid <= 1'b0;
      out_u     <= '0;
      out_v     <= '0;
      keep_u    <= '0;
      keep_v    <= '0;
    end else if (clear) begin
      pos       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_u <= in_u;
        out_v <= in_v;
        for (int i = 0; i < RHO; i++) begin
          int idx;
          idx = (int'(pos) + i) % punc_len(rate);
          keep_u[i] <= punc_keep(rate, 0, idx);
          keep_v[i] <= punc_keep(rate, 1, idx);
        end
        pos <= 4'((int'(pos) + RHO) % punc_len(rate));
      end
    end
  end

endmodule
