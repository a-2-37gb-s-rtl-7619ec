// ldpccc_cnu: degree-6 check node unit, normalized min-sum.
//
// Each of the six incoming variable-to-check messages (w+2 = 8 bits, channel
// value included) is first clipped to the 6-bit message range. The unit finds
// the smallest and second-smallest magnitude and the product of the signs;
// the message back to edge i carries the sign product without sign(i) and the
// smallest magnitude among the other five edges, scaled by ALPHA/8.
// The min-sum rule and the normalization follow the document; the clipping of
// the inputs and truncation after scaling are this design's choices.
//
// Purely combinational; the processor registers its outputs in the window.
module ldpccc_cnu
  import ldpccc_pkg::*;
#(
  parameter int ALPHA = 7                       // scaling factor ALPHA/8 = 0.875
) (
  input  sum_t in_msg  [K],
  output llr_t out_msg [K]
);

  logic [W-2:0] mag   [K];
  logic         sgn   [K];
  logic [W-2:0] min1, min2;
  int unsigned  idx1;
  logic         sprod;

  always_comb begin
    min1  = '1;
    min2  = '1;
    idx1  = 0;
    sprod = 1'b0;
    for (int i = 0; i < K; i++) begin
      int x;
      x = int'(in_msg[i]);
      sgn[i] = x < 0;
      if (x < 0) x = -x;
      if (x > LLR_MAX) x = LLR_MAX;
      mag[i] = (W-1)'(x);
      sprod  = sprod ^ sgn[i];
      if (mag[i] < min1) begin
        min2 = min1;
        min1 = mag[i];
        idx1 = i;
      end else if (mag[i] < min2) begin
        min2 = mag[i];
      end
    end
    for (int i = 0; i < K; i++) begin
      logic [W-2:0] m;
      logic [W+1:0] scaled;
      m      = (idx1 == i) ? min2 : min1;
      scaled = ({3'b000, m} * (W+2)'(ALPHA)) >> 3;
      out_msg[i] = (sprod ^ sgn[i]) ? -llr_t'({1'b0, scaled[W-2:0]})
                                     :  llr_t'({1'b0, scaled[W-2:0]});
    end
  end

endmodule
