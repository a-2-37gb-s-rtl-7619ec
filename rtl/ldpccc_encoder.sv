// ldpccc_encoder: folded systematic encoder of the rate-1/2, period-3
// (491,3,6) LDPC convolutional code.
//
// Each enabled cycle takes RHO information bits u(t..t+RHO-1) and returns them
// with their parity bits. For time t of phase t mod 3 the parity bit is
//   v(t) = u(t) ^ u(t-KU1) ^ u(t-KU2) ^ v(t-KV1) ^ v(t-KV2)
// (exponents in ldpccc_pkg). Every delay is at least 22 > RHO, so all bits but
// u(t) come from two history registers of the last MS information and parity
// bits, which shift by RHO per cycle. Because RHO is a multiple of the period,
// lane p always uses the same equation and the connections are fixed wires.
// This is the document's folded encoder; its folding factor on the test chip
// is 3. The encoder starts in the all-zero state after reset or clear (the
// code cannot be terminated, so a run always starts from the zero state).
//
// Interface: in_valid/in_u in; out_valid/out_u/out_v one cycle later (registered).
module ldpccc_encoder
  import ldpccc_pkg::*;
#(
  parameter int RHO = ENC_RHO
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           in_valid,
  input  logic [RHO-1:0] in_u,
  output logic           out_valid,
  output logic [RHO-1:0] out_u,
  output logic [RHO-1:0] out_v
);

  // hist[i-1] holds the bit of time (first time of the current block) - i
  logic [MS-1:0] u_hist, v_hist;
  logic [RHO-1:0] par;

  always_comb begin
    for (int p = 0; p < RHO; p++) begin
      logic [1:0] ph;
      ph = 2'(p % PERIOD);
      par[p] = in_u[p]
             ^ u_hist[KU[ph][1] - p - 1] ^ u_hist[KU[ph][2] - p - 1]
             ^ v_hist[KV[ph][1] - p - 1] ^ v_hist[KV[ph][2] - p - 1];
    end
  end

  // newest bit of the block goes to hist[0]
  function automatic logic [RHO-1:0] reverse(input logic [RHO-1:0] x);
    for (int i = 0; i < RHO; i++) reverse[i] = x[RHO-1-i];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_hist    <= '0;
      v_hist    <= '0;
      out_valid <= 1'b0;
      out_u     <= '0;
      out_v     <= '0;
    end else if (clear) begin
      u_hist    <= '0;
      v_hist    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        u_hist <= {u_hist[MS-RHO-1:0], reverse(in_u)};
        v_hist <= {v_hist[MS-RHO-1:0], reverse(par)};
        out_u  <= in_u;
        out_v  <= par;
      end
    end
  end

  initial assert (RHO % PERIOD == 0 && RHO <= 22)
    else $error("encoder folding factor must be a multiple of 3, at most 22");

endmodule
