// awgn_engine: on-chip BPSK + additive white Gaussian noise channel.
//
// Each enabled cycle maps RHO information and RHO parity bits to +AMP (bit 0)
// or -AMP (bit 1), adds a noise sample to each and returns 6-bit saturated
// LLRs in the decoder's (6,2) format. A noise sample is the sum of four
// independent uniform 8-bit values (central-limit approximation of a Gaussian,
// standard deviation about 148), multiplied by sigma and divided by 2048, so
// the noise standard deviation is about 0.072*sigma LSBs. Each of the 2*RHO
// samples has its own 32-bit-per-cycle lfsr_rng. With noise_en low the noise
// is skipped (the "normal function without noise" test mode).
// The document names the AWGN engine only; the central-limit generator, the
// scaling and AMP = 8 (+2.0 in (6,2)) are this design's choices. Because the
// decoder runs min-sum, LLRs need no 2/sigma^2 scaling.
//
// Interface: in_valid/in_u/in_v in; out_valid/out_llr_* registered one cycle later.
module awgn_engine
  import ldpccc_pkg::*;
#(
  parameter int RHO = ENC_RHO,
  parameter int AMP = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           noise_en,
  input  logic [7:0]     sigma,
  input  logic           in_valid,
  input  logic [RHO-1:0] in_u,
  input  logic [RHO-1:0] in_v,
  output logic           out_valid,
  output llr_t           out_llr_u [RHO],
  output llr_t           out_llr_v [RHO]
);

  logic [31:0] rnd [2*RHO];

  for (genvar i = 0; i < 2*RHO; i++) begin : g_rng
    lfsr_rng #(.STEP(32), .SEED(31'h1234_5678 + 31'(i) * 31'h0B1D_3C5)) u_rng (
      .clk  (clk),
      .rst_n(rst_n),
      .load (1'b0),
      .seed ('0),
      .en   (in_valid & noise_en),
      .bits (rnd[i])
    );
  end

  function automatic int gauss(input logic [31:0] r, input logic [7:0] sg);
    int g;
    g = int'($signed(r[7:0])) + int'($signed(r[15:8]))
      + int'($signed(r[23:16])) + int'($signed(r[31:24]));
    return (g * int'(sg) + 1024) >>> 11;     // rounded
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < RHO; i++) begin
        out_llr_u[i] <= '0;
        out_llr_v[i] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < RHO; i++) begin
          int nu, nv;
          nu = noise_en ? gauss(rnd[i], sigma) : 0;
          nv = noise_en ? gauss(rnd[RHO+i], sigma) : 0;
          out_llr_u[i] <= sat_llr((in_u[i] ? -AMP : AMP) + nu);
          out_llr_v[i] <= sat_llr((in_v[i] ? -AMP : AMP) + nv);
        end
      end
    end
  end

endmodule
