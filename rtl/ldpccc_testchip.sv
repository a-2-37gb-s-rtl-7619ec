// ldpccc_testchip: rate-compatible (491,3,6) LDPC-CC codec with its built-in
// self-test chain.
//
// Data path: a random generator (lfsr_rng, 3 bits per cycle) feeds the folded
// encoder (3 information + 3 parity bits per cycle); the puncturer marks the
// bits sent for the selected rate; the AWGN engine turns the bits into noisy
// 6-bit LLRs; the de-puncturer zeroes the LLRs of unsent bits; the buffer
// memory packs four 3-lane words into one 12-lane word; the five-processor
// decoder decodes 12 information bits per enabled cycle. An identical random
// generator (12 bits per step) regenerates the sent information bits at the
// decoder output, and the chip counts compared bits and bit errors.
//
// Test modes (mode input): normal; without noise (AWGN bypassed); uncoded
// (encoder and decoder bypassed: rate 1/2, hard decision on the channel
// LLRs); test input (LLR pairs from the ext_llr_* pins go into the
// de-puncturer); external control (source and decoder strobes from pins).
// repeat_en keeps decoding frame after frame. bypass/final_sel reconfigure
// the decoder around a faulty processor.
// Chain and modes follow the document's test chip; error counting, the
// register stages between blocks and the port list are this design's choices.
//
// Timing: the source runs at up to 3 information bits per cycle, so the
// decoder (12 bits per enabled cycle) is enabled about one cycle in four.
// First decoded block: 215 decoder-enabled cycles after its data entered.
module ldpccc_testchip
  import ldpccc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // run control
  input  logic        start,
  input  logic        stop,
  input  mode_e       mode,
  input  rate_e       rate,
  input  logic        repeat_en,
  input  logic [15:0] frame_blocks,   // decoded 12-bit blocks per frame
  input  logic [7:0]  sigma,          // noise level (std. dev. ~0.072*sigma LSB)
  input  logic [30:0] seed,           // data generator seed (0 = default)
  // decoder test circuits
  input  logic [NPROC-1:0]           bypass,
  input  logic [$clog2(NPROC+1)-1:0] final_sel,
  // external control and test input
  input  logic        ext_src_en,
  input  logic        ext_dec_en,
  input  logic        ext_llr_valid,
  input  llr_t        ext_llr_u [ENC_RHO],
  input  llr_t        ext_llr_v [ENC_RHO],
  // transmitted stream (after puncturing)
  output logic                tx_valid,
  output logic [ENC_RHO-1:0]  tx_u,
  output logic [ENC_RHO-1:0]  tx_v,
  output logic [ENC_RHO-1:0]  tx_keep_u,
  output logic [ENC_RHO-1:0]  tx_keep_v,
  // decoded output and measurement
  output logic                dec_valid,
  output logic [DEC_RHO-1:0]  dec_bits,
  output logic                busy,
  output logic                done,
  output logic [15:0]         frame_count,
  output logic [31:0]         bit_count,
  output logic [31:0]         err_count
);

  logic clear, flush, src_en, dec_en, buf_afull, buf_valid;
  logic uncoded;
  assign uncoded = mode == MODE_UNCODED;

  rate_e rate_eff;
  assign rate_eff = uncoded ? RATE_1_2 : rate;

  // ---------------- source: random data and encoder ----------------
  logic [ENC_RHO-1:0] src_bits;
  lfsr_rng #(.STEP(ENC_RHO)) u_src_rng (
    .clk(clk), .rst_n(rst_n), .load(clear), .seed(seed), .en(src_en), .bits(src_bits)
  );

  logic               enc_valid;
  logic [ENC_RHO-1:0] enc_u, enc_v;
  ldpccc_encoder #(.RHO(ENC_RHO)) u_enc (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(src_en), .in_u(src_bits),
    .out_valid(enc_valid), .out_u(enc_u), .out_v(enc_v)
  );

  puncture #(.RHO(ENC_RHO)) u_punc (
    .clk(clk), .rst_n(rst_n), .clear(clear), .rate(rate_eff),
    .in_valid(enc_valid), .in_u(enc_u), .in_v(enc_v),
    .out_valid(tx_valid), .out_u(tx_u), .out_v(tx_v),
    .keep_u(tx_keep_u), .keep_v(tx_keep_v)
  );

  // ---------------- channel ----------------
  logic ch_valid;
  llr_t ch_llr_u [ENC_RHO], ch_llr_v [ENC_RHO];
  awgn_engine #(.RHO(ENC_RHO)) u_awgn (
    .clk(clk), .rst_n(rst_n), .noise_en(mode != MODE_NO_NOISE), .sigma(sigma),
    .in_valid(tx_valid), .in_u(tx_u), .in_v(tx_v),
    .out_valid(ch_valid), .out_llr_u(ch_llr_u), .out_llr_v(ch_llr_v)
  );

  // test input mode: LLRs from the pins instead of the channel. Only words
  // that arrive while running are taken, so whatever was still in the source
  // pipeline when a run was stopped is dropped during the next flush.
  logic rx_valid;
  llr_t rx_llr_u [ENC_RHO], rx_llr_v [ENC_RHO];
  always_comb begin
    if (mode == MODE_TEST_IN) begin
      rx_valid = ext_llr_valid && busy && !flush;
      rx_llr_u = ext_llr_u;
      rx_llr_v = ext_llr_v;
    end else begin
      rx_valid = ch_valid && busy && !flush;
      rx_llr_u = ch_llr_u;
      rx_llr_v = ch_llr_v;
    end
  end

  logic dp_valid;
  llr_t dp_llr_u [ENC_RHO], dp_llr_v [ENC_RHO];
  depuncture #(.RHO(ENC_RHO)) u_depunc (
    .clk(clk), .rst_n(rst_n), .clear(clear), .rate(rate_eff),
    .in_valid(rx_valid), .in_llr_u(rx_llr_u), .in_llr_v(rx_llr_v),
    .out_valid(dp_valid), .out_llr_u(dp_llr_u), .out_llr_v(dp_llr_v)
  );

  // ---------------- buffer memory ----------------
  llr_t bf_llr_u [DEC_RHO], bf_llr_v [DEC_RHO];
  llr_buffer #(.IN_LANES(ENC_RHO), .OUT_LANES(DEC_RHO), .DEPTH(16)) u_buf (
    .clk(clk), .rst_n(rst_n), .clear(clear),
    .wr_valid(dp_valid), .wr_llr_u(dp_llr_u), .wr_llr_v(dp_llr_v),
    .rd_en(dec_en), .rd_valid(buf_valid),
    .rd_llr_u(bf_llr_u), .rd_llr_v(bf_llr_v), .afull(buf_afull)
  );

  // ---------------- decoder ----------------
  logic               cd_valid;
  logic [DEC_RHO-1:0] cd_bits;
  ldpccc_decoder u_dec (
    .clk(clk), .rst_n(rst_n), .en(dec_en & ~uncoded), .flush(flush),
    .in_valid(buf_valid), .in_llr_u(bf_llr_u), .in_llr_v(bf_llr_v),
    .bypass(bypass), .final_sel(final_sel),
    .out_valid(cd_valid), .out_bits(cd_bits)
  );

  // uncoded mode: hard decisions straight from the buffer
  always_comb begin
    if (uncoded) begin
      dec_valid = dec_en;
      for (int q = 0; q < DEC_RHO; q++) dec_bits[q] = bf_llr_u[q] < 0;
    end else begin
      dec_valid = cd_valid & dec_en;
      dec_bits  = cd_bits;
    end
  end

  // ---------------- control ----------------
  test_ctrl #(.NP_FLUSH(npos(DEC_RHO))) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .stop(stop), .mode(mode),
    .repeat_en(repeat_en), .frame_blocks(frame_blocks),
    .ext_src_en(ext_src_en), .ext_dec_en(ext_dec_en),
    .buf_afull(buf_afull), .buf_valid(buf_valid), .out_valid(dec_valid),
    .clear(clear), .flush(flush), .src_en(src_en), .dec_en(dec_en),
    .busy(busy), .done(done), .frame_count(frame_count)
  );

  // ---------------- reference data and error count ----------------
  logic [DEC_RHO-1:0] ref_bits;
  lfsr_rng #(.STEP(DEC_RHO)) u_ref_rng (
    .clk(clk), .rst_n(rst_n), .load(clear), .seed(seed), .en(dec_valid), .bits(ref_bits)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_count <= '0;
      err_count <= '0;
    end else if (clear) begin
      bit_count <= '0;
      err_count <= '0;
    end else if (dec_valid && busy) begin
      bit_count <= bit_count + 32'(DEC_RHO);
      err_count <= err_count + 32'($countones(dec_bits ^ ref_bits));
    end
  end

endmodule
