// tb_ldpccc_testchip: end-to-end test of the codec test chip at its full,
// default size (no parameter overrides).
//
// The chip generates its own data, encodes, punctures, adds noise, decodes
// and counts errors against a regenerated copy of the data. The testbench
// starts one run per configuration and checks the chip's own counters and
// outputs:
//  - every code rate (1/2 ... 5/6) without noise and with light noise:
//    no decoded errors, and the transmitted share of bits matches the rate;
//  - uncoded mode at a noise level where the raw channel makes errors, then
//    the same noise with coding: the decoder must remove the errors;
//  - test-input mode: LLRs of the all-zero codeword from the pins must decode
//    to all zeros;
//  - external-control mode with random strobes, which also fills the buffer
//    and stalls the source;
//  - repeat mode, which must run on over several frames until stopped;
//  - decoder test circuits: a bypassed processor and a FINAL selection, with
//    the decoding latency checked (43 decoder-enabled cycles per processor
//    in use: 215 with all five).
// Each mechanism is counted (flushes, stalls on a full and an empty buffer,
// punctured bits per rate, modes, repeats, bypasses); one that never
// happened counts as a failure.
//
// Expected values follow the code definition and the block's specified
// behaviour; the stimulus, sizes and limits are this testbench's own choices.
module tb_ldpccc_testchip;
  import ldpccc_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0, stop = 0;
  mode_e       mode = MODE_NORMAL;
  rate_e       rate = RATE_1_2;
  logic        repeat_en = 0;
  logic [15:0] frame_blocks = 16'd100;
  logic [7:0]  sigma = 8'd0;
  logic [30:0] seed = '0;
  logic [NPROC-1:0]           bypass = '0;
  logic [$clog2(NPROC+1)-1:0] final_sel = 3'(NPROC - 1);
  logic        ext_src_en = 0, ext_dec_en = 0, ext_llr_valid = 0;
  llr_t        ext_llr_u [ENC_RHO], ext_llr_v [ENC_RHO];
  logic        tx_valid, dec_valid, busy, done;
  logic [ENC_RHO-1:0] tx_u, tx_v, tx_keep_u, tx_keep_v;
  logic [DEC_RHO-1:0] dec_bits;
  logic [15:0] frame_count;
  logic [31:0] bit_count, err_count;

  ldpccc_testchip dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- monitors ----------------
  int n_flush = 0, n_stall_full = 0, n_stall_empty = 0, n_ext_toggle = 0;
  int tx_info = 0, tx_kept = 0;          // per run
  int dec_cycles = 0, first_lat = -1;    // per run: decoder steps before first output
  int zero_err = 0;                      // per run: ones decoded in test-input mode

  always @(posedge clk) if (rst_n) begin
    if (dut.flush) n_flush++;
    if (busy && !dut.flush && dut.buf_afull && mode != MODE_TEST_IN) n_stall_full++;
    if (busy && !dut.flush && !dut.buf_valid) n_stall_empty++;
    if (tx_valid) begin
      tx_info += ENC_RHO;
      tx_kept += $countones(tx_keep_u) + $countones(tx_keep_v);
    end
    if (dec_valid && first_lat < 0) first_lat = dec_cycles;
    if (dut.dec_en) dec_cycles++;
    if (mode == MODE_TEST_IN && dec_valid && busy) zero_err += $countones(dec_bits);
  end

  // external strobes: long random stretches so the buffer fills and drains
  bit ext_on = 0;
  always @(negedge clk) if (ext_on) begin
    if ($urandom_range(149, 0) == 0) begin ext_dec_en = ~ext_dec_en; n_ext_toggle++; end
    ext_src_en = $urandom_range(7, 0) != 0;
  end

  // test input: the all-zero codeword at LLR +20 on three lanes
  bit tin_on = 0;
  always @(negedge clk) begin
    ext_llr_valid = tin_on && $urandom_range(1, 0) == 0;
    for (int i = 0; i < ENC_RHO; i++) begin
      ext_llr_u[i] = tin_on ? llr_t'(20) : '0;
      ext_llr_v[i] = tin_on ? llr_t'(20) : '0;
    end
  end

  // start a run and wait for done (or, in repeat mode, nframes frames)
  task automatic run(input mode_e m, input rate_e r, input int sg, input int nblk,
                     input int nframes, output int bits, output int errs);
    mode = m; rate = r; sigma = 8'(sg); frame_blocks = 16'(nblk);
    seed = $urandom;
    @(negedge clk);
    tx_info = 0; tx_kept = 0; dec_cycles = 0; first_lat = -1; zero_err = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    if (repeat_en) begin
      while (int'(frame_count) < nframes) @(negedge clk);
      bits = int'(bit_count); errs = int'(err_count);
      stop = 1;
      @(negedge clk);
      stop = 0;
    end else begin
      while (!done) @(negedge clk);
      bits = int'(bit_count); errs = int'(err_count);
      start = 1;                          // acknowledge: back to idle
      @(negedge clk);
      start = 0;
    end
    chk(!busy, "idle after the run");
    $display("run mode=%s rate=%s sigma=%0d: bits=%0d errors=%0d latency=%0d frames=%0d",
             m.name(), r.name(), sg, bits, errs, first_lat, frame_count);
  endtask

  // transmitted share: info/kept must be k/n of the rate
  function automatic bit rate_ok(input rate_e r, input int info, input int kept);
    int k, n;
    case (r)
      RATE_2_3: begin k = 2; n = 3; end
      RATE_3_4: begin k = 3; n = 4; end
      RATE_4_5: begin k = 4; n = 5; end
      RATE_5_6: begin k = 5; n = 6; end
      default:  begin k = 1; n = 2; end
    endcase
    return (kept * k - info * n) ** 2 <= (10 * n) ** 2;
  endfunction

  int n_rates = 0, n_modes = 0, n_repeat = 0, n_bypass = 0;

  initial begin
    int bits, errs, raw_bits, raw_errs;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. every rate, noiseless, then with light noise
    for (int ri = 0; ri < 5; ri++) begin
      rate_e r;
      r = rate_e'(ri);
      run(MODE_NO_NOISE, r, 0, 100, 1, bits, errs);
      chk(bits == 1200 && errs == 0, "noiseless run error free");
      chk(first_lat == 5 * 43, "latency 215 decoder cycles");
      chk(rate_ok(r, tx_info, tx_kept), "transmitted share matches the rate");
      n_rates++;
      run(MODE_NORMAL, r, 12, 100, 1, bits, errs);
      chk(bits == 1200 && errs == 0, "light noise corrected");
    end
    n_modes++;                             // normal and no-noise

    // 2. uncoded against coded at the same noise level
    run(MODE_UNCODED, RATE_1_2, 60, 200, 1, raw_bits, raw_errs);
    chk(raw_bits == 2400 && raw_errs > 0, "uncoded channel makes errors");
    run(MODE_NORMAL, RATE_1_2, 60, 200, 1, bits, errs);
    chk(bits == 2400 && errs * 10 <= raw_errs, "decoder removes channel errors");
    n_modes++;

    // 3. test input
    tin_on = 1;
    run(MODE_TEST_IN, RATE_1_2, 0, 60, 1, bits, errs);
    tin_on = 0;
    chk(bits == 720 && zero_err == 0, "test input decodes to the zero codeword");
    n_modes++;

    // 4. external control
    ext_on = 1;
    run(MODE_EXT_CTRL, RATE_3_4, 0, 100, 1, bits, errs);
    ext_on = 0; ext_src_en = 0; ext_dec_en = 0;
    chk(bits == 1200 && errs == 0, "external control run error free");
    n_modes++;

    // 5. repeat mode: three frames, then stop
    repeat_en = 1;
    run(MODE_NORMAL, RATE_2_3, 12, 40, 3, bits, errs);
    repeat_en = 0;
    chk(bits >= 3 * 480 && errs == 0, "repeat mode keeps decoding");
    n_repeat++;

    // 6. test circuits: processor 1 bypassed, processor 3 is FINAL
    bypass = 5'b00010; final_sel = 3'd3;
    run(MODE_NO_NOISE, RATE_1_2, 0, 100, 1, bits, errs);
    chk(bits == 1200 && errs == 0, "bypass run error free");
    chk(first_lat == 3 * 43, "latency with one processor bypassed");
    //    processor 0 as FINAL (one iteration)
    bypass = '0; final_sel = 3'd0;
    run(MODE_NO_NOISE, RATE_1_2, 0, 100, 1, bits, errs);
    chk(bits == 1200 && errs == 0, "FINAL = processor 0 error free");
    chk(first_lat == 43, "latency of one processor");
    bypass = '0; final_sel = 3'(NPROC - 1);
    n_bypass++;

    // mechanism counts
    $display("flush=%0d stall_full=%0d stall_empty=%0d rates=%0d modes=%0d repeat=%0d bypass=%0d",
             n_flush, n_stall_full, n_stall_empty, n_rates, n_modes, n_repeat, n_bypass);
    chk(n_flush > 0, "flush happened");
    chk(n_stall_full > 0, "source stalled on a full buffer");
    chk(n_stall_empty > 0, "decoder stalled on an empty buffer");
    chk(n_rates == 5, "all rates run");
    chk(n_modes == 4, "all modes run");
    chk(n_repeat > 0, "repeat mode run");
    chk(n_bypass > 0, "bypass run");
    chk(n_ext_toggle > 0, "external strobes toggled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
