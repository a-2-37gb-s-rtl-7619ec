// tb_ldpccc_decoder: self-checking test of the five-processor decoder.
//
// A reference encoder written directly from the three parity-check equations
// (bit-serial, independent of the RTL encoder) produces codewords of random
// information bits. They are mapped to 6-bit LLRs (+8 for 0, -8 for 1) and sent
// through the decoder, 12 bits per cycle, in three phases:
//  1. noiseless: every decoded bit must equal the information bit;
//  2. noisy: strong Gaussian-like noise; the channel hard decisions contain
//     errors, the decoded bits must contain none;
//  3. test circuits: processor 2 bypassed and processor 3 chosen as FINAL;
//     the output must still be error free and arrive 3*43 cycles after input.
// Latency: with all processors the first block must leave exactly 5*43
// enabled cycles after it entered.
//
// Expected values follow the code definition and the block's specified
// behaviour; the stimulus, sizes and limits are this testbench's own choices.
module tb_ldpccc_decoder;
  import ldpccc_pkg::*;

  localparam int RHO = 12;
  localparam int NP_N = 5;
  localparam int NBLK = 300;            // blocks per phase
  localparam int NPAD = 260;            // codeword continues past the compared part
  localparam int NT = RHO * (NBLK + NPAD);

  logic clk = 0, rst_n = 0, en = 0, flush = 0, in_valid = 0;
  llr_t in_u [RHO], in_v [RHO];
  logic [NP_N-1:0] bypass = '0;
  logic [$clog2(NP_N+1)-1:0] final_sel = 3'(NP_N-1);
  logic out_valid;
  logic [RHO-1:0] out_bits;

  ldpccc_decoder dut (.*, .in_llr_u(in_u), .in_llr_v(in_v));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit u [NT], v [NT];
  int lu [NT], lv [NT];

  function automatic bit get(ref bit a [NT], input int t);
    return (t < 0) ? 1'b0 : a[t];
  endfunction

  task automatic encode();
    int eu [3][3] = '{'{0, 56, 373}, '{0, 197, 457}, '{0, 70, 485}};
    int ev [3][3] = '{'{0, 218, 406}, '{0, 22, 491}, '{0, 181, 236}};
    for (int t = 0; t < NT; t++) begin
      int ph = t % 3;
      u[t] = 1'($urandom);
      v[t] = u[t] ^ get(u, t - eu[ph][1]) ^ get(u, t - eu[ph][2])
                  ^ get(v, t - ev[ph][1]) ^ get(v, t - ev[ph][2]);
    end
  endtask

  function automatic int noise(input int amp);
    int s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(2*amp, 0)) - amp;
    return s;
  endfunction

  function automatic int sat(input int x);
    return x > 31 ? 31 : (x < -31 ? -31 : x);
  endfunction

  // run one phase: reset, flush, stream NBLK blocks plus padding, compare
  task automatic run_phase(input int amp, input int exp_lat, input string name,
                           output int raw_err, output int dec_err);
    int out_blk = 0, in_blk = 0, first_in = -1, first_out = -1;
    raw_err = 0; dec_err = 0;
    encode();
    for (int t = 0; t < NT; t++) begin
      lu[t] = sat((u[t] ? -8 : 8) + noise(amp));
      lv[t] = sat((v[t] ? -8 : 8) + noise(amp));
      if (t < RHO*NBLK && (lu[t] < 0) != u[t]) raw_err++;
    end
    rst_n = 0; en = 0; flush = 0; in_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    flush = 1;
    repeat (43) @(negedge clk);
    flush = 0;
    // one block per cycle; the codeword runs on NPAD blocks past the
    // compared part so that every compared bit sees only code constraints
    while (out_blk < NBLK) begin
      en = 1;
      in_valid = 1'b1;
      for (int q = 0; q < RHO; q++) begin
        in_u[q] = llr_t'(lu[in_blk*RHO + q]);
        in_v[q] = llr_t'(lv[in_blk*RHO + q]);
      end
      if (in_blk == 0) first_in = cyc;
      @(posedge clk);
      #1;
      if (out_valid) begin
        if (first_out < 0) first_out = cyc;
        for (int q = 0; q < RHO; q++)
          if (out_bits[q] != u[out_blk*RHO + q]) begin dec_err++; if (dec_err < 6) $display("err blk %0d lane %0d", out_blk, q); end
        out_blk++;
      end
      in_blk++;
      @(negedge clk);
    end
    en = 0; in_valid = 0;
    checks++;
    if (first_out - first_in != exp_lat) begin
      failures++;
      $display("%s: latency %0d, expected %0d", name, first_out - first_in, exp_lat);
    end
    $display("%s: channel errors %0d, decoded errors %0d, latency %0d", name, raw_err, dec_err,
             first_out - first_in);
  endtask

  initial begin
    int r, d;
    // 1. noiseless
    run_phase(0, NP_N*43, "noiseless", r, d);
    checks++; if (d != 0) failures++;
    // 2. noisy
    run_phase(4, NP_N*43, "noisy", r, d);
    checks++; if (r == 0) begin failures++; $display("noise produced no channel errors"); end
    checks++; if (d != 0) failures++;
    // 3. processor 2 bypassed, processor 3 is the last
    bypass = 5'b00100; final_sel = 3'd3;
    run_phase(3, 3*43, "bypass", r, d);
    checks++; if (d != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
