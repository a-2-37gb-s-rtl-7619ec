// tb_lfsr_rng: a 3-bit-per-step and a 12-bit-per-step generator with the same
// seed must emit the same bit stream, and it must match a bit-serial model of
// the x^31 + x^28 + 1 recurrence; reload restarts the stream.
//
// Expected values follow the code definition and the block's specified
// behaviour; the stimulus, sizes and limits are this testbench's own choices.
module tb_lfsr_rng;
  logic clk = 0, rst_n = 0, load = 0, en3 = 0, en12 = 0;
  logic [30:0] seed = 31'h0123_4567;
  logic [2:0]  b3;
  logic [11:0] b12;
  lfsr_rng #(.STEP(3))  g3  (.clk, .rst_n, .load, .seed, .en(en3),  .bits(b3));
  lfsr_rng #(.STEP(12)) g12 (.clk, .rst_n, .load, .seed, .en(en12), .bits(b12));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit s3 [$], s12 [$];
    logic [30:0] m;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      s3.delete(); s12.delete();
      load = 1; @(negedge clk); load = 0;
      // 3-bit generator: 400 steps = 1200 bits; 12-bit: 100 steps
      for (int n = 0; n < 400; n++) begin
        en3 = 1; en12 = (n % 4 == 0);
        for (int i = 0; i < 3; i++) s3.push_back(b3[i]);
        if (en12) for (int i = 0; i < 12; i++) s12.push_back(b12[i]);
        @(negedge clk);
      end
      en3 = 0; en12 = 0;
      m = seed;
      for (int i = 0; i < 1200; i++) begin
        bit fb;
        fb = m[30] ^ m[27];
        m = {m[29:0], fb};
        checks += 2;
        if (s3[i] != fb) failures++;
        if (s12[i] != fb) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
