// tb_awgn_engine: without noise the LLRs must be exactly +8 / -8 for bits
// 0 / 1; with noise the per-bit error (LLR - ideal) must have a mean near 0 and
// a standard deviation near 0.072*sigma (checked for two sigma values over
// 6000 samples each), and the hard-decision error rate must grow with sigma.
//
// Expected values follow the code definition and the block's specified
// behaviour; the stimulus, sizes and limits are this testbench's own choices.
module tb_awgn_engine;
  import ldpccc_pkg::*;
  logic clk = 0, rst_n = 0, noise_en = 0, in_valid = 0, out_valid;
  logic [7:0] sigma = 0;
  logic [2:0] in_u = 0, in_v = 0;
  llr_t out_llr_u [3], out_llr_v [3];
  awgn_engine #(.RHO(3)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int sg, input bit nz, output real mean, output real sd, output int errs);
    real s = 0, s2 = 0;
    int n = 0;
    errs = 0;
    noise_en = nz; sigma = 8'(sg);
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      in_valid = 1; in_u = 3'($urandom); in_v = 3'($urandom);
      @(posedge clk); #1;
      for (int i = 0; i < 3; i++) begin
        real e;
        e = real'(int'(out_llr_u[i]) - (in_u[i] ? -8 : 8));
        s += e; s2 += e * e; n++;
        if ((out_llr_u[i] < 0) != in_u[i]) errs++;
        e = real'(int'(out_llr_v[i]) - (in_v[i] ? -8 : 8));
        s += e; s2 += e * e; n++;
        if ((out_llr_v[i] < 0) != in_v[i]) errs++;
      end
    end
    mean = s / n;
    sd = $sqrt(s2 / n - mean * mean);
  endtask

  initial begin
    real m, sd;
    int e1, e2;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(200, 0, m, sd, e1);
    checks++; if (m != 0.0 || sd != 0.0 || e1 != 0) failures++;
    run(40, 1, m, sd, e1);
    $display("sigma 40: mean %f sd %f errors %0d", m, sd, e1);
    checks++; if (m > 0.3 || m < -0.3) failures++;
    checks++; if (sd < 2.3 || sd > 3.4) failures++;
    run(100, 1, m, sd, e2);
    $display("sigma 100: mean %f sd %f errors %0d", m, sd, e2);
    checks++; if (sd < 6.2 || sd > 8.2) failures++;
    checks++; if (e2 <= e1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
