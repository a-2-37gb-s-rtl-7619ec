// tb_puncture: for each of the five rates, the transmitted-bit marks must
// follow the puncturing pattern table (typed in here from the code
// specification), aligned to time across 3-bit words, and the number of
// transmitted bits per pattern period must give the nominal rate.
//
// Expected values follow the code definition and the block's specified
// behaviour; the stimulus, sizes and limits are this testbench's own choices.
module tb_puncture;
  import ldpccc_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_valid;
  rate_e rate = RATE_1_2;
  logic [2:0] in_u = '0, in_v = '0, out_u, out_v, keep_u, keep_v;
  puncture #(.RHO(3)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string pu [5] = '{"1", "110100", "010111", "1011", "1110001110"};
  string pv [5] = '{"1", "111111", "111010", "0110", "0100110111"};
  int    num [5] = '{1, 2, 3, 4, 5};
  int    den [5] = '{2, 3, 4, 5, 6};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      int t, sent, L;
      t = 0; sent = 0;
      L = pu[r].len();
      @(negedge clk);
      rate = rate_e'(r);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int n = 0; n < 60; n++) begin
        in_valid = 1; in_u = 3'($urandom); in_v = 3'($urandom);
        @(posedge clk); #1;
        for (int i = 0; i < 3; i++) begin
          checks += 2;
          if (keep_u[i] != (pu[r][(t + i) % L] == "1")) failures++;
          if (keep_v[i] != (pv[r][(t + i) % L] == "1")) failures++;
          sent += keep_u[i] + keep_v[i];
        end
        checks++;
        if (out_u != in_u || out_v != in_v) failures++;
        t += 3;
        @(negedge clk);
        in_valid = ($urandom_range(1, 0) == 0);
        if (!in_valid) begin @(posedge clk); @(negedge clk); end
      end
      // 180 information bits: rate = 180 / sent
      checks++;
      if (180 * den[r] != sent * num[r]) begin
        failures++;
        $display("rate %0d: %0d bits sent for 180", r, sent);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
