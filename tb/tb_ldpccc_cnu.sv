// tb_ldpccc_cnu: checks the normalized min-sum check node unit against a
// reference computed in the testbench: for every edge the sign product of
// the other five inputs and 7/8 of the smallest of their magnitudes (inputs
// clipped to +-31, result truncated). Directed cases (ties, zeros, large
// 8-bit inputs) plus 3000 random input sets.
//
// Expected values follow the code definition and the block's specified
// behaviour; the stimulus, sizes and limits are this testbench's own choices.
module tb_ldpccc_cnu;
  import ldpccc_pkg::*;

  sum_t in_msg [K];
  llr_t out_msg [K];
  int checks = 0, failures = 0;

  ldpccc_cnu dut (.in_msg(in_msg), .out_msg(out_msg));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    for (int i = 0; i < K; i++) begin
      int mn = 1000, sg = 0, exp_v;
      for (int k = 0; k < K; k++) if (k != i) begin
        int x = int'(in_msg[k]);
        int m = x < 0 ? -x : x;
        if (m > 31) m = 31;
        if (x < 0) sg ^= 1;
        if (m < mn) mn = m;
      end
      exp_v = (mn * 7) / 8;
      if (sg) exp_v = -exp_v;
      checks++;
      if (int'(out_msg[i]) != exp_v) begin
        failures++;
        if (failures < 10) $display("edge %0d: got %0d expected %0d", i, out_msg[i], exp_v);
      end
    end
  endtask

  initial begin
    in_msg = '{8'sd10, 8'sd10, -8'sd20, 8'sd5, 8'sd5, 8'sd31}; check_one();
    in_msg = '{8'sd0, -8'sd3, 8'sd90, -8'sd96, 8'sd7, 8'sd8};  check_one();
    in_msg = '{-8'sd1, -8'sd1, -8'sd1, -8'sd1, -8'sd1, -8'sd1}; check_one();
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < K; i++) in_msg[i] = sum_t'(int'($urandom_range(192, 0)) - 96);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
