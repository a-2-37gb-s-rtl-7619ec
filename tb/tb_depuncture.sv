// tb_depuncture: for each rate, LLRs at punctured positions (pattern typed in
// here from the code specification) must come out as 0 and all others
// unchanged, with the pattern kept aligned across 3-lane words and idle cycles.
//
// Expected values follow the code definition and the block's specified
// behaviour; the stimulus, sizes and limits are this testbench's own choices.
module tb_depuncture;
  import ldpccc_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_valid;
  rate_e rate = RATE_1_2;
  llr_t in_llr_u [3], in_llr_v [3], out_llr_u [3], out_llr_v [3];
  depuncture #(.RHO(3)) dut (.*);
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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      int t, L;
      t = 0;
      L = pu[r].len();
      @(negedge clk);
      rate = rate_e'(r); clear = 1;
      @(negedge clk);
      clear = 0;
      for (int n = 0; n < 50; n++) begin
        in_valid = 1;
        for (int i = 0; i < 3; i++) begin
          in_llr_u[i] = llr_t'($urandom_range(30, 1));
          in_llr_v[i] = -llr_t'($urandom_range(30, 1));
        end
        @(posedge clk); #1;
        checks++;
        if (!out_valid) failures++;
        for (int i = 0; i < 3; i++) begin
          checks += 2;
          if (out_llr_u[i] != ((pu[r][(t + i) % L] == "1") ? in_llr_u[i] : llr_t'(0))) failures++;
          if (out_llr_v[i] != ((pv[r][(t + i) % L] == "1") ? in_llr_v[i] : llr_t'(0))) failures++;
        end
        t += 3;
        @(negedge clk);
        in_valid = 0;
        if ($urandom_range(1, 0) == 0) begin @(posedge clk); @(negedge clk); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
