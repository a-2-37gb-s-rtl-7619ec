// tb_circ_buffer: the memory bank must act as a delay line of exactly DEPTH
// enabled cycles: random words are written with random enable gaps, and each
// read word is compared with the word written DEPTH writes earlier (a queue
// model in the testbench). Two depths are tested.
//
// Expected values follow the code definition and the block's specified
// behaviour; the stimulus, sizes and limits are this testbench's own choices.
module tb_circ_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en36 = 0, en5 = 0;
  logic [23:0] w36 = 0, w5 = 0, r36, r5;
  circ_buffer #(.WIDTH(24), .DEPTH(36)) d36 (.clk, .rst_n, .en(en36), .wdata(w36), .rdata(r36));
  circ_buffer #(.WIDTH(24), .DEPTH(5))  d5  (.clk, .rst_n, .en(en5),  .wdata(w5),  .rdata(r5));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] q36 [$], q5 [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      en36 = 1'($urandom_range(3, 0) != 0);
      en5  = 1'($urandom_range(1, 0));
      w36 = 24'($urandom); w5 = 24'($urandom);
      #1;
      if (en36) begin
        if (q36.size() == 36) begin
          checks++;
          if (r36 !== q36.pop_front()) failures++;
        end
        q36.push_back(w36);
      end
      if (en5) begin
        if (q5.size() == 5) begin
          checks++;
          if (r5 !== q5.pop_front()) failures++;
        end
        q5.push_back(w5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
