// tb_llr_buffer: 3-lane words written at random times must come out as
// 12-lane words in time order (four input words per output word), read at
// random times, with no word lost or repeated; afull must rise before the
// memory overflows when the reader stops (the writer obeys it).
//
// Expected values follow the code definition and the block's specified
// behaviour; the stimulus, sizes and limits are this testbench's own choices.
module tb_llr_buffer;
  import ldpccc_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, wr_valid = 0, rd_en = 0, rd_valid, afull;
  llr_t wr_llr_u [3], wr_llr_v [3], rd_llr_u [12], rd_llr_v [12];
  llr_buffer #(.IN_LANES(3), .OUT_LANES(12), .DEPTH(16)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, afull_seen = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wcnt, rcnt;
    wcnt = 0; rcnt = 0;
    for (int i = 0; i < 3; i++) begin wr_llr_u[i] = '0; wr_llr_v[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // lane value encodes its time index: u = t mod 31, v = -(t*7 mod 31)
      wr_valid = !afull && $urandom_range(1, 0) == 0 && wcnt < 3*1200;
      for (int i = 0; i < 3; i++) begin
        wr_llr_u[i] = llr_t'((wcnt + i) % 31);
        wr_llr_v[i] = -llr_t'(((wcnt + i) * 7) % 31);
      end
      // the reader pauses for a while to fill the memory
      rd_en = (n < 300 || n > 700) && $urandom_range(3, 0) == 0;
      if (afull) afull_seen++;
      @(posedge clk);
      #1;
      if (wr_valid) wcnt += 3;
      if (rd_en && rd_valid) ;
    end
    checks++;
    if (afull_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader side model: check each popped word before the clock edge
  int rt = 0;
  always @(negedge clk) begin
    #2;
    if (rst_n && rd_en && rd_valid) begin
      for (int i = 0; i < 12; i++) begin
        checks += 2;
        if (rd_llr_u[i] != llr_t'((rt + i) % 31)) failures++;
        if (rd_llr_v[i] != -llr_t'(((rt + i) * 7) % 31)) failures++;
      end
      rt += 12;
    end
  end
endmodule
