// tb_test_ctrl: the controller must flush for exactly 43 cycles after start,
// then enable the source only while the buffer is not almost full and the
// decoder only while the buffer has data, stop after frame_blocks decoded
// blocks (done), keep going and count frames in repeat mode, pass the pin
// strobes through in external-control mode and return to idle on stop.
//
// Expected values follow the code definition and the block's specified
// behaviour; the stimulus, sizes and limits are this testbench's own choices.
module tb_test_ctrl;
  import ldpccc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, repeat_en = 0;
  mode_e mode = MODE_NORMAL;
  logic [15:0] frame_blocks = 16'd5, frame_count;
  logic ext_src_en = 0, ext_dec_en = 0, buf_afull = 0, buf_valid = 0, out_valid = 0;
  logic clear, flush, src_en, dec_en, busy, done;
  test_ctrl dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("fail: %s", what); end
  endtask

  task automatic go();
    int nf;
    @(negedge clk); start = 1;
    #1 chk(clear, "clear on start");
    @(negedge clk); start = 0;
    nf = 0;
    while (flush) begin nf++; chk(!src_en && !dec_en, "idle during flush"); @(negedge clk); end
    chk(nf == 43, "43 flush cycles");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    go();
    // gating by buffer state
    buf_afull = 1; buf_valid = 0; #1 chk(!src_en && !dec_en, "gated");
    buf_afull = 0; buf_valid = 1; #1 chk(src_en && dec_en, "enabled");
    // 5 decoded blocks end the frame
    for (int i = 0; i < 5; i++) begin out_valid = 1; @(negedge clk); end
    out_valid = 0;
    chk(done && frame_count == 1, "done after one frame");
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    chk(!busy && !done, "back to idle");
    // repeat mode
    repeat_en = 1;
    go();
    for (int i = 0; i < 17; i++) begin out_valid = 1; @(negedge clk); end
    out_valid = 0;
    chk(busy && frame_count == 3, "repeat: three frames, still running");
    // external control
    mode = MODE_EXT_CTRL; buf_valid = 1;
    ext_src_en = 0; ext_dec_en = 1; #1 chk(!src_en && dec_en, "ext strobes 01");
    ext_src_en = 1; ext_dec_en = 0; #1 chk(src_en && !dec_en, "ext strobes 10");
    // test-input mode: no source
    mode = MODE_TEST_IN; #1 chk(!src_en && dec_en, "test input: source idle");
    @(negedge clk); stop = 1; @(negedge clk); stop = 0;
    chk(!busy, "stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
