// test_ctrl: control module of the codec test chip.
//
// After start the controller flushes the decoder (NP_FLUSH cycles of known-zero
// slots), then runs: the data source (random generator, encoder, puncturer,
// channel) advances whenever the data buffer is not almost full, and the
// decoder advances whenever the buffer holds a word. Decoded blocks are
// counted; after frame_blocks blocks the run ends (done), or, in repeat mode,
// the frame counter steps and decoding simply continues, so the decoder can
// run as long as a power measurement needs. In the external-control mode the
// source and decoder strobes come from pins instead (the decoder still only
// moves when the buffer has data). stop returns to idle at any time.
// The test modes are the document's; the state machine, the flush and the
// frame counting are this design's choices.
module test_ctrl
  import ldpccc_pkg::*;
#(
  parameter int NP_FLUSH = 43
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stop,
  input  mode_e       mode,
  input  logic        repeat_en,
  input  logic [15:0] frame_blocks,
  input  logic        ext_src_en,
  input  logic        ext_dec_en,
  input  logic        buf_afull,
  input  logic        buf_valid,
  input  logic        out_valid,
  output logic        clear,
  output logic        flush,
  output logic        src_en,
  output logic        dec_en,
  output logic        busy,
  output logic        done,
  output logic [15:0] frame_count
);

  typedef enum logic [1:0] {S_IDLE, S_FLUSH, S_RUN, S_DONE} state_e;
  state_e state;
  logic [7:0]  fcnt;
  logic [15:0] blk_cnt;

  assign clear = (state == S_IDLE) && start;
  assign flush = state == S_FLUSH;
  assign busy  = (state == S_FLUSH) || (state == S_RUN);
  assign done  = state == S_DONE;

  always_comb begin
    src_en = 1'b0;
    dec_en = 1'b0;
    if (state == S_RUN) begin
      if (mode == MODE_EXT_CTRL) begin
        src_en = ext_src_en & ~buf_afull;
        dec_en = ext_dec_en & buf_valid;
      end else begin
        src_en = ~buf_afull && (mode != MODE_TEST_IN);
        dec_en = buf_valid;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      fcnt        <= '0;
      blk_cnt     <= '0;
      frame_count <= '0;
    end else if (stop) begin
      state <= S_IDLE;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state       <= S_FLUSH;
          fcnt        <= '0;
          blk_cnt     <= '0;
          frame_count <= '0;
        end
        S_FLUSH: begin
          fcnt <= fcnt + 1'b1;
          if (int'(fcnt) == NP_FLUSH - 1) state <= S_RUN;
        end
        S_RUN: if (out_valid) begin
          if (blk_cnt == frame_blocks - 1'b1) begin
            blk_cnt     <= '0;
            frame_count <= frame_count + 1'b1;
            if (!repeat_en) state <= S_DONE;
          end else begin
            blk_cnt <= blk_cnt + 1'b1;
          end
        end
        S_DONE: if (start) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
