// circ_buffer: two-port memory bank used as a fixed delay line.
//
// The hybrid-partitioned FIFO moves long tap-free stretches of the processor
// window into memory banks: instead of shifting DEPTH register stages, the
// bank writes each new word at a circular address and reads the word written
// DEPTH enabled cycles earlier from the same address in the same cycle, so
// nothing shifts. Read is asynchronous (register-file style) and returns the
// old content of the address about to be overwritten; write happens on the
// rising clock edge when en is high.
// Depth and width are parameters (the document's banks are 36, 32 and 20
// words); the read timing and reset of the pointer are this design's choices.
// The array itself is not reset: the processor's reset flush writes it.
module circ_buffer #(
  parameter int WIDTH = 144,
  parameter int DEPTH = 36
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  assign rdata = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ptr <= '0;
    else if (en)     ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  end

endmodule
