// line_buffer: one image row of storage in block RAM, used as a delay line.
//
// Every pixel step the word on `din` is written, and the word that was
// written DEPTH steps earlier is presented on `dout`. With DEPTH equal to the
// image width, `dout` is the pixel directly above the incoming one. Rows are
// held in block RAM as the published design describes; the prefetching scheme below
// is this design's own.
//
// How it works: a write pointer walks the memory. The read port is
// registered (a simple dual-port BRAM) and always holds mem[ptr], the oldest
// word, so that `dout` is valid before the step that consumes it. On a step
// the write goes to ptr and the read is already issued for ptr+1, so the two
// ports never address the same word in one cycle (DEPTH >= 2).
//
// Interface: `step` advances by one pixel; `din` is sampled on that edge.
// Timing: `dout` is valid in any cycle that follows a step or an idle cycle,
// i.e. always after reset, and is combinationally usable by the stepping
// logic. Memory contents are not reset; the first DEPTH outputs after reset
// are whatever the RAM held, which the window logic masks as image border.
module line_buffer #(
  parameter int unsigned DEPTH  = 640,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              step,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  ptr;
  logic [PTR_W-1:0]  ptr_next;
  logic [PTR_W-1:0]  rd_addr;

  assign ptr_next = (ptr == PTR_W'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  assign rd_addr  = step ? ptr_next : ptr;

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (step) ptr <= ptr_next;
  end

  always_ff @(posedge clk) begin
    if (step) mem[ptr] <= din;
    dout <= mem[rd_addr];
  end

  initial assert (DEPTH >= 2) else $error("line_buffer: DEPTH must be at least 2");

endmodule
