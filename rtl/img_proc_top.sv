// img_proc_top: real-time Gaussian + Sobel image-processing pipeline.
//
// Grayscale frames of IMG_W x IMG_H pixels are read from host memory by a
// DMA engine, smoothed by a 3x3 Gaussian filter to suppress noise, and then
// passed through a 3x3 Sobel edge detector. For every input pixel one
// 16-bit word {edge, smoothed} is written back to host memory by a second
// DMA engine, so the host receives both the smoothed and the edge image.
//
//   dma_reader -> window_3x3 -> gaussian_3x3 -> window_3x3 -> sobel_3x3
//              -> dma_writer
//
// Each window_3x3 holds two image rows in a block-RAM line buffer. The
// pipeline moves one pixel per clock; only the reader side can stall (the
// first window generator drops `in_ready` for IMG_W+1 clocks at the end of
// every frame to flush its last row). Downstream of it nothing stalls: the
// second window generator's flush always fits in the gap the first one
// leaves between frames, which an assertion checks.
// The chain Gaussian-then-Sobel, 3x3 kernels, line buffers in BRAM, DMA,
// 16-bit fixed point and the 640x480 frame follow the published design; the memory
// ports, the output word format and the control registers are this
// design's choices.
//
// Interface: pulse `start` with src_base, dst_base and num_frames; `busy`
// stays high until the last word is on the write port, and `done` pulses in
// the same clock as that last write. Host memory read port: rd_req/rd_addr
// held until rd_gnt, data returned in order on rd_rvalid/rd_rdata. Write
// port: wr_en/wr_addr/wr_data, one word per clock, always accepted. One
// address per pixel.
// Timing: one pixel per clock when the memory grants every cycle. The word
// for pixel n is on the write port 11 clocks after input pixel
// n + 2*(IMG_W+1) is accepted, i.e. 2*(IMG_W+1) + 11 clocks after pixel n
// itself at full rate. A single 640x480 frame takes 308,497 clocks from
// `start` to `done` (2.34 ms at 132 MHz); back-to-back frames cost
// IMG_W*IMG_H + IMG_W + 1 clocks each.
module img_proc_top
  import img_pkg::*;
#(
  parameter int unsigned IMG_W      = 640,
  parameter int unsigned IMG_H      = 480,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic [ADDR_W-1:0] src_base,
  input  logic [ADDR_W-1:0] dst_base,
  input  logic [15:0]       num_frames,
  output logic              busy,
  output logic              done,
  // host memory read port
  output logic              rd_req,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_gnt,
  input  logic              rd_rvalid,
  input  pix_t              rd_rdata,
  // host memory write port
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output out_word_t         wr_data
);

  localparam int unsigned LEN_W = 48;
  localparam int unsigned NPIX  = IMG_W * IMG_H;

  logic [LEN_W-1:0] len;
  logic             rd_busy, rd_done, wr_busy;

  // raw pixel stream
  logic in_valid, in_ready;
  pix_t in_pix;
  // Gaussian stage
  logic g_win_valid, g_win_border;
  win_t g_win;
  logic g_valid;
  pix_t g_pix;
  // Sobel stage
  logic s_win_valid, s_win_border, s_in_ready;
  win_t s_win;
  logic s_valid;
  pix_t s_edge, s_center;

  assign len  = LEN_W'(num_frames) * LEN_W'(NPIX);
  assign busy = rd_busy || wr_busy;

  dma_reader #(
    .ADDR_W(ADDR_W), .LEN_W(LEN_W), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_dma_rd (
    .clk, .rst_n,
    .start, .base(src_base), .len, .busy(rd_busy), .done(rd_done),
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .out_valid(in_valid), .out_ready(in_ready), .out_data(in_pix)
  );

  window_3x3 #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_win_gauss (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_pix,
    .win_valid(g_win_valid), .win(g_win), .win_border(g_win_border)
  );

  gaussian_3x3 u_gauss (
    .clk, .rst_n,
    .in_valid(g_win_valid), .in_win(g_win), .in_border(g_win_border),
    .out_valid(g_valid), .out_pix(g_pix)
  );

  window_3x3 #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_win_sobel (
    .clk, .rst_n,
    .in_valid(g_valid), .in_ready(s_in_ready), .in_pix(g_pix),
    .win_valid(s_win_valid), .win(s_win), .win_border(s_win_border)
  );

  sobel_3x3 u_sobel (
    .clk, .rst_n,
    .in_valid(s_win_valid), .in_win(s_win), .in_border(s_win_border),
    .out_valid(s_valid), .out_edge(s_edge), .out_center(s_center)
  );

  dma_writer #(
    .ADDR_W(ADDR_W), .LEN_W(LEN_W), .DATA_W($bits(out_word_t))
  ) u_dma_wr (
    .clk, .rst_n,
    .start, .base(dst_base), .len, .busy(wr_busy), .done,
    .in_valid(s_valid), .in_data({s_edge, s_center}),
    .wr_en, .wr_addr, .wr_data
  );

  // The Gaussian output cannot be held back, so the Sobel window generator
  // must be ready whenever a smoothed pixel arrives.
  assert property (@(posedge clk) disable iff (!rst_n) g_valid |-> s_in_ready)
    else $error("img_proc_top: smoothed pixel lost during Sobel flush");

endmodule
