// window_3x3: sliding 3x3 neighbourhood generator for a raster pixel stream.
//
// The image arrives one pixel per accepted beat, row by row, IMG_W x IMG_H
// pixels per frame. A line_buffer of IMG_W words, each word holding two
// pixels, keeps the two previous rows: at every step it returns the pixels
// one and two rows above the incoming one, and is rewritten with the pixel
// one row above plus the incoming pixel. These three pixels form the right
// column of the window; two more register columns hold the older columns.
//
// The window centre lags the input by one row and one pixel (IMG_W+1 steps).
// To emit a window for every pixel of the frame, including the last row, the
// generator appends IMG_W+1 flush steps of zero pixels after the last input
// pixel of each frame; `in_ready` is low during the flush. So every frame of
// IMG_W*IMG_H input pixels gives exactly IMG_W*IMG_H windows, in raster order.
// `win_border` marks a centre on the outermost row or column, where the 3x3
// neighbourhood leaves the image; the window contents are then meaningless
// and the kernels output zero (the boundary truncation the published design notes).
// Line buffers in block RAM follow the published design; the flush, the border
// flag and the handshake are this design's choices.
//
// Interface: valid/ready input; output `win_valid` is a one-cycle strobe with
// `win` and `win_border`, no back-pressure on the output.
// Timing: a window is produced in the cycle after the step that completes
// it; throughput is one window per accepted pixel, flush steps run at one per
// clock.
module window_3x3
  import img_pkg::*;
#(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned IMG_H = 480
) (
  input  logic clk,
  input  logic rst_n,
  // pixel stream in
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_pix,
  // window out
  output logic win_valid,
  output win_t win,
  output logic win_border
);

  localparam int unsigned NPIX  = IMG_W * IMG_H;
  localparam int unsigned LAG   = IMG_W + 1;
  localparam int unsigned TOTAL = NPIX + LAG;
  localparam int unsigned K_W   = $clog2(TOTAL + 1);
  localparam int unsigned X_W   = $clog2(IMG_W + 1);
  localparam int unsigned Y_W   = $clog2(IMG_H + 1);

  logic [K_W-1:0] k;        // step index within the frame, flush included
  logic [X_W-1:0] cx;       // column of the next window centre
  logic [Y_W-1:0] cy;       // row of the next window centre
  logic           real_px;  // current step consumes an input pixel
  logic           step;
  logic           emit;     // current step completes a window
  pix_t           pix;
  logic [2*PIX_W-1:0] lb_dout;
  pix_t           tap_top, tap_mid;

  assign real_px  = (k < K_W'(NPIX));
  assign in_ready = real_px;
  assign step     = real_px ? in_valid : 1'b1;
  assign emit     = step && (k >= K_W'(LAG));
  assign pix      = real_px ? in_pix : '0;

  line_buffer #(.DEPTH(IMG_W), .DATA_W(2*PIX_W)) u_rows (
    .clk  (clk),
    .rst_n(rst_n),
    .step (step),
    .din  ({tap_mid, pix}),
    .dout (lb_dout)
  );
  assign {tap_top, tap_mid} = lb_dout;

  // Step counter and centre coordinates.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k  <= '0;
      cx <= '0;
      cy <= '0;
    end else if (step) begin
      k <= (k == K_W'(TOTAL - 1)) ? '0 : k + 1'b1;
      if (emit) begin
        if (cx == X_W'(IMG_W - 1)) begin
          cx <= '0;
          cy <= (cy == Y_W'(IMG_H - 1)) ? '0 : cy + 1'b1;
        end else begin
          cx <= cx + 1'b1;
        end
      end
    end
  end

  // Window shift register: column 2 is the newest.
  always_ff @(posedge clk) begin
    if (step) begin
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= tap_top;
      win[1][2] <= tap_mid;
      win[2][2] <= pix;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win_valid  <= 1'b0;
      win_border <= 1'b0;
    end else begin
      win_valid <= emit;
      if (emit)
        win_border <= (cx == '0) || (cx == X_W'(IMG_W - 1)) ||
                      (cy == '0) || (cy == Y_W'(IMG_H - 1));
    end
  end

endmodule
