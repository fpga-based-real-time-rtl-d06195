// sobel_3x3: pipelined 3x3 Sobel edge detector, one window per clock.
//
// Horizontal mask Gx = [-1 0 1; -2 0 2; -1 0 1] and vertical mask
// Gy = [-1 -2 -1; 0 0 0; 1 2 1] are applied to the window; the edge strength
// is |Gx| + |Gy| clipped to 255. The factor-2 weights are shifts. The
// window's centre pixel is delayed alongside and output too, so the
// smoothed image leaves the pipeline aligned with its edge map.
// The two masks and the fully unrolled, one-operation-per-stage pipeline in
// 16-bit fixed point follow the published design; the |Gx|+|Gy| magnitude, the
// clipping and the zero output on border windows are this design's choice.
//
// Stages: 1 weighted sums of the left/right columns and top/bottom rows;
// 2 Gx and Gy; 3 absolute values; 4 magnitude, clip, zero on border.
//
// Interface: `in_valid` strobe with `in_win`/`in_border`; output strobe
// `out_valid` with `out_edge` and `out_center`. No back-pressure.
// Timing: fixed latency of LATENCY = 4 clocks, one window per clock.
module sobel_3x3
  import img_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  win_t in_win,
  input  logic in_border,
  output logic out_valid,
  output pix_t out_edge,
  output pix_t out_center
);

  localparam int unsigned LATENCY = 4;

  // weighted sum of three taps with weights 1, 2, 1
  function automatic acc_t sum121(pix_t a, pix_t b, pix_t c);
    return to_acc(a) + (to_acc(b) <<< 1) + to_acc(c);
  endfunction

  acc_t col_l, col_r, row_t, row_b;
  acc_t gx, gy;
  acc_t ax, ay;
  acc_t mag;
  pix_t center [LATENCY-1];
  logic [2:0] brd;
  logic [LATENCY-1:0] vld;

  assign mag = ax + ay;

  always_ff @(posedge clk) begin
    // stage 1
    col_l <= sum121(in_win[0][0], in_win[1][0], in_win[2][0]);
    col_r <= sum121(in_win[0][2], in_win[1][2], in_win[2][2]);
    row_t <= sum121(in_win[0][0], in_win[0][1], in_win[0][2]);
    row_b <= sum121(in_win[2][0], in_win[2][1], in_win[2][2]);
    // stage 2
    gx <= col_r - col_l;
    gy <= row_b - row_t;
    // stage 3
    ax <= (gx < 0) ? -gx : gx;
    ay <= (gy < 0) ? -gy : gy;
    // stage 4
    if (brd[2])                      out_edge <= '0;
    else if (mag > acc_t'(PIX_MAX))  out_edge <= pix_t'(PIX_MAX);
    else                             out_edge <= pix_t'(mag);
    // centre pixel delay line
    center[0] <= in_win[1][1];
    for (int i = 1; i < LATENCY - 1; i++) center[i] <= center[i-1];
    out_center <= center[LATENCY-2];
    brd <= {brd[1:0], in_border};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

endmodule
