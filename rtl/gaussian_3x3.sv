// gaussian_3x3: pipelined 3x3 Gaussian smoothing of one window per clock.
//
// Kernel (1/16) * [1 2 1; 2 4 2; 1 2 1]. Its weights are powers of two, so
// the nine "multipliers" are left shifts and the division is a right shift;
// the result is rounded to nearest ((sum + 8) >> 4) and always fits 8 bits.
// The kernel is fully unrolled and each arithmetic operation has its own
// pipeline stage, in 16-bit fixed point, as the published design describes; the
// kernel weights and the rounding are this design's choice (the published design
// names a Gaussian kernel but not its coefficients).
//
// Stages: 1 weight the nine taps; 2 sum each row; 3 sum the rows;
// 4 round, shift and force zero on a border window.
//
// Interface: `in_valid` strobe with `in_win`/`in_border`; output strobe
// `out_valid` with `out_pix`. No back-pressure.
// Timing: fixed latency of LATENCY = 4 clocks, one window per clock.
module gaussian_3x3
  import img_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  win_t in_win,
  input  logic in_border,
  output logic out_valid,
  output pix_t out_pix
);

  localparam int unsigned LATENCY = 4;

  // log2 of the kernel weight at [row][col]
  function automatic int unsigned wshift(int unsigned r, int unsigned c);
    return ((r == 1) ? 1 : 0) + ((c == 1) ? 1 : 0);
  endfunction

  acc_t           prod   [3][3];
  acc_t           rowsum [3];
  acc_t           total;
  logic [LATENCY-1:0] vld;
  logic [2:0]     brd;     // border flag, stages 1..3

  always_ff @(posedge clk) begin
    // stage 1: weighting
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        prod[r][c] <= to_acc(in_win[r][c]) <<< wshift(r, c);
    // stage 2: row sums
    for (int r = 0; r < 3; r++)
      rowsum[r] <= prod[r][0] + prod[r][1] + prod[r][2];
    // stage 3: total
    total <= rowsum[0] + rowsum[1] + rowsum[2];
    // stage 4: normalise
    if (brd[2]) out_pix <= '0;
    else        out_pix <= pix_t'((total + acc_t'(8)) >>> 4);
    brd <= {brd[1:0], in_border};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

endmodule
