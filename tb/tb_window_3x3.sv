// tb_window_3x3: self-checking test of window_3x3.
//
// Streams FRAMES random frames of a small image, with random gaps in
// in_valid, and checks for every emitted window: raster order, the border
// flag, and on interior centres all nine pixels against the frame held in
// the testbench. It also checks the timing: a window follows the step that
// completes it by one clock, in_ready is low for exactly IMG_W+1 clocks of
// flush at the end of each frame, and every frame yields IMG_W*IMG_H windows.
module tb_window_3x3;
  import img_pkg::*;
  localparam int unsigned IMG_W  = 6;
  localparam int unsigned IMG_H  = 5;
  localparam int unsigned NPIX   = IMG_W * IMG_H;
  localparam int unsigned FRAMES = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  pix_t in_pix = '0;
  logic win_valid, win_border;
  win_t win;

  int checks = 0, failures = 0;
  longint cycle = 0;
  pix_t img [FRAMES][NPIX];
  longint accept_cycle [FRAMES][NPIX];
  int n_out = 0;          // windows seen in total
  int flush_cycles = 0;   // cycles with in_ready low
  int n_border = 0, n_interior = 0;

  window_3x3 #(.IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (window %0d, cycle %0d)", what, n_out, cycle);
    end
  endtask

  // driver
  initial begin
    foreach (img[f, i]) img[f][i] = pix_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int i = 0; i < NPIX; i++) begin
        // frame 0 runs without gaps, the others with random gaps
        if (f != 0) begin
          in_valid <= 1'b0;
          repeat ($urandom_range(2)) @(posedge clk);
        end
        in_valid <= 1'b1;
        in_pix   <= img[f][i];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        accept_cycle[f][i] = cycle;
      end
      in_valid <= 1'b0;
    end
  end

  // flush length
  always @(posedge clk) if (rst_n && !in_ready) flush_cycles++;

  // monitor
  always @(posedge clk) begin
    if (rst_n && win_valid) begin
      automatic int f  = n_out / NPIX;
      automatic int c  = n_out % NPIX;
      automatic int cx = c % IMG_W;
      automatic int cy = c / IMG_W;
      automatic bit exp_border = (cx == 0) || (cx == IMG_W-1) || (cy == 0) || (cy == IMG_H-1);
      check(win_border == exp_border, "border flag");
      if (!exp_border) begin
        n_interior++;
        for (int r = 0; r < 3; r++)
          for (int k = 0; k < 3; k++)
            check(win[r][k] == img[f][(cy+r-1)*IMG_W + (cx+k-1)], $sformatf("pixel [%0d][%0d]", r, k));
      end else begin
        n_border++;
      end
      // timing: one clock after the step that completes the window
      if (c + IMG_W + 1 < NPIX)
        check(cycle == accept_cycle[f][c + IMG_W + 1] + 1, "latency after completing pixel");
      else
        check(cycle == accept_cycle[f][NPIX-1] + (c + IMG_W + 1 - NPIX + 1) + 1, "latency in flush");
      n_out++;
      if (n_out == FRAMES * NPIX) begin
        repeat (2) @(posedge clk);
        check(flush_cycles == FRAMES * (IMG_W + 1), $sformatf("flush cycles %0d", flush_cycles));
        check(n_border > 0 && n_interior > 0, "both border and interior windows seen");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d windows", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
