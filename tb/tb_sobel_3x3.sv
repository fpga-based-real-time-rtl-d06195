// tb_sobel_3x3: self-checking test of sobel_3x3.
//
// Feeds random 3x3 windows with random gaps; some are step edges strong
// enough to clip, some carry the border flag. Each result is checked
// against |Gx| + |Gy| clipped to 255 (zero on border), with
// Gx = [-1 0 1; -2 0 2; -1 0 1] and Gy = [-1 -2 -1; 0 0 0; 1 2 1] computed
// here from the mask tables, and the centre pixel must come out unchanged,
// both exactly 4 clocks after the window.
module tb_sobel_3x3;
  import img_pkg::*;
  localparam int unsigned N = 2000;
  localparam int unsigned LAT = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  win_t in_win = '0;
  logic in_border = 1'b0;
  logic out_valid;
  pix_t out_edge, out_center;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int exp_q [$], ctr_q [$];
  longint t_q [$];
  int n_out = 0, n_clipped = 0;

  sobel_3x3 dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;  // stable at every rising edge

  function automatic int ref_sobel(win_t w, bit border, ref int clipped);
    int mx [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    int my [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
    int gx = 0, gy = 0, m;
    if (border) return 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        gx += mx[r][c] * int'(w[r][c]);
        gy += my[r][c] * int'(w[r][c]);
      end
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    if (m > 255) begin
      clipped++;
      m = 255;
    end
    return m;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      win_t w;
      bit b;
      foreach (w[r, c]) w[r][c] = pix_t'($urandom_range(i % 2 ? 255 : 40));
      if (i % 11 == 5) foreach (w[r, c]) w[r][c] = (c == 0) ? 8'd0 : 8'd200;
      if (i % 13 == 6) foreach (w[r, c]) w[r][c] = (r == 2) ? 8'd90 : 8'd10;
      b = ($urandom_range(9) == 0);
      in_valid  <= 1'b1;
      in_win    <= w;
      in_border <= b;
      exp_q.push_back(ref_sobel(w, b, n_clipped));
      ctr_q.push_back(int'(w[1][1]));
      t_q.push_back(cycle);
      @(posedge clk);
      if ($urandom_range(3) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks += 2;
    if (n_out != N) begin
      failures++;
      $display("FAIL %0d outputs for %0d inputs", n_out, N);
    end
    if (n_clipped == 0) begin
      failures++;
      $display("FAIL clipping never exercised");
    end
    $display("clipped magnitudes: %0d", n_clipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e, ce;
      longint t;
      checks += 3;
      if (exp_q.size() == 0) begin
        failures += 3;
        $display("FAIL unexpected output");
      end else begin
        e  = exp_q.pop_front();
        ce = ctr_q.pop_front();
        t  = t_q.pop_front();
        if (int'(out_edge) != e) begin
          failures++;
          $display("FAIL edge %0d: got %0d expected %0d", n_out, out_edge, e);
        end
        if (int'(out_center) != ce) begin
          failures++;
          $display("FAIL centre %0d: got %0d expected %0d", n_out, out_center, ce);
        end
        if (cycle != t + LAT + 1) begin  // +1: sampled at the edge after the one that launched it
          failures++;
          $display("FAIL latency %0d", cycle - t);
        end
      end
      n_out++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
