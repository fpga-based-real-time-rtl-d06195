// tb_gaussian_3x3: self-checking test of gaussian_3x3.
//
// Feeds random 3x3 windows (some with the border flag, some all-255 to hit
// the largest sum) with random gaps, and checks each result against
// round((sum of w[r][c] * p[r][c]) / 16) with weights 1-2-1 / 2-4-2 / 1-2-1,
// computed here with integer arithmetic, and against zero for border
// windows. The result must appear exactly 4 clocks after its window.
module tb_gaussian_3x3;
  import img_pkg::*;
  localparam int unsigned N = 2000;
  localparam int unsigned LAT = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  win_t in_win = '0;
  logic in_border = 1'b0;
  logic out_valid;
  pix_t out_pix;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int exp_q [$];
  longint t_q [$];
  int n_in = 0, n_out = 0;

  gaussian_3x3 dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;  // stable at every rising edge

  function automatic int ref_gauss(win_t w, bit border);
    int s = 0;
    int wt [3][3] = '{'{1, 2, 1}, '{2, 4, 2}, '{1, 2, 1}};
    if (border) return 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        s += wt[r][c] * int'(w[r][c]);
    return (s + 8) / 16;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      win_t w;
      bit b;
      foreach (w[r, c]) w[r][c] = pix_t'($urandom);
      if (i % 7 == 3) w = '1;
      b = ($urandom_range(9) == 0);
      in_valid  <= 1'b1;
      in_win    <= w;
      in_border <= b;
      exp_q.push_back(ref_gauss(w, b));
      t_q.push_back(cycle);
      @(posedge clk);
      n_in++;
      if ($urandom_range(3) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != N) begin
      failures++;
      $display("FAIL %0d outputs for %0d inputs", n_out, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e;
      longint t;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (int'(out_pix) != e) begin
          failures++;
          $display("FAIL result %0d: got %0d expected %0d", n_out, out_pix, e);
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
