// tb_video_stream: a short 640x480 video through img_proc_top at its
// default parameters.
//
// FRAMES frames of a moving test picture (a bright rectangle that shifts
// from frame to frame, with noise) are processed in one transfer, back to
// back, with the host memory answering every read in one clock. Every
// output word of every frame is compared with the integer reference model.
// The testbench timestamps the last write of each frame and checks that the
// steady-state frame period is exactly IMG_W*IMG_H + IMG_W + 1 clocks (one
// pixel per clock plus one line flush), and that this period sustains
// 60 frames/s at a 132 MHz clock.
module tb_video_stream;
  import img_pkg::*;
  import img_ref_pkg::*;
  localparam int unsigned IMG_W  = 640;
  localparam int unsigned IMG_H  = 480;
  localparam int unsigned NPIX   = IMG_W * IMG_H;
  localparam int unsigned FRAMES = 3;
  localparam logic [31:0] SRC = 32'h0100_0000;
  localparam logic [31:0] DST = 32'h0400_0000;
  localparam real CLK_MHZ = 132.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [31:0] src_base = SRC, dst_base = DST;
  logic [15:0] num_frames = 16'(FRAMES);
  logic busy, done;
  logic rd_req, rd_gnt, rd_rvalid;
  logic [31:0] rd_addr, wr_addr;
  pix_t rd_rdata;
  logic wr_en;
  out_word_t wr_data;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_clip = 0;
  longint frame_end [FRAMES];
  int n_writes = 0;

  img_proc_top dut (.*);

  host_mem_model #(.ADDR_W(32), .RDATA_W(8), .WDATA_W(16)) u_mem (
    .clk, .stall_rate(0), .max_lat(1),
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .wr_en, .wr_addr, .wr_data
  );

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;

  // timestamp the last word of each frame
  always @(posedge clk) if (rst_n && wr_en) begin
    n_writes++;
    if (n_writes % NPIX == 0 && n_writes / NPIX <= FRAMES)
      frame_end[n_writes / NPIX - 1] = cycle;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // frame f: the rectangle moves 8 pixels right and 4 down per frame
  function automatic img_t frame_image(int f);
    img_t im = new[NPIX];
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        int v = (x > 100 + 8*f && x < 300 + 8*f && y > 80 + 4*f && y < 240 + 4*f) ? 210 : 25;
        v += $urandom_range(40);
        im[y*IMG_W + x] = v;
      end
    return im;
  endfunction

  initial begin
    img_t src [FRAMES];
    img_t g, s;
    out_word_t got;
    longint period;
    for (int f = 0; f < FRAMES; f++) begin
      src[f] = frame_image(f);
      for (int i = 0; i < NPIX; i++) u_mem.mem[SRC + f*NPIX + i] = 16'(src[f][i]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int f = 1; f < FRAMES; f++) begin
      period = frame_end[f] - frame_end[f-1];
      $display("frame %0d period %0d clocks = %0.1f frames/s at %0.0f MHz",
               f, period, CLK_MHZ * 1.0e6 / real'(period), CLK_MHZ);
      check(period == NPIX + IMG_W + 1, "steady frame period");
      check(CLK_MHZ * 1.0e6 / real'(period) >= 60.0, "60 frames per second");
    end
    for (int f = 0; f < FRAMES; f++) begin
      g = gauss(src[f], IMG_W, IMG_H);
      s = sobel(g, IMG_W, IMG_H, n_clip);
      for (int i = 0; i < NPIX; i++) begin
        got = u_mem.mem.exists(DST + f*NPIX + i) ? u_mem.mem[DST + f*NPIX + i] : '0;
        check(u_mem.mem.exists(DST + f*NPIX + i) && int'(got.smooth) == g[i] && int'(got.grad) == s[i],
              $sformatf("frame %0d pixel %0d", f, i));
      end
    end
    check(n_writes == FRAMES * NPIX, "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * (NPIX + 2000) + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
