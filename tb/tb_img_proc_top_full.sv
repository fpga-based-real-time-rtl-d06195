// tb_img_proc_top_full: one full 640x480 frame through img_proc_top at its
// default parameters.
//
// The frame is read from the host memory model at full speed (every read
// granted, one-clock latency). All 307,200 output words are compared with
// the integer reference model, and the clock count is checked against the
// one-pixel-per-clock schedule: IMG_W*IMG_H pixels plus IMG_W+1 flush clocks
// in each of the two window generators, plus a fixed pipeline fill. The
// frame rate this gives at a 132 MHz clock is printed and must reach 60
// frames per second.
module tb_img_proc_top_full;
  import img_pkg::*;
  import img_ref_pkg::*;
  localparam int unsigned IMG_W = 640;
  localparam int unsigned IMG_H = 480;
  localparam int unsigned NPIX  = IMG_W * IMG_H;
  localparam logic [31:0] SRC = 32'h0010_0000;
  localparam logic [31:0] DST = 32'h0080_0000;
  localparam real CLK_MHZ = 132.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [31:0] src_base = SRC, dst_base = DST;
  logic [15:0] num_frames = 16'd1;
  logic busy, done;
  logic rd_req, rd_gnt, rd_rvalid;
  logic [31:0] rd_addr, wr_addr;
  pix_t rd_rdata;
  logic wr_en;
  out_word_t wr_data;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_clip = 0;

  img_proc_top dut (.*);

  host_mem_model #(.ADDR_W(32), .RDATA_W(8), .WDATA_W(16)) u_mem (
    .clk, .stall_rate(0), .max_lat(1),
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .wr_en, .wr_addr, .wr_data
  );

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    img_t src, g, s;
    longint t0, took;
    real fps;
    out_word_t got;
    src = test_image(IMG_W, IMG_H, 60);
    for (int i = 0; i < NPIX; i++) u_mem.mem[SRC + i] = 16'(src[i]);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    start <= 1'b1;
    t0 = cycle;
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    took = cycle - t0;
    repeat (2) @(posedge clk);  // done comes with the last write
    fps = CLK_MHZ * 1.0e6 / real'(took);
    $display("one %0dx%0d frame in %0d clocks: %0.1f frames/s at %0.0f MHz",
             IMG_W, IMG_H, took, fps, CLK_MHZ);
    check(took <= NPIX + 2 * (IMG_W + 1) + 16, "one pixel per clock");
    check(fps >= 60.0, "60 frames per second at 132 MHz");
    g = gauss(src, IMG_W, IMG_H);
    s = sobel(g, IMG_W, IMG_H, n_clip);
    for (int i = 0; i < NPIX; i++) begin
      got = u_mem.mem.exists(DST + i) ? u_mem.mem[DST + i] : '0;
      check(u_mem.mem.exists(DST + i) && int'(got.smooth) == g[i] && int'(got.grad) == s[i],
            $sformatf("pixel %0d: %0d/%0d vs %0d/%0d", i, got.smooth, got.grad, g[i], s[i]));
    end
    check(n_clip > 0, "edge clipping happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
