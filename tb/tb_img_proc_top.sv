// tb_img_proc_top: end-to-end test of img_proc_top on a reduced frame size.
//
// The host memory model holds several test frames. Phase 1 processes two
// frames with a memory that answers every read in one clock and checks that
// the pipeline keeps one pixel per clock (IMG_W*IMG_H + IMG_W + 1 clocks
// per frame, the last term being the line flush). Phase 2 processes three
// frames with refused reads and random read latencies. After each run every
// output word {edge, smoothed} is compared with the integer reference model.
// The testbench also counts the mechanisms of the design and fails if one
// never happened: line flush in both window generators, border zeroing,
// edge clipping, read refusals, and reader stalls by the pipeline.
module tb_img_proc_top;
  import img_pkg::*;
  import img_ref_pkg::*;
  localparam int unsigned IMG_W = 16;
  localparam int unsigned IMG_H = 12;
  localparam int unsigned NPIX  = IMG_W * IMG_H;
  localparam int unsigned ADDR_W = 32;
  localparam logic [ADDR_W-1:0] SRC = 32'h0001_0000;
  localparam logic [ADDR_W-1:0] DST = 32'h0100_0000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [ADDR_W-1:0] src_base = '0, dst_base = '0;
  logic [15:0] num_frames = '0;
  logic busy, done;
  logic rd_req, rd_gnt, rd_rvalid;
  logic [ADDR_W-1:0] rd_addr, wr_addr;
  pix_t rd_rdata;
  logic wr_en;
  out_word_t wr_data;
  int unsigned stall_rate = 0, max_lat = 1;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_done = 0;
  // mechanism counters
  int n_flush_g = 0, n_flush_s = 0, n_rd_stall = 0, n_border = 0, n_clip = 0;

  img_proc_top #(.IMG_W(IMG_W), .IMG_H(IMG_H), .ADDR_W(ADDR_W)) dut (.*);

  host_mem_model #(.ADDR_W(ADDR_W), .RDATA_W(8), .WDATA_W(16)) u_mem (
    .clk, .stall_rate, .max_lat,
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .wr_en, .wr_addr, .wr_data
  );

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;

  always @(posedge clk) if (rst_n) begin
    if (done) n_done++;
    if (!dut.u_win_gauss.in_ready) n_flush_g++;
    if (!dut.u_win_sobel.in_ready) n_flush_s++;
    if (dut.in_valid && !dut.in_ready) n_rd_stall++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // Load `frames` test frames at SRC + first*NPIX, run them, compare.
  task automatic run(int first, int frames, output longint took);
    img_t src [], g, s;
    longint t0;
    int d0 = n_done;
    src = new[frames];
    for (int f = 0; f < frames; f++) begin
      src[f] = test_image(IMG_W, IMG_H, (f % 2) ? 255 : 40);
      for (int i = 0; i < NPIX; i++)
        u_mem.mem[SRC + (first + f) * NPIX + i] = 16'(src[f][i]);
    end
    @(posedge clk);
    src_base   <= SRC + first * NPIX;
    dst_base   <= DST + first * NPIX;
    num_frames <= 16'(frames);
    start      <= 1'b1;
    t0 = cycle;
    @(posedge clk);
    start <= 1'b0;
    while (n_done == d0) @(posedge clk);
    took = cycle - t0;
    repeat (2) @(posedge clk);
    check(!busy, "busy low after done");
    for (int f = 0; f < frames; f++) begin
      g = gauss(src[f], IMG_W, IMG_H);
      s = sobel(g, IMG_W, IMG_H, n_clip);
      for (int i = 0; i < NPIX; i++) begin
        logic [ADDR_W-1:0] a = DST + (first + f) * NPIX + i;
        out_word_t got = u_mem.mem.exists(a) ? u_mem.mem[a] : 16'hxxxx;
        if (g[i] == 0 && s[i] == 0) n_border++;
        check(u_mem.mem.exists(a), "word written");
        check(int'(got.smooth) == g[i], $sformatf("smoothed frame %0d pixel %0d: %0d vs %0d", f, i, got.smooth, g[i]));
        check(int'(got.grad) == s[i], $sformatf("edge frame %0d pixel %0d: %0d vs %0d", f, i, got.grad, s[i]));
      end
    end
  endtask

  initial begin
    longint took;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    // phase 1: memory at full speed
    run(0, 2, took);
    $display("2 frames of %0dx%0d in %0d clocks", IMG_W, IMG_H, took);
    check(took <= 2 * (NPIX + IMG_W + 1) + 2 * (IMG_W + 1) + 16, "one pixel per clock");
    // phase 2: slow, irregular memory
    stall_rate = 30;
    max_lat = 6;
    run(2, 3, took);
    $display("3 frames with stalls in %0d clocks", took);
    $display("flush clocks %0d/%0d, reader stalls %0d, refused reads %0d, border words %0d, clipped edges %0d",
             n_flush_g, n_flush_s, n_rd_stall, u_mem.reads_refused, n_border, n_clip);
    check(n_flush_g > 0, "Gaussian-window flush happened");
    check(n_flush_s > 0, "Sobel-window flush happened");
    check(n_rd_stall > 0, "reader stalled by the pipeline");
    check(u_mem.reads_refused > 0, "read refusals happened");
    check(n_border > 0, "border zeroing happened");
    check(n_clip > 0, "edge clipping happened");
    check(n_done == 2, "one done pulse per run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
