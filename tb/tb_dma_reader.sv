// tb_dma_reader: self-checking test of dma_reader against host_mem_model.
//
// Phase 1: a transfer with a memory that grants every request with a
// one-clock latency and a sink that is always ready must deliver one pixel
// per clock. Phase 2: random grant refusals, random read latencies and a
// sink that drops ready at random; the FIFO must never overflow and every
// pixel must arrive in order, and granted-but-undelivered reads must never
// exceed the FIFO depth. Phase 3: a zero-length transfer pulses done
// at once. Each pixel is compared with the memory contents, and done must
// pulse exactly once per transfer, with busy low afterwards.
module tb_dma_reader;
  import img_pkg::*;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned LEN_W  = 32;
  localparam int unsigned FIFO_DEPTH = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [ADDR_W-1:0] base = '0;
  logic [LEN_W-1:0]  len = '0;
  logic busy, done;
  logic rd_req, rd_gnt, rd_rvalid;
  logic [ADDR_W-1:0] rd_addr;
  pix_t rd_rdata;
  logic out_valid, out_ready;
  pix_t out_data;
  int unsigned stall_rate = 0, max_lat = 1, ready_rate = 100;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_recv = 0, n_done = 0, n_backpressure = 0;
  logic [ADDR_W-1:0] exp_addr;

  dma_reader #(.ADDR_W(ADDR_W), .LEN_W(LEN_W), .FIFO_DEPTH(FIFO_DEPTH)) dut (.*);

  host_mem_model #(.ADDR_W(ADDR_W), .RDATA_W(8), .WDATA_W(16)) u_mem (
    .clk, .stall_rate, .max_lat,
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .wr_en(1'b0), .wr_addr('0), .wr_data('0)
  );

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // random sink
  always @(posedge clk) out_ready <= ($urandom_range(99) < ready_rate);

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      check(out_data == u_mem.peek(exp_addr), $sformatf("data of address %0h", exp_addr));
      exp_addr <= exp_addr + 1'b1;
      n_recv++;
    end
    if (rst_n && out_valid && !out_ready) n_backpressure++;
    if (rst_n && done) n_done++;
  end

  // Port-level credit rule: reads granted but not yet delivered on the
  // stream never exceed the FIFO depth.
  int outstanding = 0;
  always @(posedge clk) if (rst_n) begin
    outstanding = outstanding + int'(rd_req && rd_gnt) - int'(out_valid && out_ready);
    if (outstanding > FIFO_DEPTH) check(1'b0, $sformatf("%0d reads outstanding", outstanding));
  end

  task automatic transfer(logic [ADDR_W-1:0] b, int unsigned n, output longint took);
    longint t0;
    int r0 = n_recv, d0 = n_done;
    @(posedge clk);
    base <= b;
    len <= n;
    start <= 1'b1;
    exp_addr <= b;
    t0 = cycle;
    @(posedge clk);
    start <= 1'b0;
    while (n_done == d0) @(posedge clk);
    took = cycle - t0;
    repeat (3) @(posedge clk);
    check(n_recv - r0 == n, $sformatf("received %0d of %0d", n_recv - r0, n));
    check(n_done - d0 == 1, "one done pulse");
    check(!busy, "busy low after done");
  endtask

  initial begin
    longint took;
    // memory contents: pattern distinct from the model's default
    for (int a = 0; a < 600; a++) u_mem.mem[32'h1000 + a] = 16'(a * 7 + 3);
    out_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // phase 1: full rate
    transfer(32'h1000, 200, took);
    $display("200 pixels in %0d clocks", took);
    // start-to-done overhead is a fixed 6 clocks: start, request, read
    // latency, FIFO, last pop, done register
    check(took <= 200 + 6, "one pixel per clock");
    // phase 2: stalls everywhere
    stall_rate = 30; max_lat = 5; ready_rate = 60;
    transfer(32'h1100, 400, took);
    check(n_backpressure > 0, "sink back-pressure exercised");
    check(u_mem.reads_refused > 0, "refused reads exercised");
    // phase 3: empty transfer
    transfer(32'h2000, 0, took);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
