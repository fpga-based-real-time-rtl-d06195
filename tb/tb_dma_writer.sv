// tb_dma_writer: self-checking test of dma_writer.
//
// Two transfers of random words arriving with random gaps: every word must
// be written, one clock after it arrives, to the next consecutive address
// from the programmed base; done must pulse once after the last word and
// busy must then be low. A zero-length transfer pulses done at once.
module tb_dma_writer;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned LEN_W  = 32;
  localparam int unsigned DATA_W = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [ADDR_W-1:0] base = '0;
  logic [LEN_W-1:0]  len = '0;
  logic busy, done;
  logic in_valid = 1'b0;
  logic [DATA_W-1:0] in_data = '0;
  logic wr_en;
  logic [ADDR_W-1:0] wr_addr;
  logic [DATA_W-1:0] wr_data;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_done = 0;
  logic [DATA_W-1:0] exp_data [$];
  logic [ADDR_W-1:0] exp_addr [$];
  longint exp_t [$];

  dma_writer #(.ADDR_W(ADDR_W), .LEN_W(LEN_W), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && wr_en) begin
      if (exp_data.size() == 0) check(1'b0, "unexpected write");
      else begin
        check(wr_data == exp_data.pop_front(), "write data");
        check(wr_addr == exp_addr.pop_front(), "write address");
        check(cycle == exp_t.pop_front() + 2, "write one clock after arrival");
      end
    end
    if (rst_n && done) n_done++;
  end

  task automatic transfer(logic [ADDR_W-1:0] b, int unsigned n);
    int d0 = n_done;
    @(posedge clk);
    base <= b;
    len <= n;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    for (int i = 0; i < n; i++) begin
      logic [DATA_W-1:0] d = DATA_W'($urandom);
      in_valid <= 1'b1;
      in_data  <= d;
      exp_data.push_back(d);
      exp_addr.push_back(b + i);
      exp_t.push_back(cycle);
      @(posedge clk);
      if ($urandom_range(2) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    check(exp_data.size() == 0, "all words written");
    check(n_done - d0 == 1, "one done pulse");
    check(!busy, "busy low after done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    transfer(32'h0000_4000, 300);
    transfer(32'h8000_0010, 77);
    transfer(32'h0000_0100, 0);
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
