// tb_line_buffer: self-checking test of line_buffer.
//
// Steps a small line buffer with random gaps between steps and checks that
// the word presented before each step is the one written DEPTH steps
// earlier (the first DEPTH steps only fill it). A reference queue holds the
// written words.
module tb_line_buffer;
  localparam int unsigned DEPTH  = 7;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned STEPS  = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step = 1'b0;
  logic [DATA_W-1:0] din = '0;
  logic [DATA_W-1:0] dout;
  int checks = 0, failures = 0;
  logic [DATA_W-1:0] hist [$];

  line_buffer #(.DEPTH(DEPTH), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < STEPS; i++) begin
      // random idle cycles
      repeat ($urandom_range(2)) begin
        step <= 1'b0;
        @(posedge clk);
      end
      #1;
      if (i >= DEPTH) begin
        checks++;
        if (dout !== hist[i - DEPTH]) begin
          failures++;
          $display("FAIL step %0d: dout=%h expected %h", i, dout, hist[i - DEPTH]);
        end
      end
      din  = DATA_W'($urandom);
      step = 1'b1;
      hist.push_back(din);
      @(posedge clk);
    end
    step <= 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
