// dma_writer: DMA engine that writes the processed pixel stream to host
// memory.
//
// On `start` it latches a base address and a length in words; each valid
// input word is then written to the next consecutive address. The memory
// port accepts one write per clock, so the writer never stalls the pipeline.
// After `len` words it drops `busy` and pulses `done`. The published design states
// only that DMA moves the data; the always-accepting write port and the
// word-per-pixel addressing are this design's own.
//
// Interface: start/base/len control, busy level, done one-cycle pulse;
// in_valid/in_data strobe (no back-pressure); wr_en/wr_addr/wr_data.
// Timing: a word is written in the cycle after it arrives.
module dma_writer #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned LEN_W  = 32,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [LEN_W-1:0]  len,
  output logic              busy,
  output logic              done,
  // word stream in
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  // host memory write port
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] wr_data
);

  logic [LEN_W-1:0]  remaining;
  logic [ADDR_W-1:0] next_addr;
  logic              accept;

  assign accept = busy && in_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      remaining <= '0;
      next_addr <= '0;
      wr_en     <= 1'b0;
    end else begin
      done  <= 1'b0;
      wr_en <= accept;
      if (start && !busy) begin
        busy      <= (len != '0);
        done      <= (len == '0);
        remaining <= len;
        next_addr <= base;
      end else if (accept) begin
        next_addr <= next_addr + 1'b1;
        remaining <= remaining - 1'b1;
        if (remaining == LEN_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      wr_addr <= next_addr;
      wr_data <= in_data;
    end
  end

  // Every word the pipeline produces belongs to a programmed transfer.
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> busy)
    else $error("dma_writer: input word while idle");

endmodule
