// dma_reader: DMA engine that streams a block of pixels out of host memory.
//
// On `start` it latches a base address and a length in pixels, then issues
// one read request per clock to consecutive addresses (one pixel per
// address) for as long as its output FIFO has room for the answer. Read data
// comes back in order, with any latency, and is queued in a FIFO of
// FIFO_DEPTH entries that feeds a valid/ready pixel stream. Requests are
// limited by credit: requests granted but not yet popped from the FIFO never
// exceed FIFO_DEPTH, so read data can never overflow the FIFO even while the
// pipeline holds `out_ready` low. The published design states only that DMA moves
// the image data; the request/grant memory port, the word-per-pixel
// addressing and the credit scheme are this design's own.
//
// Interface: start/base/len control, busy level, done one-cycle pulse.
// Memory: rd_req/rd_addr held until rd_gnt; rd_rvalid/rd_rdata return data
// in request order. Stream: out_valid/out_ready/out_data.
// Timing: with a memory that grants every cycle and a ready sink, one pixel
// per clock after the memory's read latency plus one FIFO cycle.
module dma_reader
  import img_pkg::*;
#(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LEN_W      = 32,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [LEN_W-1:0]  len,
  output logic              busy,
  output logic              done,
  // host memory read port
  output logic              rd_req,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_gnt,
  input  logic              rd_rvalid,
  input  pix_t              rd_rdata,
  // pixel stream out
  output logic              out_valid,
  input  logic              out_ready,
  output pix_t              out_data
);

  localparam int unsigned CNT_W = $clog2(FIFO_DEPTH + 1);
  localparam int unsigned PTR_W = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;

  logic [LEN_W-1:0] to_issue;   // requests still to be granted
  logic [LEN_W-1:0] to_pop;     // pixels still to be delivered
  logic [CNT_W-1:0] credit_used;
  logic [CNT_W-1:0] fifo_cnt;
  logic [PTR_W-1:0] wp, rp;
  pix_t             fifo [FIFO_DEPTH];
  logic             issue, push, pop;

  assign rd_req    = busy && (to_issue != '0) && (credit_used < CNT_W'(FIFO_DEPTH));
  assign issue     = rd_req && rd_gnt;
  assign push      = rd_rvalid;
  assign out_valid = (fifo_cnt != '0);
  assign out_data  = fifo[rp];
  assign pop       = out_valid && out_ready;

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(FIFO_DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      to_issue    <= '0;
      to_pop      <= '0;
      rd_addr     <= '0;
      credit_used <= '0;
      fifo_cnt    <= '0;
      wp          <= '0;
      rp          <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= (len != '0);
        done     <= (len == '0);
        to_issue <= len;
        to_pop   <= len;
        rd_addr  <= base;
      end else begin
        if (issue) begin
          to_issue <= to_issue - 1'b1;
          rd_addr  <= rd_addr + 1'b1;
        end
        if (pop) begin
          to_pop <= to_pop - 1'b1;
          if (to_pop == LEN_W'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
      credit_used <= credit_used + CNT_W'(issue) - CNT_W'(pop);
      fifo_cnt    <= fifo_cnt + CNT_W'(push) - CNT_W'(pop);
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
    end
  end

  always_ff @(posedge clk) begin
    if (push) fifo[wp] <= rd_rdata;
  end

  // Read data must only return for a request that holds a credit.
  assert property (@(posedge clk) disable iff (!rst_n)
                   push |-> (fifo_cnt < CNT_W'(FIFO_DEPTH)))
    else $error("dma_reader: read data with a full FIFO");

endmodule
