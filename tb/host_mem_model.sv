// host_mem_model: behavioural model of the host PC's frame memory, as seen
// through the FPGA's memory ports. Not synthesizable logic: testbench only.
//
// Read port: a request is granted in a given cycle unless `stall_rate`
// (percent) picks a random refusal; granted reads return their data in
// order after a random latency of 1 to `max_lat` clocks. Write port: always
// accepts one word per clock. The memory is a sparse associative array, so
// any address range can be used; unwritten words read as their address'
// low byte. Testbenches fill and inspect it through `mem`.
module host_mem_model #(
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned RDATA_W = 8,
  parameter int unsigned WDATA_W = 16
) (
  input  logic               clk,
  input  int unsigned        stall_rate,  // percent of refused read requests
  input  int unsigned        max_lat,     // read latency is 1 .. max_lat clocks
  input  logic               rd_req,
  input  logic [ADDR_W-1:0]  rd_addr,
  output logic               rd_gnt,
  output logic               rd_rvalid,
  output logic [RDATA_W-1:0] rd_rdata,
  input  logic               wr_en,
  input  logic [ADDR_W-1:0]  wr_addr,
  input  logic [WDATA_W-1:0] wr_data
);

  logic [WDATA_W-1:0] mem [logic [ADDR_W-1:0]];
  int unsigned        reads_granted = 0;
  int unsigned        reads_refused = 0;

  typedef struct {
    longint unsigned    due;
    logic [RDATA_W-1:0] data;
  } rsp_t;
  rsp_t            pending [$];
  longint unsigned now = 0;
  longint unsigned last_due = 0;

  function automatic logic [RDATA_W-1:0] peek(logic [ADDR_W-1:0] a);
    return mem.exists(a) ? mem[a][RDATA_W-1:0] : a[RDATA_W-1:0];
  endfunction

  logic grant_ok = 1'b1;   // this cycle's random grant decision
  always @(posedge clk) grant_ok <= ($urandom_range(99) >= stall_rate);
  assign rd_gnt = rd_req && grant_ok;

  always @(posedge clk) begin
    rsp_t r;
    now++;
    rd_rvalid <= 1'b0;
    if (pending.size() != 0 && pending[0].due <= now) begin
      r = pending.pop_front();
      rd_rvalid <= 1'b1;
      rd_rdata  <= r.data;
    end
    if (rd_req && rd_gnt) begin
      reads_granted++;
      r.due  = now + longint'($urandom_range(max_lat, 1));
      if (r.due <= last_due) r.due = last_due + 1;
      last_due = r.due;
      r.data = peek(rd_addr);
      pending.push_back(r);
    end else if (rd_req) begin
      reads_refused++;
    end
    if (wr_en) mem[wr_addr] = wr_data;
  end

  initial begin
    rd_rvalid = 1'b0;
    rd_rdata  = '0;
  end

endmodule
