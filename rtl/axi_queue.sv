// axi_queue: AXI-Queue of the master-side network interface.
//
// Accepts the AXI write-address (AW), write-data (W) and read-address (AR)
// channels of the master core. Write requests go into the write request
// buffer, read requests into the read request buffer, and write data beats into
// a write data buffer. A round-robin arbiter picks the next request message
// between the heads of the two request buffers and presents it on req_*; the
// NI only takes it (req_ready) once the reorder unit has admitted it. The data
// beats of a write are read by the packetizer from wd_* after its header.
//
// Channels use the AXI valid/ready rule. Buffer depths are this design's
// choice (the document gives none). Writes stay in order among themselves, as
// AXI requires W beats to follow AW order.
module axi_queue
  import ni_pkg::*;
#(
  parameter int REQ_DEPTH = 4,
  parameter int WD_DEPTH  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI slave port (from master core)
  input  logic              aw_valid,
  output logic              aw_ready,
  input  logic [TID_W-1:0]  aw_id,
  input  logic [ADDR_W-1:0] aw_addr,
  input  logic [LEN_W-1:0]  aw_len,
  input  logic              w_valid,
  output logic              w_ready,
  input  logic [FLIT_W-1:0] w_data,
  input  logic              w_last,
  input  logic              ar_valid,
  output logic              ar_ready,
  input  logic [TID_W-1:0]  ar_id,
  input  logic [ADDR_W-1:0] ar_addr,
  input  logic [LEN_W-1:0]  ar_len,
  // request messages
  output logic              req_valid,
  input  logic              req_ready,
  output req_msg_t          req,
  // write data
  output logic              wd_valid,
  input  logic              wd_ready,
  output wbeat_t            wd
);
  req_msg_t wq_out, rq_out;
  logic     wq_valid, rq_valid, wq_pop, rq_pop;
  logic     last_was_write;
  logic [$clog2(REQ_DEPTH+1)-1:0] wq_cnt, rq_cnt;
  logic [$clog2(WD_DEPTH+1)-1:0]  wd_cnt;
  logic     pick_write;

  sync_fifo #(.T(req_msg_t), .DEPTH(REQ_DEPTH)) u_wq (
    .clk, .rst_n,
    .in_valid(aw_valid), .in_ready(aw_ready),
    .in_data('{is_write: 1'b1, tid: aw_id, addr: aw_addr, len: aw_len}),
    .out_valid(wq_valid), .out_ready(wq_pop), .out_data(wq_out), .count(wq_cnt));

  sync_fifo #(.T(req_msg_t), .DEPTH(REQ_DEPTH)) u_rq (
    .clk, .rst_n,
    .in_valid(ar_valid), .in_ready(ar_ready),
    .in_data('{is_write: 1'b0, tid: ar_id, addr: ar_addr, len: ar_len}),
    .out_valid(rq_valid), .out_ready(rq_pop), .out_data(rq_out), .count(rq_cnt));

  sync_fifo #(.T(wbeat_t), .DEPTH(WD_DEPTH)) u_wd (
    .clk, .rst_n,
    .in_valid(w_valid), .in_ready(w_ready),
    .in_data('{data: w_data, last: w_last}),
    .out_valid(wd_valid), .out_ready(wd_ready), .out_data(wd), .count(wd_cnt));

  // round robin: the other buffer wins when both have a request
  always_comb begin
    if (wq_valid && rq_valid) pick_write = !last_was_write;
    else                      pick_write = wq_valid;
  end

  assign req_valid = wq_valid || rq_valid;
  assign req       = pick_write ? wq_out : rq_out;
  assign wq_pop    = req_ready && req_valid && pick_write;
  assign rq_pop    = req_ready && req_valid && !pick_write;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last_was_write <= 1'b0;
    else if (req_valid && req_ready) last_was_write <= pick_write;
  end
endmodule
