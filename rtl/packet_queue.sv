// packet_queue: Packet-Queue of the master-side network interface.
//
// Buffers the response flits arriving from the router in a FIFO. When a header
// flit reaches the front, its transaction ID and sequence number go to the
// reorder unit (lk_valid, lk_hdr); in the cycle the unit answers (lk_ready)
// the decision is latched. The whole packet, header to tail, then leaves on
// dp_* (in order, to the depacketizer) or on st_* (out of order, to the reorder
// buffer), one flit per cycle. The next header is looked up after the tail.
// The queue depth is this design's choice.
module packet_queue
  import ni_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_flit,
  // reorder unit lookup
  output logic  lk_valid,
  output hdr_t  lk_hdr,
  input  logic  lk_ready,
  input  logic  lk_in_order,
  // to depacketizer
  output logic  dp_valid,
  input  logic  dp_ready,
  output flit_t dp_flit,
  output logic  dp_tail_fire,
  // to reorder buffer
  output logic  st_valid,
  input  logic  st_ready,
  output flit_t st_flit
);
  flit_t front;
  logic  f_valid, f_pop;
  logic  routed, to_store;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  sync_fifo #(.T(flit_t), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(in_flit),
    .out_valid(f_valid), .out_ready(f_pop), .out_data(front), .count(cnt));

  assign lk_valid = f_valid && !routed;
  assign lk_hdr   = hdr_t'(front.data);

  assign dp_valid = f_valid && routed && !to_store;
  assign st_valid = f_valid && routed && to_store;
  assign dp_flit  = front;
  assign st_flit  = front;
  assign f_pop    = (dp_valid && dp_ready) || (st_valid && st_ready);
  assign dp_tail_fire = dp_valid && dp_ready && front.tail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      routed   <= 1'b0;
      to_store <= 1'b0;
    end else if (lk_valid && lk_ready) begin
      routed   <= 1'b1;
      to_store <= !lk_in_order;
    end else if (f_pop && front.tail) begin
      routed   <= 1'b0;
    end
  end

  a_head_first: assert property (@(posedge clk) disable iff (!rst_n) lk_valid |-> front.head);
endmodule
