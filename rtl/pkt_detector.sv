// pkt_detector: detector unit of the hybrid network interface.
//
// Looks at the type field of each incoming header flit and steers the whole
// packet, header to tail, to the slave-side queue (requests) or to the
// master-side queue (responses). The choice is made combinationally from the
// header flit and held in a register for the rest of the packet, so flits pass
// with no added cycle. Backpressure comes from the selected side only.
module pkt_detector
  import ni_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_flit,
  output logic  req_valid,   // to slave side
  input  logic  req_ready,
  output flit_t req_flit,
  output logic  resp_valid,  // to master side
  input  logic  resp_ready,
  output flit_t resp_flit
);
  hdr_t hdr_in;
  logic mid_pkt, sel_resp_q, sel_resp;
  assign hdr_in   = hdr_t'(in_flit.data);
  assign sel_resp = mid_pkt ? sel_resp_q : is_resp(hdr_in.typ);

  assign req_valid  = in_valid && !sel_resp;
  assign resp_valid = in_valid &&  sel_resp;
  assign req_flit   = in_flit;
  assign resp_flit  = in_flit;
  assign in_ready   = sel_resp ? resp_ready : req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mid_pkt    <= 1'b0;
      sel_resp_q <= 1'b0;
    end else if (in_valid && in_ready) begin
      mid_pkt    <= !in_flit.tail;
      sel_resp_q <= sel_resp;
    end
  end

  a_head: assert property (@(posedge clk) disable iff (!rst_n)
                           (in_valid && !mid_pkt) |-> in_flit.head);
endmodule
