// flit_arbiter: output merge of the hybrid network interface.
//
// Two packet streams (master-side requests, slave-side responses) share one
// router injection link. A round-robin arbiter grants a whole packet at a time:
// once a header flit is sent, the grant is locked to that input until its tail
// flit, so packets are never interleaved (wormhole switching needs contiguous
// packets). When both inputs wait, the one not served last wins. The document
// shows the two packetizers sharing one router port; the arbitration rule is
// this design's choice.
module flit_arbiter
  import ni_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  a_valid,
  output logic  a_ready,
  input  flit_t a_flit,
  input  logic  b_valid,
  output logic  b_ready,
  input  flit_t b_flit,
  output logic  out_valid,
  input  logic  out_ready,
  output flit_t out_flit
);
  logic locked, lock_b, last_b, pick_b, sel_b;

  always_comb begin
    if (a_valid && b_valid) pick_b = !last_b;
    else                    pick_b = b_valid;
  end
  assign sel_b     = locked ? lock_b : pick_b;
  assign out_valid = sel_b ? b_valid : a_valid;
  assign out_flit  = sel_b ? b_flit  : a_flit;
  assign a_ready   = !sel_b && out_ready;
  assign b_ready   =  sel_b && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      lock_b <= 1'b0;
      last_b <= 1'b1;
    end else if (out_valid && out_ready) begin
      if (out_flit.head) last_b <= sel_b;
      locked <= !out_flit.tail;
      lock_b <= sel_b;
    end
  end
endmodule
