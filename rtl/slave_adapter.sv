// slave_adapter: header FIFO and adapter of the slave-side network interface.
//
// The header FIFO keeps the header of every request handed to the slave core,
// in arrival order. When the slave answers (a B beat, or the first R beat of a
// read burst), the adapter pops the oldest header and turns it into the
// response header: destination and source swapped, type changed to the matching
// response, transaction ID, sequence number and burst length kept, response
// code taken from BRESP or the first RRESP. It hands the packetizer that header
// with the number of data flits (0 for a write, burst length for a read); the
// R data beats then go to the packetizer as its data stream. The B beat is
// consumed with the descriptor; R beats are consumed by the packetizer.
//
// The slave core is assumed to answer in request order (a memory core with one
// queue), which is what keeping the header information in a FIFO requires.
module slave_adapter
  import ni_pkg::*;
#(
  parameter logic [NODE_W-1:0] NODE_ID = '0,
  parameter int HF_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // header FIFO push (from the depacketizer)
  input  logic              hf_valid,
  output logic              hf_ready,
  input  hdr_t              hf_hdr,
  // AXI responses from the slave core
  input  logic              b_valid,
  output logic              b_ready,
  input  logic [TID_W-1:0]  b_id,
  input  logic [RESP_W-1:0] b_resp,
  input  logic              r_valid,
  output logic              r_ready,
  input  logic [TID_W-1:0]  r_id,
  input  logic [FLIT_W-1:0] r_data,
  input  logic [RESP_W-1:0] r_resp,
  input  logic              r_last,
  // packetizer
  output logic              desc_valid,
  input  logic              desc_ready,
  output hdr_t              desc_hdr,
  output logic [LEN_W:0]    desc_n_data,
  output logic              d_valid,
  input  logic              d_ready,
  output logic [FLIT_W-1:0] d_data
);
  hdr_t front;
  logic f_valid, f_pop, in_burst, front_wr;
  logic [$clog2(HF_DEPTH+1)-1:0] cnt;

  sync_fifo #(.T(hdr_t), .DEPTH(HF_DEPTH)) u_hf (
    .clk, .rst_n,
    .in_valid(hf_valid), .in_ready(hf_ready), .in_data(hf_hdr),
    .out_valid(f_valid), .out_ready(f_pop), .out_data(front), .count(cnt));

  assign front_wr = (front.typ == MT_WR_REQ);

  always_comb begin
    desc_hdr     = front;
    desc_hdr.dst = front.src;
    desc_hdr.src = NODE_ID;
    desc_hdr.typ = front_wr ? MT_WR_RESP : MT_RD_RESP;
    desc_hdr.resp = front_wr ? b_resp : r_resp;
    desc_hdr.rsvd = '0;
  end
  assign desc_n_data = front_wr ? '0 : (LEN_W+1)'(front.len) + 1'b1;
  assign desc_valid  = f_valid && !in_burst && (front_wr ? b_valid : r_valid);
  assign f_pop       = desc_valid && desc_ready;
  assign b_ready     = f_pop && front_wr;

  assign d_valid = in_burst && r_valid;
  assign d_data  = r_data;
  assign r_ready = in_burst && d_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              in_burst <= 1'b0;
    else if (f_pop && !front_wr)             in_burst <= 1'b1;
    else if (r_valid && r_ready && r_last)   in_burst <= 1'b0;
  end

  a_b_order: assert property (@(posedge clk) disable iff (!rst_n)
                              (f_pop && front_wr) |-> (b_id == front.tid));
  a_r_order: assert property (@(posedge clk) disable iff (!rst_n)
                              (f_pop && !front_wr) |-> (r_id == front.tid));
endmodule
