// slave_ni: slave-side network interface (router <-> AXI slave/memory core).
//
// Forward path: router -> packet queue (a plain FIFO; a slave needs no
// reordering) -> depacketizer_s -> AXI AW/W/AR to the slave core, with each
// request header saved in the header FIFO. Reverse path: AXI B/R from the slave
// core -> slave_adapter (pops the saved header, builds the response header)
// -> packetizer -> router. Read responses carry the burst as data flits,
// write responses are a single header flit. The blocks and their order follow
// the document's slave-side NI; queue depths are this design's choice.
module slave_ni
  import ni_pkg::*;
#(
  parameter logic [NODE_W-1:0] NODE_ID = '0,
  parameter int PQ_DEPTH = 8,
  parameter int HF_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // router link
  input  logic              rx_valid,
  output logic              rx_ready,
  input  flit_t             rx_flit,
  output logic              tx_valid,
  input  logic              tx_ready,
  output flit_t             tx_flit,
  // AXI master port, to the slave core
  output logic              aw_valid,
  input  logic              aw_ready,
  output logic [TID_W-1:0]  aw_id,
  output logic [ADDR_W-1:0] aw_addr,
  output logic [LEN_W-1:0]  aw_len,
  output logic              w_valid,
  input  logic              w_ready,
  output logic [FLIT_W-1:0] w_data,
  output logic              w_last,
  input  logic              b_valid,
  output logic              b_ready,
  input  logic [TID_W-1:0]  b_id,
  input  logic [RESP_W-1:0] b_resp,
  output logic              ar_valid,
  input  logic              ar_ready,
  output logic [TID_W-1:0]  ar_id,
  output logic [ADDR_W-1:0] ar_addr,
  output logic [LEN_W-1:0]  ar_len,
  input  logic              r_valid,
  output logic              r_ready,
  input  logic [TID_W-1:0]  r_id,
  input  logic [FLIT_W-1:0] r_data,
  input  logic [RESP_W-1:0] r_resp,
  input  logic              r_last
);
  flit_t q_flit;
  logic  q_valid, q_ready, hf_valid, hf_ready;
  hdr_t  hf_hdr, desc_hdr;
  logic  desc_valid, desc_ready, d_valid, d_ready;
  logic [LEN_W:0]    desc_n_data;
  logic [FLIT_W-1:0] d_data;
  logic [$clog2(PQ_DEPTH+1)-1:0] q_cnt;

  sync_fifo #(.T(flit_t), .DEPTH(PQ_DEPTH)) u_pq (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_ready(rx_ready), .in_data(rx_flit),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_flit), .count(q_cnt));

  depacketizer_s u_dpk (
    .clk, .rst_n,
    .in_valid(q_valid), .in_ready(q_ready), .in_flit(q_flit),
    .aw_valid, .aw_ready, .aw_id, .aw_addr, .aw_len,
    .w_valid, .w_ready, .w_data, .w_last,
    .ar_valid, .ar_ready, .ar_id, .ar_addr, .ar_len,
    .hf_valid, .hf_ready, .hf_hdr);

  slave_adapter #(.NODE_ID(NODE_ID), .HF_DEPTH(HF_DEPTH)) u_adp (
    .clk, .rst_n,
    .hf_valid, .hf_ready, .hf_hdr,
    .b_valid, .b_ready, .b_id, .b_resp,
    .r_valid, .r_ready, .r_id, .r_data, .r_resp, .r_last,
    .desc_valid, .desc_ready, .desc_hdr, .desc_n_data,
    .d_valid, .d_ready, .d_data);

  packetizer u_pkt (
    .clk, .rst_n,
    .desc_valid, .desc_ready, .desc_hdr,
    .desc_has_addr(1'b0),
    .desc_addr    ('0),
    .desc_n_data,
    .d_valid, .d_ready, .d_data,
    .out_valid(tx_valid), .out_ready(tx_ready), .out_flit(tx_flit));
endmodule
