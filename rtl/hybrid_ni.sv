// hybrid_ni: hybrid network interface of a tile holding a processor and a memory.
//
// One router port serves both cores. Incoming packets pass the detector, which
// sends requests to the slave-side NI (memory) and responses to the master-side
// NI (processor). The two packetizer outputs are merged onto the router
// injection link by a packet-granular round-robin arbiter. Inside, the master
// side keeps its AXI-Queue, shared reorder buffer and admission control, and
// the slave side its header FIFO and adapter, unchanged. This is the top of the
// design: a tile's NI with the processor's AXI port (no prefix), the memory's
// AXI port (prefix s_) and the router link (rx_*, tx_*).
//
// The combination of master and slave NIs behind a detector follows the
// document's hybrid NI; the arbiter and the default address map (memory space
// interleaved over all NUM_MEM = 25 tiles of a 5x5 mesh) are this design's
// choices.
module hybrid_ni
  import ni_pkg::*;
#(
  parameter logic [NODE_W-1:0] NODE_ID = '0,
  parameter int RB_DEPTH    = 48,
  parameter int RT_ROWS     = 16,
  parameter int ST_ROWS     = 8,
  parameter int REQ_DEPTH   = 4,
  parameter int WD_DEPTH    = 16,
  parameter int PQ_DEPTH    = 8,
  parameter int HF_DEPTH    = 4,
  parameter int NUM_MEM     = 25,
  parameter int MEM_BASE    = 0,
  parameter int REGION_BITS = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI slave port, driven by the master core
  input  logic              aw_valid,
  output logic              aw_ready,
  input  logic [TID_W-1:0]  aw_id,
  input  logic [ADDR_W-1:0] aw_addr,
  input  logic [LEN_W-1:0]  aw_len,
  input  logic              w_valid,
  output logic              w_ready,
  input  logic [FLIT_W-1:0] w_data,
  input  logic              w_last,
  output logic              b_valid,
  input  logic              b_ready,
  output logic [TID_W-1:0]  b_id,
  output logic [RESP_W-1:0] b_resp,
  input  logic              ar_valid,
  output logic              ar_ready,
  input  logic [TID_W-1:0]  ar_id,
  input  logic [ADDR_W-1:0] ar_addr,
  input  logic [LEN_W-1:0]  ar_len,
  output logic              r_valid,
  input  logic              r_ready,
  output logic [TID_W-1:0]  r_id,
  output logic [FLIT_W-1:0] r_data,
  output logic [RESP_W-1:0] r_resp,
  output logic              r_last,
  // AXI master port, to the memory core of this tile
  output logic              s_aw_valid,
  input  logic              s_aw_ready,
  output logic [TID_W-1:0]  s_aw_id,
  output logic [ADDR_W-1:0] s_aw_addr,
  output logic [LEN_W-1:0]  s_aw_len,
  output logic              s_w_valid,
  input  logic              s_w_ready,
  output logic [FLIT_W-1:0] s_w_data,
  output logic              s_w_last,
  input  logic              s_b_valid,
  output logic              s_b_ready,
  input  logic [TID_W-1:0]  s_b_id,
  input  logic [RESP_W-1:0] s_b_resp,
  output logic              s_ar_valid,
  input  logic              s_ar_ready,
  output logic [TID_W-1:0]  s_ar_id,
  output logic [ADDR_W-1:0] s_ar_addr,
  output logic [LEN_W-1:0]  s_ar_len,
  input  logic              s_r_valid,
  output logic              s_r_ready,
  input  logic [TID_W-1:0]  s_r_id,
  input  logic [FLIT_W-1:0] s_r_data,
  input  logic [RESP_W-1:0] s_r_resp,
  input  logic              s_r_last,
  // router link
  input  logic              rx_valid,
  output logic              rx_ready,
  input  flit_t             rx_flit,
  output logic              tx_valid,
  input  logic              tx_ready,
  output flit_t             tx_flit,
  // observation (master side)
  output logic              adm_stall,
  output logic              ooo_store,
  output logic              rel_start,
  output logic [$clog2(RB_DEPTH+1)-1:0] rb_used
);
  logic  m_rx_valid, m_rx_ready, s_rx_valid, s_rx_ready;
  logic  m_tx_valid, m_tx_ready, s_tx_valid, s_tx_ready;
  flit_t m_rx_flit, s_rx_flit, m_tx_flit, s_tx_flit;

  pkt_detector u_det (
    .clk, .rst_n,
    .in_valid  (rx_valid),   .in_ready  (rx_ready),   .in_flit  (rx_flit),
    .req_valid (s_rx_valid), .req_ready (s_rx_ready), .req_flit (s_rx_flit),
    .resp_valid(m_rx_valid), .resp_ready(m_rx_ready), .resp_flit(m_rx_flit));

  master_ni #(
    .NODE_ID(NODE_ID), .RB_DEPTH(RB_DEPTH), .RT_ROWS(RT_ROWS), .ST_ROWS(ST_ROWS),
    .REQ_DEPTH(REQ_DEPTH), .WD_DEPTH(WD_DEPTH), .PQ_DEPTH(PQ_DEPTH),
    .NUM_MEM(NUM_MEM), .MEM_BASE(MEM_BASE), .REGION_BITS(REGION_BITS)
  ) u_master (
    .clk, .rst_n,
    .aw_valid,
    .aw_ready,
    .aw_id,
    .aw_addr,
    .aw_len,
    .w_valid,
    .w_ready,
    .w_data,
    .w_last,
    .b_valid,
    .b_ready,
    .b_id,
    .b_resp,
    .ar_valid,
    .ar_ready,
    .ar_id,
    .ar_addr,
    .ar_len,
    .r_valid,
    .r_ready,
    .r_id,
    .r_data,
    .r_resp,
    .r_last,
    .tx_valid(m_tx_valid), .tx_ready(m_tx_ready), .tx_flit(m_tx_flit),
    .rx_valid(m_rx_valid), .rx_ready(m_rx_ready), .rx_flit(m_rx_flit),
    .adm_stall, .ooo_store, .rel_start, .rb_used);

  slave_ni #(.NODE_ID(NODE_ID), .PQ_DEPTH(PQ_DEPTH), .HF_DEPTH(HF_DEPTH)) u_slave (
    .clk, .rst_n,
    .rx_valid(s_rx_valid), .rx_ready(s_rx_ready), .rx_flit(s_rx_flit),
    .tx_valid(s_tx_valid), .tx_ready(s_tx_ready), .tx_flit(s_tx_flit),
    .aw_valid(s_aw_valid),
    .aw_ready(s_aw_ready),
    .aw_id(s_aw_id),
    .aw_addr(s_aw_addr),
    .aw_len(s_aw_len),
    .w_valid(s_w_valid),
    .w_ready(s_w_ready),
    .w_data(s_w_data),
    .w_last(s_w_last),
    .b_valid(s_b_valid),
    .b_ready(s_b_ready),
    .b_id(s_b_id),
    .b_resp(s_b_resp),
    .ar_valid(s_ar_valid),
    .ar_ready(s_ar_ready),
    .ar_id(s_ar_id),
    .ar_addr(s_ar_addr),
    .ar_len(s_ar_len),
    .r_valid(s_r_valid),
    .r_ready(s_r_ready),
    .r_id(s_r_id),
    .r_data(s_r_data),
    .r_resp(s_r_resp),
    .r_last(s_r_last));

  flit_arbiter u_arb (
    .clk, .rst_n,
    .a_valid(m_tx_valid), .a_ready(m_tx_ready), .a_flit(m_tx_flit),
    .b_valid(s_tx_valid), .b_ready(s_tx_ready), .b_flit(s_tx_flit),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_flit(tx_flit));
endmodule
