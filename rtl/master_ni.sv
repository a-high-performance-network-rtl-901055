// master_ni: master-side network interface (AXI master core <-> router).
//
// Forward path: axi_queue -> admission by the reorder unit -> packetizer with
// the mapping unit (addr_map) -> router. A request leaves the AXI-Queue only
// in a cycle where the packetizer is idle and the reorder unit admits it; the
// reorder unit then hands out its sequence number, which goes into the header.
// Reverse path: router -> packet_queue -> (depacketizer_m directly, or the
// shared reorder buffer first) -> AXI R/B. The reorder unit decides per packet
// and releases waiting packets in sequence order; the depacketizer input is
// switched to the reorder buffer while a release is in progress.
//
// Request packets: header, address, and for writes burst data flits. The
// structure (AXI-Queue, Packetizer, Packet-Queue, Depacketizer, shared Reorder
// Unit) follows the document's master-side NI; the handshakes and the packet
// layout are this design's. NODE_ID is this tile's network address.
module master_ni
  import ni_pkg::*;
#(
  parameter logic [NODE_W-1:0] NODE_ID = '0,
  parameter int RB_DEPTH    = 48,
  parameter int RT_ROWS     = 16,
  parameter int ST_ROWS     = 8,
  parameter int REQ_DEPTH   = 4,
  parameter int WD_DEPTH    = 16,
  parameter int PQ_DEPTH    = 8,
  parameter int NUM_MEM     = 15,
  parameter int MEM_BASE    = 10,
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
  // router link
  output logic              tx_valid,
  input  logic              tx_ready,
  output flit_t             tx_flit,
  input  logic              rx_valid,
  output logic              rx_ready,
  input  flit_t             rx_flit,
  // observation
  output logic              adm_stall,    // request waiting, refused by admittance
  output logic              ooo_store,    // out-of-order packet stored (header flit)
  output logic              rel_start,    // stored packet released (header flit)
  output logic [$clog2(RB_DEPTH+1)-1:0] rb_used
);
  // ---- forward path ----------------------------------------------------------------
  logic     req_valid, req_ready, wd_valid, wd_ready;
  req_msg_t req;
  wbeat_t   wd;
  logic     desc_ready, adm_ready;
  logic [SEQ_W-1:0]  adm_seq;
  logic [NODE_W-1:0] dst_node;
  hdr_t     req_hdr;

  axi_queue #(.REQ_DEPTH(REQ_DEPTH), .WD_DEPTH(WD_DEPTH)) u_axiq (
    .clk, .rst_n,
    .aw_valid, .aw_ready, .aw_id, .aw_addr, .aw_len,
    .w_valid, .w_ready, .w_data, .w_last,
    .ar_valid, .ar_ready, .ar_id, .ar_addr, .ar_len,
    .req_valid, .req_ready, .req,
    .wd_valid, .wd_ready, .wd);

  addr_map #(.NUM_MEM(NUM_MEM), .MEM_BASE(MEM_BASE), .REGION_BITS(REGION_BITS)) u_map (
    .addr(req.addr), .node(dst_node));

  always_comb begin
    req_hdr      = '0;
    req_hdr.dst  = dst_node;
    req_hdr.src  = NODE_ID;
    req_hdr.typ  = req.is_write ? MT_WR_REQ : MT_RD_REQ;
    req_hdr.tid  = req.tid;
    req_hdr.seq  = adm_seq;
    req_hdr.len  = req.len;
  end

  assign req_ready = adm_ready && desc_ready;
  assign adm_stall = req_valid && desc_ready && !adm_ready;

  packetizer u_pkt (
    .clk, .rst_n,
    .desc_valid   (req_valid && req_ready),
    .desc_ready   (desc_ready),
    .desc_hdr     (req_hdr),
    .desc_has_addr(1'b1),
    .desc_addr    (req.addr),
    .desc_n_data  (req.is_write ? (LEN_W+1)'(req.len) + 1'b1 : '0),
    .d_valid      (wd_valid),
    .d_ready      (wd_ready),
    .d_data       (wd.data),
    .out_valid    (tx_valid),
    .out_ready    (tx_ready),
    .out_flit     (tx_flit));

  // ---- reverse path ----------------------------------------------------------------
  logic  lk_valid, lk_ready, lk_in_order, dp_valid, dp_ready, dp_tail_fire;
  logic  st_valid, st_ready, rel_valid, rel_ready, rel_active;
  hdr_t  lk_hdr;
  flit_t dp_flit, st_flit, rel_flit, dq_flit;
  logic  dq_valid, dq_ready;
  logic [$clog2(RB_DEPTH+1)-1:0] reserved;

  packet_queue #(.DEPTH(PQ_DEPTH)) u_pq (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_ready(rx_ready), .in_flit(rx_flit),
    .lk_valid, .lk_hdr, .lk_ready, .lk_in_order,
    .dp_valid, .dp_ready, .dp_flit, .dp_tail_fire,
    .st_valid, .st_ready, .st_flit);

  reorder_unit #(.RB_DEPTH(RB_DEPTH), .RT_ROWS(RT_ROWS), .ST_ROWS(ST_ROWS)) u_rou (
    .clk, .rst_n,
    .adm_valid   (req_valid && desc_ready),
    .adm_is_write(req.is_write),
    .adm_tid     (req.tid),
    .adm_len     (req.len),
    .adm_ready   (adm_ready),
    .adm_seq     (adm_seq),
    .lk_valid, .lk_hdr, .lk_ready, .lk_in_order,
    .pq_tail_fire(dp_tail_fire),
    .st_valid, .st_ready, .st_flit,
    .rel_active, .rel_valid, .rel_ready, .rel_flit,
    .reserved_o  (reserved),
    .used_slots_o(rb_used));

  // depacketizer input: the reorder buffer while releasing, else the queue
  assign dq_valid  = rel_active ? rel_valid : dp_valid;
  assign dq_flit   = rel_active ? rel_flit  : dp_flit;
  assign rel_ready = rel_active && dq_ready;
  assign dp_ready  = !rel_active && dq_ready;

  depacketizer_m u_dpk (
    .clk, .rst_n,
    .in_valid(dq_valid), .in_ready(dq_ready), .in_flit(dq_flit),
    .b_valid, .b_ready, .b_id, .b_resp,
    .r_valid, .r_ready, .r_id, .r_data, .r_resp, .r_last);

  assign ooo_store = st_valid && st_ready && st_flit.head;
  assign rel_start = rel_valid && rel_ready && rel_flit.head;

  a_reserve_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                    32'(reserved) <= RB_DEPTH);
endmodule
