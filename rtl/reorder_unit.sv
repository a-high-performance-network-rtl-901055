// reorder_unit: the master NI's reordering mechanism (status + reorder storage).
//
// Forward path: a request asks for admittance (adm_valid). adm_ready grants it
// in the same cycle, with the sequence number adm_seq, when the response fits
// in the unreserved part of the shared reorder buffer (see status_unit).
// Reverse path: the packet queue presents each response header (lk_valid,
// lk_hdr). The unit answers lk_in_order in the cycle lk_ready is high:
//   in order     -> Procedure D is applied at once; the packet queue sends the
//                   packet to the depacketizer; the unit waits for its tail
//                   (pq_tail_fire) and then checks the reorder table for the
//                   same ID with the next sequence number.
//   out of order -> the packet queue streams it into the reorder store
//                   (st_*), Procedures E/F.
// Release: when the check hits, rel_active goes high and the stored packet is
// streamed to the depacketizer (rel_*); Procedure D is applied when its header
// leaves, and the check repeats for the following sequence number, so a chain
// of waiting packets drains back to back.
//
// One controller serialises lookups, stores and releases. Admission proceeds
// in any state except in a cycle where Procedure D updates the status table.
// Response size used for reservation: burst beats for a read response, 0 for a
// write response (a header-only packet that needs a table row but no slot).
module reorder_unit
  import ni_pkg::*;
#(
  parameter int RB_DEPTH = 48,
  parameter int RT_ROWS  = 16,
  parameter int ST_ROWS  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // admission
  input  logic             adm_valid,
  input  logic             adm_is_write,
  input  logic [TID_W-1:0] adm_tid,
  input  logic [LEN_W-1:0] adm_len,
  output logic             adm_ready,
  output logic [SEQ_W-1:0] adm_seq,
  // lookup from the packet queue
  input  logic             lk_valid,
  input  hdr_t             lk_hdr,
  output logic             lk_ready,
  output logic             lk_in_order,
  input  logic             pq_tail_fire,
  // out-of-order packet stream from the packet queue
  input  logic             st_valid,
  output logic             st_ready,
  input  flit_t            st_flit,
  // released packet stream to the depacketizer
  output logic             rel_active,
  output logic             rel_valid,
  input  logic             rel_ready,
  output flit_t            rel_flit,
  // observation
  output logic [$clog2(RB_DEPTH+1)-1:0] reserved_o,
  output logic [$clog2(RB_DEPTH+1)-1:0] used_slots_o
);
  typedef enum logic [1:0] {S_IDLE, S_PASS, S_STORE, S_REL} state_e;
  state_e state;

  logic             chk_pending;
  logic [TID_W-1:0] chk_tid;
  logic [SEQ_W-1:0] chk_seq;

  function automatic logic [3:0] resp_size(hdr_t h);
    return (h.typ == MT_RD_RESP) ? 4'(h.len) + 4'd1 : 4'd0;
  endfunction

  // ---- status register / table -----------------------------------------------------
  logic adm_ok, adm_fire, dlv_fire, lk_order_raw;
  logic [TID_W-1:0] dlv_tid;
  logic [3:0]       dlv_size;
  hdr_t             rel_hdr;
  logic             rel_fire, st_fire, st_ready_raw;
  logic             q_hit, rel_busy, rel_start;
  logic [(1<<TID_W)-1:0] s_reg_unused;
  logic [$clog2(RT_ROWS+1)-1:0] used_rows_unused;

  status_unit #(.RB_DEPTH(RB_DEPTH), .ST_ROWS(ST_ROWS), .MAX_OUT(RT_ROWS)) u_status (
    .clk, .rst_n,
    .adm_tid   (adm_tid),
    .adm_size  (adm_is_write ? 4'd0 : 4'(adm_len) + 4'd1),
    .adm_ok    (adm_ok),
    .adm_seq   (adm_seq),
    .adm_fire  (adm_fire),
    .lk_tid    (lk_hdr.tid),
    .lk_seq    (lk_hdr.seq),
    .lk_in_order(lk_order_raw),
    .dlv_fire  (dlv_fire),
    .dlv_tid   (dlv_tid),
    .dlv_size  (dlv_size),
    .s_reg_o   (s_reg_unused),
    .reserved_o(reserved_o)
  );

  reorder_store #(.RB_DEPTH(RB_DEPTH), .RT_ROWS(RT_ROWS)) u_store (
    .clk, .rst_n,
    .wr_valid  (st_valid && state == S_STORE),
    .wr_ready  (st_ready_raw),
    .wr_flit   (st_flit),
    .q_tid     (chk_tid),
    .q_seq     (chk_seq),
    .q_hit     (q_hit),
    .rel_start (rel_start),
    .rel_busy  (rel_busy),
    .rel_valid (rel_valid),
    .rel_ready (rel_ready),
    .rel_flit  (rel_flit),
    .used_slots(used_slots_o),
    .used_rows (used_rows_unused)
  );

  assign rel_hdr    = hdr_t'(rel_flit.data);
  assign rel_fire   = rel_valid && rel_ready;
  assign st_ready   = st_ready_raw && state == S_STORE;
  assign st_fire    = st_valid && st_ready;
  assign rel_active = (state == S_REL);
  assign rel_start  = (state == S_IDLE) && chk_pending && q_hit;

  assign lk_ready    = (state == S_IDLE) && !chk_pending;
  assign lk_in_order = lk_order_raw;

  always_comb begin
    dlv_fire = 1'b0;
    dlv_tid  = lk_hdr.tid;
    dlv_size = resp_size(lk_hdr);
    if (lk_valid && lk_ready && lk_order_raw) begin
      dlv_fire = 1'b1;
    end else if (state == S_REL && rel_fire && rel_flit.head) begin
      dlv_fire = 1'b1;
      dlv_tid  = rel_hdr.tid;
      dlv_size = resp_size(rel_hdr);
    end
  end

  assign adm_ready = adm_ok && !dlv_fire;
  assign adm_fire  = adm_valid && adm_ready;

  // ---- controller ------------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      chk_pending <= 1'b0;
      chk_tid     <= '0;
      chk_seq     <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (chk_pending) begin
            chk_pending <= 1'b0;
            if (q_hit) state <= S_REL;
          end else if (lk_valid) begin
            if (lk_order_raw) begin
              chk_pending <= 1'b1;
              chk_tid     <= lk_hdr.tid;
              chk_seq     <= lk_hdr.seq + 1'b1;
              state       <= S_PASS;
            end else begin
              state <= S_STORE;
            end
          end
        end
        S_PASS:  if (pq_tail_fire) state <= S_IDLE;
        S_STORE: if (st_fire && st_flit.tail) state <= S_IDLE;
        S_REL: begin
          if (rel_fire && rel_flit.head) begin
            chk_pending <= 1'b1;
            chk_tid     <= rel_hdr.tid;
            chk_seq     <= rel_hdr.seq + 1'b1;
          end
          if (rel_fire && rel_flit.tail) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_store_fits: assert property (@(posedge clk) disable iff (!rst_n)
                                 (st_valid && state == S_STORE) |-> st_ready_raw);
endmodule
