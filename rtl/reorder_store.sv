// reorder_store: Reorder-Table and shared Reorder-Buffer (dynamic allocation).
//
// Out-of-order response packets are kept here until their turn. The reorder
// buffer is one pool of RB_DEPTH flit slots shared by all transaction IDs;
// each slot holds a valid bit, a data word and a pointer to the slot of the
// packet's next flit, so every stored packet is a linked list. Each reorder
// table row describes one stored packet: valid, T-ID, S-N and the head
// pointer P, plus the saved header word and the number of payload flits.
//
// Write side (wr_*): a packet's flits arrive in order, header first.
//   Header  (Procedure E): a free row is taken and set to {1, tid, seq,
//           Current_Free_Slot}.
//   Payload (Procedure F): the flit goes to Current_Free_Slot, whose pointer
//           is set to Next_Free_Slot. The two are the lowest and second-
//           lowest free slots, found by priority encoders over the valid bits.
// Query (q_*): combinational search for a valid row with a given T-ID and S-N.
// Release (rel_*): rel_start latches the row of the current query hit; the
//   packet is then streamed out as its saved header flit followed by its
//   payload flits, walking the list and freeing each slot as it leaves; the row
//   is freed with the tail. One flit per cycle with valid/ready.
//
// Linked list, fields and procedures follow the document. Finding free slots
// with priority encoders, keeping the header word and a flit count in the row
// are this design's choices. wr_ready drops only when no row or slot is free;
// the reorder unit's admission check keeps that from happening.
module reorder_store
  import ni_pkg::*;
#(
  parameter int RB_DEPTH = 48,
  parameter int RT_ROWS  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // write side
  input  logic              wr_valid,
  output logic              wr_ready,
  input  flit_t             wr_flit,
  // query
  input  logic [TID_W-1:0]  q_tid,
  input  logic [SEQ_W-1:0]  q_seq,
  output logic              q_hit,
  // release
  input  logic              rel_start,
  output logic              rel_busy,
  output logic              rel_valid,
  input  logic              rel_ready,
  output flit_t             rel_flit,
  // observation
  output logic [$clog2(RB_DEPTH+1)-1:0] used_slots,
  output logic [$clog2(RT_ROWS+1)-1:0]  used_rows
);
  localparam int PW = $clog2(RB_DEPTH);
  localparam int RW = $clog2(RT_ROWS);

  typedef struct packed {
    logic              v;
    logic [TID_W-1:0]  tid;
    logic [SEQ_W-1:0]  sn;
    logic [PW-1:0]     p;
    logic [FLIT_W-1:0] hdr;
    logic [LEN_W:0]    np;    // payload flits stored
  } rt_row_t;

  typedef struct packed {
    logic              v;
    logic [FLIT_W-1:0] data;
    logic [PW-1:0]     p;
  } rb_slot_t;

  rt_row_t  rt [RT_ROWS];
  rb_slot_t rb [RB_DEPTH];

  // ---- free row / free slot search ------------------------------------------------
  logic [RW:0] free_row, q_row;
  logic [PW:0] cur_free, next_free;

  always_comb begin
    free_row = '0;
    q_row    = '0;
    for (int i = RT_ROWS-1; i >= 0; i--) begin
      if (!rt[i].v) free_row = {1'b1, RW'(i)};
      if (rt[i].v && rt[i].tid == q_tid && rt[i].sn == q_seq) q_row = {1'b1, RW'(i)};
    end
  end
  assign q_hit = q_row[RW];

  always_comb begin
    cur_free  = '0;
    next_free = '0;
    for (int i = RB_DEPTH-1; i >= 0; i--)
      if (!rb[i].v) begin
        next_free = cur_free;
        cur_free  = {1'b1, PW'(i)};
      end
  end

  always_comb begin
    used_slots = '0;
    used_rows  = '0;
    for (int i = 0; i < RB_DEPTH; i++) used_slots += $bits(used_slots)'(rb[i].v);
    for (int i = 0; i < RT_ROWS; i++)  used_rows  += $bits(used_rows)'(rt[i].v);
  end

  // ---- write side --------------------------------------------------------------------
  logic [RW-1:0] wr_row;
  hdr_t          wr_hdr;
  logic          wr_fire;
  assign wr_hdr   = hdr_t'(wr_flit.data);
  assign wr_ready = wr_flit.head ? free_row[RW] : cur_free[PW];
  assign wr_fire  = wr_valid && wr_ready;

  // ---- release side ------------------------------------------------------------------
  logic          rel_hdr_phase;
  logic [RW-1:0] rel_row;
  logic [PW-1:0] rel_ptr;
  logic [LEN_W:0] rel_left;
  logic          rel_fire;

  assign rel_valid = rel_busy;
  assign rel_fire  = rel_valid && rel_ready;
  always_comb begin
    rel_flit = '0;
    if (rel_hdr_phase) begin
      rel_flit.head = 1'b1;
      rel_flit.tail = (rt[rel_row].np == '0);
      rel_flit.data = rt[rel_row].hdr;
    end else begin
      rel_flit.head = 1'b0;
      rel_flit.tail = (rel_left == (LEN_W+1)'(1));
      rel_flit.data = rb[rel_ptr].data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RT_ROWS; i++)  rt[i] <= '0;
      for (int i = 0; i < RB_DEPTH; i++) rb[i] <= '0;
      wr_row        <= '0;
      rel_busy      <= 1'b0;
      rel_hdr_phase <= 1'b0;
      rel_row       <= '0;
      rel_ptr       <= '0;
      rel_left      <= '0;
    end else begin
      // Procedures E and F
      if (wr_fire) begin
        if (wr_flit.head) begin
          rt[free_row[RW-1:0]] <= '{v: 1'b1, tid: wr_hdr.tid, sn: wr_hdr.seq,
                                    p: cur_free[PW-1:0], hdr: wr_flit.data, np: '0};
          wr_row <= free_row[RW-1:0];
        end else begin
          rb[cur_free[PW-1:0]] <= '{v: 1'b1, data: wr_flit.data, p: next_free[PW-1:0]};
          rt[wr_row].np        <= rt[wr_row].np + 1'b1;
        end
      end
      // release
      if (rel_start && !rel_busy && q_hit) begin
        rel_busy      <= 1'b1;
        rel_hdr_phase <= 1'b1;
        rel_row       <= q_row[RW-1:0];
        rel_ptr       <= rt[q_row[RW-1:0]].p;
        rel_left      <= rt[q_row[RW-1:0]].np;
      end else if (rel_fire) begin
        rel_hdr_phase <= 1'b0;
        if (!rel_hdr_phase) begin
          rb[rel_ptr].v <= 1'b0;
          rel_ptr       <= rb[rel_ptr].p;
          rel_left      <= rel_left - 1'b1;
        end
        if (rel_flit.tail) begin
          rt[rel_row].v <= 1'b0;
          rel_busy      <= 1'b0;
        end
      end
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(wr_fire && rel_busy));
endmodule
