// status_unit: Status-Register, Status-Table and ReservedSize of the reorder unit.
//
// The status register has one bit per AXI transaction ID, set while at least
// one message of that ID is outstanding. The status table holds a row for
// every ID with two or more outstanding messages: valid, T-ID, N-M (number of
// outstanding messages) and E-S (next expected response sequence number).
// ReservedSize counts reorder-buffer slots promised to outstanding responses.
//
// Forward path (admission, one request per cycle, adm_fire):
//   Procedure A  first message of an ID:  S_Reg set, SeqNum = 0.
//   Procedure B  second message:          new row, N-M = 2, E-S = 0, SeqNum = 1.
//   Procedure C  further messages:        SeqNum = N-M + E-S, N-M += 1.
//   All three add the message's response size to ReservedSize.
// adm_ok is combinational: the response fits in the free reorder-buffer space,
// fewer than MAX_OUT messages are outstanding, a free row exists when B is
// needed, and the ID has fewer than 2^SEQ_W messages in flight.
//
// Reverse path: lk_in_order tells whether (lk_tid, lk_seq) is the expected
// response (no row for the ID, or seq equals E-S). dlv_fire applies
// Procedure D for a delivered response: N-M -= 1, E-S += 1, ReservedSize -=
// size; a row whose N-M reaches zero, or an ID without a row, clears its
// status bit. Admission and delivery must not fire in the same cycle
// (asserted); the reorder unit serialises them.
//
// Table size ST_ROWS, MAX_OUT and the response-size rule (burst beats for a
// read, zero for a write response) are this design's choices; RB_DEPTH = 48
// words is the document's reorder buffer size.
module status_unit
  import ni_pkg::*;
#(
  parameter int RB_DEPTH = 48,
  parameter int ST_ROWS  = 8,
  parameter int MAX_OUT  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // admission
  input  logic [TID_W-1:0]  adm_tid,
  input  logic [3:0]        adm_size,     // reorder-buffer words the response needs
  output logic              adm_ok,
  output logic [SEQ_W-1:0]  adm_seq,
  input  logic              adm_fire,
  // response lookup
  input  logic [TID_W-1:0]  lk_tid,
  input  logic [SEQ_W-1:0]  lk_seq,
  output logic              lk_in_order,
  // delivery (Procedure D)
  input  logic              dlv_fire,
  input  logic [TID_W-1:0]  dlv_tid,
  input  logic [3:0]        dlv_size,
  // observation
  output logic [(1<<TID_W)-1:0]       s_reg_o,
  output logic [$clog2(RB_DEPTH+1)-1:0] reserved_o
);
  localparam int NTID = 1 << TID_W;
  localparam int RW   = $clog2(ST_ROWS);
  localparam int RSW  = $clog2(RB_DEPTH+1);
  localparam int OW   = $clog2(MAX_OUT+1);

  typedef struct packed {
    logic             v;
    logic [TID_W-1:0] tid;
    logic [SEQ_W:0]   nm;   // one bit wider: up to 2^SEQ_W in flight
    logic [SEQ_W-1:0] es;
  } st_row_t;

  logic [NTID-1:0] s_reg;
  st_row_t         st [ST_ROWS];
  logic [RSW-1:0]  reserved;
  logic [OW-1:0]   outstanding;

  // ---- row search ----------------------------------------------------------
  function automatic logic [RW:0] find_row(logic [TID_W-1:0] t, st_row_t tbl [ST_ROWS]);
    logic [RW:0] r;
    r = '0;
    for (int i = ST_ROWS-1; i >= 0; i--)
      if (tbl[i].v && tbl[i].tid == t) r = {1'b1, RW'(i)};
    return r;
  endfunction

  logic [RW:0] adm_hit, lk_hit, dlv_hit, free_row;
  assign adm_hit = find_row(adm_tid, st);
  assign lk_hit  = find_row(lk_tid, st);
  assign dlv_hit = find_row(dlv_tid, st);

  always_comb begin
    free_row = '0;
    for (int i = ST_ROWS-1; i >= 0; i--)
      if (!st[i].v) free_row = {1'b1, RW'(i)};
  end

  // ---- admission check and sequence number ----------------------------------
  logic space_ok;
  assign space_ok = (32'(reserved) + 32'(adm_size) <= RB_DEPTH) && (32'(outstanding) < MAX_OUT);

  always_comb begin
    adm_seq = '0;
    adm_ok  = 1'b0;
    if (!s_reg[adm_tid]) begin                       // Procedure A
      adm_seq = '0;
      adm_ok  = space_ok;
    end else if (!adm_hit[RW]) begin                 // Procedure B
      adm_seq = SEQ_W'(1);
      adm_ok  = space_ok && free_row[RW];
    end else begin                                   // Procedure C
      adm_seq = SEQ_W'(st[adm_hit[RW-1:0]].nm) + st[adm_hit[RW-1:0]].es;
      adm_ok  = space_ok && (32'(st[adm_hit[RW-1:0]].nm) < (1 << SEQ_W));
    end
  end

  // ---- response lookup --------------------------------------------------------
  assign lk_in_order = !lk_hit[RW] || (st[lk_hit[RW-1:0]].es == lk_seq);

  // ---- state update -------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_reg       <= '0;
      reserved    <= '0;
      outstanding <= '0;
      for (int i = 0; i < ST_ROWS; i++) st[i] <= '0;
    end else if (adm_fire) begin
      reserved    <= reserved + RSW'(adm_size);
      outstanding <= outstanding + 1'b1;
      if (!s_reg[adm_tid]) begin
        s_reg[adm_tid] <= 1'b1;
      end else if (!adm_hit[RW]) begin
        st[free_row[RW-1:0]] <= '{v: 1'b1, tid: adm_tid, nm: (SEQ_W+1)'(2), es: '0};
      end else begin
        st[adm_hit[RW-1:0]].nm <= st[adm_hit[RW-1:0]].nm + 1'b1;
      end
    end else if (dlv_fire) begin
      reserved    <= reserved - RSW'(dlv_size);
      outstanding <= outstanding - 1'b1;
      if (dlv_hit[RW]) begin
        st[dlv_hit[RW-1:0]].nm <= st[dlv_hit[RW-1:0]].nm - 1'b1;
        st[dlv_hit[RW-1:0]].es <= st[dlv_hit[RW-1:0]].es + 1'b1;
        if (st[dlv_hit[RW-1:0]].nm == (SEQ_W+1)'(1)) begin
          st[dlv_hit[RW-1:0]].v <= 1'b0;
          s_reg[dlv_tid]        <= 1'b0;
        end
      end else begin
        s_reg[dlv_tid] <= 1'b0;
      end
    end
  end

  assign s_reg_o    = s_reg;
  assign reserved_o = reserved;

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(adm_fire && dlv_fire));
  a_adm_ok: assert property (@(posedge clk) disable iff (!rst_n) adm_fire |-> adm_ok);
  a_dlv_known: assert property (@(posedge clk) disable iff (!rst_n) dlv_fire |-> s_reg[dlv_tid]);
endmodule
