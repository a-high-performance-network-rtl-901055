// tb_master_ni: test of the master-side network interface at its default
// parameters (48-word shared reorder buffer, 16 table rows, memories on nodes
// 10..24 as in the ten-processor / fifteen-memory configuration).
//
// The testbench is the processor and the network. It issues random AXI reads
// and writes (mostly IDs 0..3, bursts of 1..8) and checks every R and B beat against
// per-ID expectation queues: same-ID responses must come back in issue order
// with the right data. Request packets are checked (destination from the
// address map, length, write data, and a sequence number that no other
// request of the same ID in the network holds) and answered by remote memory models after
// a random delay, so responses arrive out of order and exercise the reorder
// buffer. It also checks that the reorder buffer never holds more than 48 words
// and that a long run of read bursts is held back by the admission check.
module tb_master_ni;
  import ni_pkg::*;

  localparam int N_REQ    = 300;
  localparam int N_REMOTE = 60;
  localparam int WATCHDOG = 400000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic logic [31:0] rd_pat(input logic [31:0] a);
    return (a * 32'h9E3779B1) ^ 32'h1234_5678;
  endfunction
  function automatic logic [31:0] wr_pat(input logic [31:0] a);
    return (a * 32'h85EBCA6B) + 32'h0BAD_F00D;
  endfunction

  // ---- DUT ---------------------------------------------------------------------------
  logic aw_valid, aw_ready, w_valid, w_ready, w_last, b_valid, b_ready;
  logic ar_valid, ar_ready, r_valid, r_ready, r_last;
  logic [TID_W-1:0] aw_id, b_id, ar_id, r_id;
  logic [ADDR_W-1:0] aw_addr, ar_addr;
  logic [LEN_W-1:0] aw_len, ar_len;
  logic [FLIT_W-1:0] w_data, r_data;
  logic [RESP_W-1:0] b_resp, r_resp;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  flit_t rx_flit, tx_flit;
  logic adm_stall, ooo_store, rel_start;
  logic [5:0] rb_used;

  master_ni dut (.*);

  // ---- processor: request issue --------------------------------------------------------
  typedef struct packed { logic [31:0] addr; logic [2:0] len; } exp_t;
  exp_t rd_exp [16][$];
  exp_t wr_exp [16][$];
  int issued_rd = 0, issued_wr = 0, done_rd = 0, done_wr = 0;

  // Mostly IDs 0-3, so that same-ID requests pile up; now and then any other ID.
  function automatic logic [3:0] pick_tid();
    return ($urandom_range(0, 7) == 0) ? 4'($urandom_range(4, 15)) : 4'($urandom_range(0, 3));
  endfunction

  function automatic logic [31:0] rand_addr();
    logic [31:0] node, off;
    node = $urandom_range(0, 63);
    off  = 32'($urandom_range(0, 4095)) << 2;
    return (node << 20) | off;
  endfunction

  int wb;
  bit hs_w, hs_r, hs_x;
  logic [31:0] wa, ra; logic [2:0] wl, rl; logic [3:0] wt, rt;
  initial begin : writer
    aw_valid = 0; w_valid = 0; w_last = 0; aw_id = 0; aw_addr = 0; aw_len = 0; w_data = 0;
    @(posedge rst_n); @(negedge clk);
    repeat (N_REQ/2) begin
      wa = rand_addr(); wl = 3'($urandom_range(0, 7)); wt = pick_tid();
      repeat ($urandom_range(0, 3)) @(negedge clk);
      aw_valid = 1; aw_id = wt; aw_addr = wa; aw_len = wl;
      do begin #1 hs_w = aw_ready; @(negedge clk); end while (!hs_w);
      aw_valid = 0;
      wr_exp[wt].push_back('{addr: wa, len: wl});
      issued_wr++;
      wb = 0;
      while (wb <= int'(wl)) begin
        w_valid = 1; w_data = wr_pat(wa + 32'(4*wb)); w_last = (wb == int'(wl));
        do begin #1 hs_w = w_ready; @(negedge clk); end while (!hs_w);
        w_valid = 0;
        wb++;
      end
    end
  end

  initial begin : reader
    ar_valid = 0; ar_id = 0; ar_addr = 0; ar_len = 0;
    @(posedge rst_n); @(negedge clk);
    repeat (N_REQ/2) begin
      ra = rand_addr(); rl = 3'($urandom_range(0, 7)); rt = pick_tid();
      repeat ($urandom_range(0, 2)) @(negedge clk);
      ar_valid = 1; ar_id = rt; ar_addr = ra; ar_len = rl;
      do begin #1 hs_r = ar_ready; @(negedge clk); end while (!hs_r);
      ar_valid = 0;
      rd_exp[rt].push_back('{addr: ra, len: rl});
      issued_rd++;
    end
  end

  // ---- processor: response check ----------------------------------------------------------
  int rbeat = 0;
  always @(negedge clk) begin
    b_ready = ($urandom_range(0, 3) != 0);
    r_ready = ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (b_valid && b_ready) begin
      check(wr_exp[b_id].size() != 0, "B with no outstanding write of that ID");
      if (wr_exp[b_id].size() != 0) void'(wr_exp[b_id].pop_front());
      check(b_resp == 2'b00, "BRESP not OKAY");
      done_wr++;
    end
    if (r_valid && r_ready) begin
      check(rd_exp[r_id].size() != 0, "R with no outstanding read of that ID");
      if (rd_exp[r_id].size() != 0) begin
        exp_t e; e = rd_exp[r_id][0];
        check(r_data == rd_pat(e.addr + 32'(4*rbeat)),
              $sformatf("R data id=%0d beat=%0d", r_id, rbeat));
        check(r_last == (rbeat == int'(e.len)), "RLAST position");
        if (r_last) begin
          void'(rd_exp[r_id].pop_front()); rbeat = 0; done_rd++;
        end else rbeat++;
      end
    end
  end

  // ---- network model ----------------------------------------------------------------------------
  typedef struct { int due; int n; flit_t f[10]; } pkt_t;
  pkt_t pend[$];          // remote responses waiting for their delivery time
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic hdr_t mk_hdr(input logic [4:0] dst, input logic [4:0] src, input msg_type_e t,
                                  input logic [3:0] id, input logic [2:0] s, input logic [2:0] l);
    hdr_t h; h = '0; h.dst = dst; h.src = src; h.typ = t; h.tid = id; h.seq = s; h.len = l;
    return h;
  endfunction

  // outgoing link
  flit_t txp[$];
  // requests in the network per ID and sequence number: a new request must not
  // reuse the sequence number of another request of its ID still in flight
  int inflight [16][8];
  initial foreach (inflight[i, j]) inflight[i][j] = 0;
  always @(posedge clk) if (rst_n && rx_valid && rx_ready && rx_flit.head) begin
    hdr_t rh; rh = hdr_t'(rx_flit.data);
    inflight[rh.tid][rh.seq]--;
  end
  always @(negedge clk) tx_ready = ($urandom_range(0, 4) != 0);
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    txp.push_back(tx_flit);
    if (tx_flit.tail) begin
      hdr_t h; h = hdr_t'(txp[0].data);
      check(txp[0].head, "first flit of packet has head");
      check(!is_resp(h.typ), "master NI sends requests only");
      if (!is_resp(h.typ)) begin
        // remote memory: build the response
        pkt_t p; logic [31:0] a;
        a = txp[1].data;
        check(h.src == 0 && 32'(h.dst) == 10 + (a >> 20) % 15, "request routed by address map");
        check(txp.size() == ((h.typ == MT_WR_REQ) ? 3 + int'(h.len) : 2), "request length");
        check(inflight[h.tid][h.seq] == 0, $sformatf("sequence number %0d of ID %0d already in flight", h.seq, h.tid));
        inflight[h.tid][h.seq]++;
        if (h.typ == MT_WR_REQ)
          for (int b = 0; b <= int'(h.len); b++) check(txp[2+b].data == wr_pat(a + 32'(4*b)), "write flit data");
        p.due = cyc + $urandom_range(4, 300);
        p.f[0] = '{1'b1, h.typ == MT_WR_REQ, mk_hdr(h.src, h.dst, h.typ == MT_WR_REQ ? MT_WR_RESP : MT_RD_RESP, h.tid, h.seq, h.len)};
        p.n = 1;
        if (h.typ == MT_RD_REQ)
          for (int b = 0; b <= int'(h.len); b++) begin
            p.f[p.n] = '{1'b0, b == int'(h.len), rd_pat(a + 32'(4*b))}; p.n++;
          end
        pend.push_back(p);
      end
      txp.delete();
    end
  end

  // incoming link: one packet at a time, chosen at random among those due
  flit_t cur[$];
  initial begin
    rx_valid = 0; rx_flit = '0;
    @(posedge rst_n); @(negedge clk);
    forever begin
      @(negedge clk);
      if (cur.size() == 0) begin
        int ready_idx[$]; int pick;
        ready_idx.delete();
        foreach (pend[i]) if (pend[i].due <= cyc) ready_idx.push_back(i);
        pick = $urandom_range(0, 2);
        if (pick != 0 && ready_idx.size() != 0) begin
          int k; k = ready_idx[$urandom_range(0, ready_idx.size()-1)];
          for (int j = 0; j < pend[k].n; j++) cur.push_back(pend[k].f[j]);
          pend.delete(k);
        end
      end
      if (cur.size() != 0) begin
        rx_valid = 1; rx_flit = cur[0];
        do begin #1 hs_x = rx_ready; @(negedge clk); end while (!hs_x);
        void'(cur.pop_front());
        rx_valid = 0;
      end
    end
  end

  // ---- mechanism counters -------------------------------------------------------------------------
  int n_stall = 0, n_store = 0, n_rel = 0, n_store_hdr_only = 0;
  always @(posedge clk) if (rst_n) begin
    if (adm_stall) n_stall++;
    if (ooo_store) begin
      n_store++;
      if (dut.u_pq.st_flit.tail) n_store_hdr_only++;
    end
    if (rel_start) n_rel++;
    if (32'(rb_used) > 48) check(1'b0, "reorder buffer within 48 words");
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    wait (issued_rd + issued_wr == N_REQ && done_rd + done_wr == N_REQ);
    repeat (20) @(posedge clk);
    check(done_rd == N_REQ/2 && done_wr == N_REQ/2, "all processor requests completed");
    check(rb_used == 0, "reorder buffer empty at the end");
    $display("mechanisms: adm_stall_cycles=%0d ooo_stored=%0d (header-only %0d) released=%0d cycles=%0d",
             n_stall, n_store, n_store_hdr_only, n_rel, cyc);
    check(n_stall > 0, "admission stall happened");
    check(n_store > 0, "out-of-order store happened");
    check(n_store_hdr_only > 0, "header-only (write response) store happened");
    check(n_rel > 0, "release from reorder buffer happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: rd %0d/%0d wr %0d/%0d", done_rd, issued_rd, done_wr, issued_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
