// tb_reorder_unit: batch test of the reorder unit at its default size.
//
// Each round admits read and write requests on IDs 0..3 until the admission
// check refuses one (48-word buffer or 16 outstanding messages), checking
// each sequence number against a per-ID count. The testbench then plays the
// packet queue: it presents the response packets in a random order, checks the
// in-order verdict against a model of the next expected sequence number per
// ID, streams out-of-order packets into the unit and signals the tail of
// in-order ones. Everything delivered (directly or released from the reorder
// buffer) is logged per ID and must come out in sequence order with its
// payload intact. Forty rounds are run; in every fifth round all requests are
// 8-beat reads, and exactly six must be admitted (6 x 8 = 48 words) before
// the seventh is refused.
module tb_reorder_unit;
  import ni_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  logic adm_valid, adm_is_write, adm_ready, lk_valid, lk_ready, lk_in_order, pq_tail_fire;
  logic [3:0] adm_tid; logic [2:0] adm_len, adm_seq;
  hdr_t lk_hdr;
  logic st_valid, st_ready, rel_active, rel_valid, rel_ready;
  flit_t st_flit, rel_flit;
  logic [5:0] reserved_o, used_slots_o;

  reorder_unit dut (.*);

  typedef struct { hdr_t h; int n; logic [31:0] d[8]; } pkt_t;
  pkt_t pk[$];
  int next_exp[4];        // next sequence number to be delivered, per ID
  int n_out[4];           // admitted in this round, per ID
  int n_refused = 0, n_ooo = 0, n_direct = 0, n_rel = 0, n_b8 = 0, round;
  bit b8;
  bit hs;

  // delivered log check (direct and released)
  task automatic delivered(hdr_t h);
    check(int'(h.seq) == next_exp[h.tid] % 8, $sformatf("delivery order tid=%0d seq=%0d exp=%0d", h.tid, h.seq, next_exp[h.tid] % 8));
    next_exp[h.tid]++;
  endtask

  // released packets
  hdr_t rh; int rbeat; pkt_t ref_p;
  always @(negedge clk) rel_ready = ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n && rel_valid && rel_ready) begin
    check(rel_active, "release while rel_active");
    if (rel_flit.head) begin
      rh = hdr_t'(rel_flit.data); rbeat = 0; n_rel++;
      delivered(rh);
      foreach (pk_all[i]) if (pk_all[i].h == rh) ref_p = pk_all[i];
      check(rel_flit.tail == (ref_p.n == 0), "released header tail");
    end else begin
      check(rel_flit.data == ref_p.d[rbeat], "released payload");
      check(rel_flit.tail == (rbeat == ref_p.n - 1), "released tail");
      rbeat++;
    end
  end
  pkt_t pk_all[$];

  initial begin
    adm_valid = 0; adm_is_write = 0; adm_tid = 0; adm_len = 0; lk_valid = 0; lk_hdr = '0;
    pq_tail_fire = 0; st_valid = 0; st_flit = '0;
    foreach (next_exp[i]) next_exp[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (round = 0; round < 40; round++) begin
      int resv; resv = 0;
      b8 = (round % 5 == 0);
      foreach (n_out[i]) begin n_out[i] = 0; next_exp[i] = 0; end
      pk_all.delete();
      // admission until refused
      while (1) begin
        pkt_t p; hdr_t h; int t, l; bit w;
        @(negedge clk);
        t = $urandom_range(0, 3); l = $urandom_range(0, 7); w = ($urandom_range(0, 3) == 0);
        if (b8) begin l = 7; w = 0; end
        adm_valid = 1; adm_tid = 4'(t); adm_len = 3'(l); adm_is_write = w;
        #1;
        if (!adm_ready) begin
          n_refused++;
          check(resv + (w ? 0 : l + 1) > 48 || pk_all.size() == 16 || n_out[t] == 8, "refusal has a reason");
          adm_valid = 0;
          break;
        end
        check(!(resv + (w ? 0 : l + 1) > 48 || pk_all.size() == 16 || n_out[t] == 8), "admitted only with room");
        check(int'(adm_seq) == (next_exp[t] + n_out[t]) % 8, "admitted sequence number");
        h = '0; h.typ = w ? MT_WR_RESP : MT_RD_RESP; h.tid = 4'(t); h.seq = adm_seq; h.len = 3'(l);
        h.rsvd = 8'($urandom);
        p.h = h; p.n = w ? 0 : l + 1;
        for (int i = 0; i < 8; i++) p.d[i] = $urandom;
        pk_all.push_back(p);
        n_out[t]++; resv += p.n;
      end
      if (b8) begin
        check(pk_all.size() == 6 && resv == 48, "48-word buffer admits exactly six 8-beat reads");
        n_b8++;
      end
      // responses in random order
      pk = pk_all;
      pk.shuffle();
      while (pk.size() != 0) begin
        pkt_t p; bit exp_in;
        p = pk.pop_front();
        @(negedge clk);
        lk_valid = 1; lk_hdr = p.h;
        do begin #1 hs = lk_ready; if (hs) exp_in = (int'(p.h.seq) == next_exp[p.h.tid] % 8);
                 if (hs) check(lk_in_order == exp_in, "in-order verdict");
                 @(negedge clk); end while (!hs);
        lk_valid = 0;
        if (exp_in) begin
          n_direct++;
          delivered(p.h);
          repeat ($urandom_range(0, 3)) @(negedge clk);
          pq_tail_fire = 1; @(negedge clk); pq_tail_fire = 0;
        end else begin
          n_ooo++;
          for (int i = 0; i <= p.n; i++) begin
            st_valid = 1;
            st_flit = (i == 0) ? '{1'b1, p.n == 0, p.h} : '{1'b0, i == p.n, p.d[i-1]};
            do begin #1 hs = st_ready; @(negedge clk); end while (!hs);
          end
          st_valid = 0;
        end
      end
      repeat (60) @(negedge clk);
      check(used_slots_o == 0 && reserved_o == 0, "buffer and reservation empty after round");
    end
    $display("refused=%0d direct=%0d stored=%0d released=%0d", n_refused, n_direct, n_ooo, n_rel);
    check(n_ooo == n_rel && n_ooo > 100, "every stored packet released");
    check(n_b8 == 8, "six-burst rounds run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
