// tb_reorder_store: random test of the reorder table and linked-list buffer.
//
// Packets with distinct (T-ID, S-N) and 0..8 payload flits are written while
// the model says a row and enough slots are free; stored packets are released
// in random order, so the free slots get fragmented and later packets are
// spread over non-contiguous slots. Every released packet must equal what was
// stored: header word, flit count, head/tail marks and payload in order. The
// query must hit exactly the stored (T-ID, S-N) pairs; the used-slot count
// must match the model. A small buffer (16 slots, 6 rows) keeps it full.
module tb_reorder_store;
  import ni_pkg::*;
  localparam int RB = 16, ROWS = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  logic wr_valid, wr_ready, q_hit, rel_start, rel_busy, rel_valid, rel_ready;
  flit_t wr_flit, rel_flit;
  logic [3:0] q_tid; logic [2:0] q_seq;
  logic [4:0] used_slots; logic [2:0] used_rows;

  reorder_store #(.RB_DEPTH(RB), .RT_ROWS(ROWS)) dut (.*);

  typedef struct { logic [3:0] tid; logic [2:0] seq; int n; logic [31:0] hdr; logic [31:0] d[8]; } pkt_t;
  pkt_t st[$];
  int slots = 0, n_wr = 0, n_rel = 0, n_frag = 0;
  bit hs;

  function automatic bit key_used(logic [3:0] t, logic [2:0] s);
    foreach (st[i]) if (st[i].tid == t && st[i].seq == s) return 1;
    return 0;
  endfunction

  initial begin
    wr_valid = 0; wr_flit = '0; rel_start = 0; rel_ready = 0; q_tid = 0; q_seq = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (600) begin
      @(negedge clk);
      if ($urandom_range(0, 1) == 0 && st.size() < ROWS) begin
        pkt_t p; hdr_t h;
        p.n = $urandom_range(0, 8);
        if (slots + p.n <= RB) begin
          do begin p.tid = 4'($urandom); p.seq = 3'($urandom); end while (key_used(p.tid, p.seq));
          h = hdr_t'($urandom); h.tid = p.tid; h.seq = p.seq; p.hdr = h;
          for (int i = 0; i < p.n; i++) p.d[i] = $urandom;
          wr_valid = 1; wr_flit = '{1'b1, p.n == 0, p.hdr};
          #1 check(wr_ready, "row free for header");
          @(negedge clk);
          for (int i = 0; i < p.n; i++) begin
            wr_flit = '{1'b0, i == p.n - 1, p.d[i]};
            #1 check(wr_ready, "slot free for payload");
            @(negedge clk);
          end
          wr_valid = 0;
          st.push_back(p); slots += p.n; n_wr++;
          #1 check(int'(used_slots) == slots, "used slot count");
        end
      end else if (st.size() != 0) begin
        int k; pkt_t p; int got;
        k = $urandom_range(0, st.size()-1); p = st[k];
        if (k != 0) n_frag++;
        q_tid = p.tid; q_seq = p.seq + 3'd1;
        #1 check(q_hit == key_used(q_tid, q_seq), "query miss/hit for other seq");
        q_seq = p.seq;
        #1 check(q_hit, "query hits stored packet");
        rel_start = 1;
        @(negedge clk);
        rel_start = 0;
        got = 0;
        while (1) begin
          rel_ready = ($urandom_range(0, 2) != 0);
          #1 hs = rel_valid && rel_ready;
          if (hs) begin
            if (got == 0) check(rel_flit.head && rel_flit.data == p.hdr, "released header");
            else check(!rel_flit.head && rel_flit.data == p.d[got-1], $sformatf("released payload %0d", got-1));
            check(rel_flit.tail == (got == p.n), "tail mark");
          end
          @(negedge clk);
          if (hs) begin
            got++;
            if (got == p.n + 1) break;
          end
        end
        rel_ready = 0;
        st.delete(k); slots -= p.n; n_rel++;
        #1 check(!rel_busy && int'(used_slots) == slots, "slots freed after release");
        q_tid = p.tid; q_seq = p.seq;
        #1 check(!q_hit, "released row invalid");
      end
    end
    $display("written=%0d released=%0d out_of_fifo_order=%0d", n_wr, n_rel, n_frag);
    check(n_wr > 50 && n_frag > 20, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
