// tb_slave_ni: slave-side network interface with an AXI memory model.
// Random read and write request packets from random source nodes arrive on
// the router link. The memory model accepts AW/AR/W with random readiness,
// checks write data against the pattern the sender used, answers in order
// after random delays, and returns reads as a fixed pattern of the address.
// Every response packet on the outgoing link is checked: sent back to the
// requester, marked with this node as source, same ID and sequence number,
// response type, length (1 flit for writes, 1+burst for reads) and data.
module tb_slave_ni;
  import ni_pkg::*;
  localparam logic [4:0] ME = 5'd12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask
  function automatic logic [31:0] rd_pat(input logic [31:0] a); return (a * 32'h9E3779B1) ^ 32'h1234_5678; endfunction
  function automatic logic [31:0] wr_pat(input logic [31:0] a); return (a * 32'h85EBCA6B) + 32'h0BAD_F00D; endfunction

  logic rx_valid, rx_ready, tx_valid, tx_ready;
  flit_t rx_flit, tx_flit;
  logic aw_valid, aw_ready, w_valid, w_ready, w_last, b_valid, b_ready, ar_valid, ar_ready, r_valid, r_ready, r_last;
  logic [3:0] aw_id, b_id, ar_id, r_id; logic [31:0] aw_addr, ar_addr, w_data, r_data;
  logic [2:0] aw_len, ar_len; logic [1:0] b_resp, r_resp;
  slave_ni #(.NODE_ID(ME)) dut (.*);

  localparam int N = 200;
  hdr_t exp_q[$]; logic [31:0] exp_a[$];
  bit hs, hs2; int sent = 0, got = 0;
  initial begin
    rx_valid = 0; rx_flit = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (N) begin
      hdr_t h; logic [31:0] a; int n; flit_t f[$];
      f.delete();
      h = '0; h.dst = ME; h.src = 5'($urandom_range(0, 24)); h.typ = $urandom_range(0, 1) ? MT_WR_REQ : MT_RD_REQ;
      h.tid = 4'($urandom); h.seq = 3'($urandom); h.len = 3'($urandom);
      a = {$urandom_range(0, 1 << 18), 2'b00};
      n = (h.typ == MT_WR_REQ) ? int'(h.len) + 1 : 0;
      f.push_back('{1'b1, 1'b0, h}); f.push_back('{1'b0, n == 0, a});
      for (int i = 0; i < n; i++) f.push_back('{1'b0, i == n-1, wr_pat(a + 32'(4*i))});
      exp_q.push_back(h); exp_a.push_back(a);
      foreach (f[i]) begin
        rx_valid = 1; rx_flit = f[i];
        do begin #1 hs = rx_ready; @(negedge clk); end while (!hs);
        rx_valid = 0;
      end
      sent++;
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
  end
  // memory model
  typedef struct packed { logic wr; logic [3:0] id; logic [31:0] addr; logic [2:0] len; } cmd_t;
  cmd_t mq[$], wq[$]; int wbeat = 0;
  always @(negedge clk) begin
    aw_ready = ($urandom_range(0, 2) != 0); ar_ready = ($urandom_range(0, 2) != 0);
    w_ready = ($urandom_range(0, 2) != 0);  tx_ready = ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (aw_valid && aw_ready) begin mq.push_back('{1'b1, aw_id, aw_addr, aw_len}); wq.push_back('{1'b1, aw_id, aw_addr, aw_len}); end
    if (ar_valid && ar_ready) mq.push_back('{1'b0, ar_id, ar_addr, ar_len});
    if (w_valid && w_ready) begin
      check(wq.size() != 0 && w_data == wr_pat(wq[0].addr + 32'(4*wbeat)) && w_last == (wbeat == int'(wq[0].len)), "W beat");
      if (w_last) begin if (wq.size() != 0) void'(wq.pop_front()); wbeat = 0; end else wbeat++;
    end
  end
  int rb;
  initial begin
    b_valid = 0; r_valid = 0; b_id = 0; b_resp = 0; r_id = 0; r_data = 0; r_resp = 0; r_last = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (mq.size() != 0) begin
        cmd_t c; c = mq.pop_front();
        repeat ($urandom_range(0, 4)) @(negedge clk);
        if (c.wr) begin
          b_valid = 1; b_id = c.id; b_resp = 0;
          do begin #1 hs2 = b_ready; @(negedge clk); end while (!hs2);
          b_valid = 0;
        end else begin
          rb = 0;
          while (rb <= int'(c.len)) begin
            r_valid = 1; r_id = c.id; r_data = rd_pat(c.addr + 32'(4*rb)); r_resp = 0; r_last = (rb == int'(c.len));
            do begin #1 hs2 = r_ready; @(negedge clk); end while (!hs2);
            r_valid = 0; rb++;
          end
        end
      end
    end
  end
  // response checker
  flit_t txp[$];
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    txp.push_back(tx_flit);
    if (tx_flit.tail) begin
      hdr_t h, e; logic [31:0] a;
      h = hdr_t'(txp[0].data);
      check(exp_q.size() != 0, "response expected");
      if (exp_q.size() != 0) begin
        e = exp_q.pop_front(); a = exp_a.pop_front();
        check(txp[0].head && h.dst == e.src && h.src == ME && h.tid == e.tid && h.seq == e.seq && h.len == e.len &&
              h.typ == ((e.typ == MT_WR_REQ) ? MT_WR_RESP : MT_RD_RESP), "response header");
        check(txp.size() == ((e.typ == MT_WR_REQ) ? 1 : 2 + int'(e.len)), "response length");
        if (e.typ == MT_RD_REQ)
          for (int i = 1; i < txp.size(); i++) check(txp[i].data == rd_pat(a + 32'(4*(i-1))), "response data");
      end
      got++;
      txp.delete();
    end
  end
  initial begin
    wait (sent == N && got == N);
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
