// tb_depacketizer_s: request packets turned into AXI commands for a slave.
// Random read requests (header + address) and write requests (header +
// address + 1..8 data flits) are fed in. Each must produce one AR or AW with
// the header's ID and burst length and the address flit's address, one push
// of the header into the header FIFO, and for writes the data as W beats with
// WLAST on the last, under random AW/AR/W/FIFO readiness.
module tb_depacketizer_s;
  import ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask
  logic in_valid, in_ready, aw_valid, aw_ready, w_valid, w_ready, w_last, ar_valid, ar_ready, hf_valid, hf_ready;
  flit_t in_flit; hdr_t hf_hdr;
  logic [3:0] aw_id, ar_id; logic [31:0] aw_addr, ar_addr, w_data; logic [2:0] aw_len, ar_len;
  depacketizer_s dut (.*);

  typedef struct packed { logic wr; logic [3:0] id; logic [31:0] addr; logic [2:0] len; } cmd_t;
  cmd_t exp_cmd[$]; hdr_t exp_hdr[$];
  typedef struct packed { logic [31:0] d; logic last; } wb_t;
  wb_t exp_w[$];
  bit hs; int sent = 0;
  initial begin
    in_valid = 0; in_flit = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (300) begin
      hdr_t h; logic [31:0] a; int n; flit_t f[$];
      f.delete();
      h = hdr_t'($urandom); h.typ = $urandom_range(0, 1) ? MT_WR_REQ : MT_RD_REQ; a = $urandom;
      n = (h.typ == MT_WR_REQ) ? int'(h.len) + 1 : 0;
      exp_cmd.push_back('{h.typ == MT_WR_REQ, h.tid, a, h.len});
      exp_hdr.push_back(h);
      f.push_back('{1'b1, 1'b0, h});
      f.push_back('{1'b0, n == 0, a});
      for (int i = 0; i < n; i++) begin
        logic [31:0] d; d = $urandom;
        f.push_back('{1'b0, i == n-1, d}); exp_w.push_back('{d, i == n-1});
      end
      foreach (f[i]) begin
        in_valid = 1; in_flit = f[i];
        do begin #1 hs = in_ready; @(negedge clk); end while (!hs);
        in_valid = 0;
      end
      sent++;
    end
  end
  always @(negedge clk) begin
    aw_ready = ($urandom_range(0, 2) != 0); ar_ready = ($urandom_range(0, 2) != 0);
    w_ready = ($urandom_range(0, 2) != 0);  hf_ready = ($urandom_range(0, 2) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (aw_valid && aw_ready) begin
      check(exp_cmd.size() != 0 && exp_cmd[0] == '{1'b1, aw_id, aw_addr, aw_len}, "AW command");
      if (exp_cmd.size() != 0) void'(exp_cmd.pop_front());
    end
    if (ar_valid && ar_ready) begin
      check(exp_cmd.size() != 0 && exp_cmd[0] == '{1'b0, ar_id, ar_addr, ar_len}, "AR command");
      if (exp_cmd.size() != 0) void'(exp_cmd.pop_front());
    end
    if (w_valid && w_ready) begin
      check(exp_w.size() != 0 && exp_w[0] == '{w_data, w_last}, "W beat");
      if (exp_w.size() != 0) void'(exp_w.pop_front());
    end
    if (hf_valid && hf_ready) begin
      check(exp_hdr.size() != 0 && exp_hdr[0] == hf_hdr, "header FIFO push");
      if (exp_hdr.size() != 0) void'(exp_hdr.pop_front());
    end
  end
  initial begin
    wait (sent == 300); wait (exp_cmd.size() == 0 && exp_w.size() == 0 && exp_hdr.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
