// tb_axi_queue: AXI write/read channels buffered and arbitrated.
// Random AW, AR and W traffic is accepted under random downstream readiness.
// Checks: writes leave in AW order and reads in AR order, each with its ID,
// address, length and direction; write data beats leave in order; and when
// both request buffers hold a request at a hand-over, the granted direction
// alternates (round robin).
module tb_axi_queue;
  import ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask
  logic aw_valid, aw_ready, w_valid, w_ready, w_last, ar_valid, ar_ready, req_valid, req_ready, wd_valid, wd_ready;
  logic [3:0] aw_id, ar_id; logic [31:0] aw_addr, ar_addr, w_data; logic [2:0] aw_len, ar_len;
  req_msg_t req; wbeat_t wd;
  axi_queue dut (.*);

  req_msg_t wq[$], rq[$]; wbeat_t wdq[$];
  bit hs_a, hs_r, hs_w; int n_w = 0, n_r = 0;
  initial begin
    aw_valid = 0; aw_id = 0; aw_addr = 0; aw_len = 0; w_valid = 0; w_data = 0; w_last = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    fork
      repeat (200) begin
        req_msg_t m; m = '{1'b1, 4'($urandom), $urandom, 3'($urandom)};
        repeat ($urandom_range(0, 3)) @(negedge clk);
        aw_valid = 1; aw_id = m.tid; aw_addr = m.addr; aw_len = m.len;
        do begin #1 hs_a = aw_ready; @(negedge clk); end while (!hs_a);
        aw_valid = 0; wq.push_back(m); n_w++;
        for (int i = 0; i <= int'(m.len); i++) begin
          wbeat_t b; b = '{$urandom, i == int'(m.len)};
          w_valid = 1; w_data = b.data; w_last = b.last;
          do begin #1 hs_w = w_ready; @(negedge clk); end while (!hs_w);
          w_valid = 0; wdq.push_back(b);
        end
      end
      repeat (200) begin
        req_msg_t m; m = '{1'b0, 4'($urandom), $urandom, 3'($urandom)};
        repeat ($urandom_range(0, 3)) @(negedge clk);
        ar_valid = 1; ar_id = m.tid; ar_addr = m.addr; ar_len = m.len;
        do begin #1 hs_r = ar_ready; @(negedge clk); end while (!hs_r);
        ar_valid = 0; rq.push_back(m); n_r++;
      end
    join_none
  end
  initial begin ar_valid = 0; ar_id = 0; ar_addr = 0; ar_len = 0; end
  always @(negedge clk) begin req_ready = ($urandom_range(0, 3) == 0); wd_ready = ($urandom_range(0, 1) == 0); end
  int got_w = 0, got_r = 0, both = 0, alt = 0; int last = -1;
  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready) begin
      if (wq.size() != 0 && rq.size() != 0 && last != -1) begin
        both++;
        if (int'(req.is_write) != last) alt++;
      end
      last = int'(req.is_write);
      if (req.is_write) begin
        check(wq.size() != 0 && req == wq[0], "write request in AW order");
        if (wq.size() != 0) void'(wq.pop_front());
        got_w++;
      end else begin
        check(rq.size() != 0 && req == rq[0], "read request in AR order");
        if (rq.size() != 0) void'(rq.pop_front());
        got_r++;
      end
    end
    if (wd_valid && wd_ready) begin
      check(wdq.size() != 0 && wd == wdq[0], "write data in order");
      if (wdq.size() != 0) void'(wdq.pop_front());
    end
  end
  initial begin
    wait (got_w == 200 && got_r == 200); wait (wdq.size() == 0);
    $display("both_waiting=%0d alternations=%0d", both, alt);
    check(both > 20 && alt == both, "round robin between write and read buffers");
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
