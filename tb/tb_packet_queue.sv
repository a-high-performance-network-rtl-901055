// tb_packet_queue: incoming packets routed by the reorder unit's verdict.
// Random packets (1..9 flits) enter with random gaps. The testbench answers
// each lookup after a random delay with a random verdict, checks that the
// lookup shows the packet's header, and that the whole packet then leaves on
// the depacketizer port (in order) or the reorder-buffer port (out of order),
// flit for flit, and that the tail pulse marks only in-order tails.
module tb_packet_queue;
  import ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask
  logic in_valid, in_ready, lk_valid, lk_ready, lk_in_order, dp_valid, dp_ready, dp_tail_fire, st_valid, st_ready;
  flit_t in_flit, dp_flit, st_flit; hdr_t lk_hdr;
  packet_queue dut (.*);

  flit_t exp_q[$];   // all flits in arrival order
  bit verdict_q[$];
  bit hs; int sent = 0, n_dp = 0, n_st = 0;
  initial begin
    in_valid = 0; in_flit = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (300) begin
      int n; n = $urandom_range(1, 9);
      for (int i = 0; i < n; i++) begin
        flit_t f; f = '{i == 0, i == n-1, $urandom};
        exp_q.push_back(f);
        in_valid = ($urandom_range(0, 3) != 0); in_flit = f;
        while (!in_valid) begin @(negedge clk); in_valid = 1; end
        do begin #1 hs = in_ready; @(negedge clk); end while (!hs);
        in_valid = 0;
      end
      sent++;
    end
  end
  // reorder unit model
  always @(negedge clk) begin
    lk_ready = ($urandom_range(0, 2) == 0);
    lk_in_order = $urandom_range(0, 1);
    dp_ready = ($urandom_range(0, 3) != 0);
    st_ready = ($urandom_range(0, 3) != 0);
  end
  bit cur_route, routed = 0;
  always @(posedge clk) if (rst_n) begin
    if (lk_valid) check(exp_q.size() != 0 && lk_hdr == hdr_t'(exp_q[0].data) && exp_q[0].head, "lookup shows header");
    if (lk_valid && lk_ready) begin
      check(!routed, "one lookup per packet");
      routed = 1; cur_route = lk_in_order;
    end
    check(!(dp_valid && st_valid), "one port at a time");
    if ((dp_valid && dp_ready) || (st_valid && st_ready)) begin
      flit_t f; f = dp_valid ? dp_flit : st_flit;
      check(routed && (dp_valid == cur_route), "port follows verdict");
      check(exp_q.size() != 0 && f == exp_q[0], "flit content and order");
      check(dp_tail_fire == (dp_valid && f.tail), "tail pulse");
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      if (f.tail) begin routed = 0; if (dp_valid) n_dp++; else n_st++; end
    end else check(!dp_tail_fire, "no tail pulse without transfer");
  end
  initial begin
    wait (sent == 300); wait (exp_q.size() == 0);
    $display("to depacketizer=%0d to reorder buffer=%0d", n_dp, n_st);
    check(n_dp + n_st == 300 && n_dp > 0 && n_st > 0, "all packets routed both ways");
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
