// tb_flit_arbiter: two random packet streams merged onto one link.
// Checks that packets are never interleaved (each packet's flits are
// contiguous on the output), that every packet of each input arrives complete
// and in order, and that when both inputs wait at a packet boundary the grant
// alternates (round robin).
module tb_flit_arbiter;
  import ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask
  logic a_valid, a_ready, b_valid, b_ready, out_valid, out_ready;
  flit_t a_flit, b_flit, out_flit;
  flit_arbiter dut (.*);

  localparam int NPKT = 200;
  flit_t exp_q[2][$];
  bit hs_a, hs_b;
  // generators: data = {src, packet number, flit number}
  task automatic gen(input int src);
    for (int p = 0; p < NPKT; p++) begin
      int n; n = $urandom_range(1, 6);
      for (int f = 0; f < n; f++) exp_q[src].push_back('{f == 0, f == n-1, {8'(src), 16'(p), 8'(f)}});
    end
  endtask
  initial begin
    a_valid = 0; b_valid = 0; a_flit = '0; b_flit = '0;
    gen(0); gen(1);
    repeat (3) @(negedge clk); rst_n = 1;
    fork
      begin
        flit_t q[$]; q = exp_q[0];
        while (q.size() != 0) begin
          a_valid = ($urandom_range(0, 3) != 0); a_flit = q[0];
          #1 hs_a = a_valid && a_ready; @(negedge clk);
          if (hs_a) void'(q.pop_front());
        end
        a_valid = 0;
      end
      begin
        flit_t q[$]; q = exp_q[1];
        while (q.size() != 0) begin
          b_valid = ($urandom_range(0, 3) != 0); b_flit = q[0];
          #1 hs_b = b_valid && b_ready; @(negedge clk);
          if (hs_b) void'(q.pop_front());
        end
        b_valid = 0;
      end
    join_none
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 4) != 0);
  int cur_src = -1, got = 0, both_wait = 0, alternations = 0, last_src = -1;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int src; src = int'(out_flit.data[31:24]);
    if (out_flit.head) begin
      check(cur_src == -1, "new packet only after a tail");
      if (a_valid && b_valid) begin
        both_wait++;
        if (last_src != -1 && src != last_src) alternations++;
      end
      cur_src = src;
      last_src = src;
    end else check(src == cur_src, "flits of one packet contiguous");
    check(exp_q[src].size() != 0 && out_flit == exp_q[src][0], "flit order and content per input");
    if (exp_q[src].size() != 0) void'(exp_q[src].pop_front());
    if (out_flit.tail) cur_src = -1;
    got++;
  end
  initial begin
    wait (rst_n);
    wait (exp_q[0].size() == 0 && exp_q[1].size() == 0);
    $display("flits=%0d both_waiting=%0d alternations=%0d", got, both_wait, alternations);
    check(both_wait > 20 && alternations == both_wait, "round robin when both wait");
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
