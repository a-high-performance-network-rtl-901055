// tb_packetizer: random message descriptors turned into packets.
// For each descriptor the expected flit sequence (header, optional address,
// n data flits from the data stream, head/tail marks) is built in the
// testbench and compared flit by flit with the output, under random
// backpressure and gaps in the data stream. Also checks that a packet with
// no address and no data is a single head+tail flit, and that with no
// stalls the packetizer sends one flit per cycle.
module tb_packetizer;
  import ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask
  logic desc_valid, desc_ready, desc_has_addr, d_valid, d_ready, out_valid, out_ready;
  hdr_t desc_hdr; logic [31:0] desc_addr, d_data; logic [3:0] desc_n_data;
  flit_t out_flit;
  packetizer dut (.*);

  flit_t exp_q[$];
  logic [31:0] data_q[$];
  bit hs, full_speed = 0;
  int n_pkt = 0, n_hdr_only = 0;

  initial begin
    desc_valid = 0; desc_has_addr = 0; desc_hdr = '0; desc_addr = 0; desc_n_data = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      hdr_t h; bit ha; int n; logic [31:0] a;
      h = hdr_t'($urandom); ha = $urandom_range(0, 1); n = $urandom_range(0, 8); a = $urandom;
      if (k >= 290) full_speed = 1;
      exp_q.push_back('{1'b1, !ha && n == 0, h});
      if (ha) exp_q.push_back('{1'b0, n == 0, a});
      for (int i = 0; i < n; i++) begin
        logic [31:0] d; d = $urandom; data_q.push_back(d);
        exp_q.push_back('{1'b0, i == n-1, d});
      end
      if (!ha && n == 0) n_hdr_only++;
      desc_valid = 1; desc_hdr = h; desc_has_addr = ha; desc_addr = a; desc_n_data = 4'(n);
      do begin #1 hs = desc_ready; @(negedge clk); end while (!hs);
      desc_valid = 0;
      n_pkt++;
    end
  end
  // data stream with random gaps
  always @(negedge clk) begin
    d_valid = (data_q.size() != 0) && (full_speed || $urandom_range(0, 3) != 0);
    d_data  = (data_q.size() != 0) ? data_q[0] : '0;
    out_ready = full_speed || ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) if (rst_n && d_valid && d_ready) void'(data_q.pop_front());
  int got = 0, idle_in_pkt = 0;
  bit in_pkt = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      check(exp_q.size() != 0 && out_flit == exp_q[0], $sformatf("flit %0d", got));
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      in_pkt = !out_flit.tail;
      got++;
    end else if (full_speed && in_pkt) idle_in_pkt++;
  end
  initial begin
    wait (n_pkt == 300);
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    check(n_hdr_only > 0, "header-only packets seen");
    check(idle_in_pkt == 0, "one flit per cycle without stalls");
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
