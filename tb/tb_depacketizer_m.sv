// tb_depacketizer_m: response packets turned into AXI B and R beats.
// Random write-response (header only) and read-response (header + 1..8 data
// flits) packets are fed with random gaps; each B must carry the header's ID
// and response code, each read burst must give its data beats in order with
// the header's ID and RRESP and RLAST on the last beat, under random
// BREADY/RREADY.
module tb_depacketizer_m;
  import ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask
  logic in_valid, in_ready, b_valid, b_ready, r_valid, r_ready, r_last;
  flit_t in_flit; logic [3:0] b_id, r_id; logic [1:0] b_resp, r_resp; logic [31:0] r_data;
  depacketizer_m dut (.*);

  typedef struct packed { logic is_b; logic [3:0] id; logic [1:0] resp; logic [31:0] data; logic last; } beat_t;
  beat_t exp_q[$];
  bit hs; int sent = 0;
  initial begin
    in_valid = 0; in_flit = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (300) begin
      hdr_t h; int n; flit_t f[$];
      f.delete();
      h = hdr_t'($urandom); h.typ = $urandom_range(0, 1) ? MT_WR_RESP : MT_RD_RESP;
      n = (h.typ == MT_WR_RESP) ? 0 : int'(h.len) + 1;
      f.push_back('{1'b1, n == 0, h});
      if (n == 0) exp_q.push_back('{1'b1, h.tid, h.resp, 32'h0, 1'b0});
      for (int i = 0; i < n; i++) begin
        logic [31:0] d; d = $urandom;
        f.push_back('{1'b0, i == n-1, d});
        exp_q.push_back('{1'b0, h.tid, h.resp, d, i == n-1});
      end
      foreach (f[i]) begin
        repeat ($urandom_range(0, 1)) @(negedge clk);
        in_valid = 1; in_flit = f[i];
        do begin #1 hs = in_ready; @(negedge clk); end while (!hs);
        in_valid = 0;
      end
      sent++;
    end
  end
  always @(negedge clk) begin b_ready = ($urandom_range(0, 2) != 0); r_ready = ($urandom_range(0, 2) != 0); end
  always @(posedge clk) if (rst_n) begin
    check(!(b_valid && r_valid), "B and R never together");
    if (b_valid && b_ready) begin
      check(exp_q.size() != 0 && exp_q[0].is_b && b_id == exp_q[0].id && b_resp == exp_q[0].resp, "B beat");
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    if (r_valid && r_ready) begin
      check(exp_q.size() != 0 && !exp_q[0].is_b && r_id == exp_q[0].id && r_resp == exp_q[0].resp &&
            r_data == exp_q[0].data && r_last == exp_q[0].last, $sformatf("R beat id %0d/%0d resp %0d/%0d data %h/%h last %0d/%0d isb %0d", r_id, exp_q[0].id, r_resp, exp_q[0].resp, r_data, exp_q[0].data, r_last, exp_q[0].last, exp_q[0].is_b));
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end
  initial begin
    wait (sent == 300); wait (exp_q.size() == 0);
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
