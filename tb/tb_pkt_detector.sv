// tb_pkt_detector: request/response packets split onto two outputs.
// Random packets of all four types (1..10 flits) arrive with random gaps;
// each must leave whole, in order, on the slave side if it is a request and on
// the master side if it is a response, with backpressure from either side.
module tb_pkt_detector;
  import ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask
  logic in_valid, in_ready, req_valid, req_ready, resp_valid, resp_ready;
  flit_t in_flit, req_flit, resp_flit;
  pkt_detector dut (.*);
  flit_t exp_req[$], exp_resp[$];
  bit hs; int sent = 0;
  initial begin
    in_valid = 0; in_flit = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (300) begin
      int n; hdr_t h;
      n = $urandom_range(1, 10); h = hdr_t'($urandom);
      for (int i = 0; i < n; i++) begin
        flit_t f; f = '{i == 0, i == n-1, (i == 0) ? 32'(h) : $urandom};
        if (is_resp(h.typ)) exp_resp.push_back(f); else exp_req.push_back(f);
        repeat ($urandom_range(0, 1)) @(negedge clk);
        in_valid = 1; in_flit = f;
        do begin #1 hs = in_ready; @(negedge clk); end while (!hs);
        in_valid = 0;
      end
      sent++;
    end
  end
  always @(negedge clk) begin req_ready = ($urandom_range(0, 2) != 0); resp_ready = ($urandom_range(0, 2) != 0); end
  always @(posedge clk) if (rst_n) begin
    check(!(req_valid && resp_valid), "one output at a time");
    if (req_valid && req_ready) begin
      check(exp_req.size() != 0 && req_flit == exp_req[0], "request flit");
      if (exp_req.size() != 0) void'(exp_req.pop_front());
    end
    if (resp_valid && resp_ready) begin
      check(exp_resp.size() != 0 && resp_flit == exp_resp[0], "response flit");
      if (exp_resp.size() != 0) void'(exp_resp.pop_front());
    end
  end
  initial begin
    wait (sent == 300); wait (exp_req.size() == 0 && exp_resp.size() == 0);
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
