// tb_slave_adapter: request headers turned into response descriptors.
// Random request headers are pushed into the header FIFO; an in-order slave
// model answers each with a B (write) or an R burst (read) after a random
// delay. Each descriptor must carry the response header (source and
// destination swapped, response type, same ID, sequence number and length,
// response code from the slave) and the right data-flit count; the R beats
// must reach the data output in order.
module tb_slave_adapter;
  import ni_pkg::*;
  localparam logic [4:0] ME = 5'd7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask
  logic hf_valid, hf_ready, b_valid, b_ready, r_valid, r_ready, r_last, desc_valid, desc_ready, d_valid, d_ready;
  hdr_t hf_hdr, desc_hdr; logic [3:0] b_id, r_id, desc_n_data; logic [1:0] b_resp, r_resp;
  logic [31:0] r_data, d_data;
  slave_adapter #(.NODE_ID(ME)) dut (.*);

  hdr_t req_q[$], exp_hdr[$]; int exp_n[$]; logic [31:0] exp_d[$];
  bit hs, hs2; int pushed = 0;
  initial begin
    hf_valid = 0; hf_hdr = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (200) begin
      hdr_t h; h = hdr_t'($urandom); h.typ = $urandom_range(0, 1) ? MT_WR_REQ : MT_RD_REQ;
      hf_valid = 1; hf_hdr = h;
      do begin #1 hs = hf_ready; @(negedge clk); end while (!hs);
      hf_valid = 0;
      req_q.push_back(h); pushed++;
      repeat ($urandom_range(0, 6)) @(negedge clk);
    end
  end
  // in-order slave model
  int rb;
  initial begin
    b_valid = 0; r_valid = 0; b_id = 0; b_resp = 0; r_id = 0; r_data = 0; r_resp = 0; r_last = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (req_q.size() != 0) begin
        hdr_t h, e; logic [1:0] rs;
        h = req_q.pop_front(); rs = 2'($urandom);
        e = h; e.dst = h.src; e.src = ME; e.typ = (h.typ == MT_WR_REQ) ? MT_WR_RESP : MT_RD_RESP; e.resp = rs; e.rsvd = 0;
        exp_hdr.push_back(e); exp_n.push_back((h.typ == MT_WR_REQ) ? 0 : int'(h.len) + 1);
        repeat ($urandom_range(0, 3)) @(negedge clk);
        if (h.typ == MT_WR_REQ) begin
          b_valid = 1; b_id = h.tid; b_resp = rs;
          do begin #1 hs2 = b_ready; @(negedge clk); end while (!hs2);
          b_valid = 0;
        end else begin
          rb = 0;
          while (rb <= int'(h.len)) begin
            logic [31:0] d; d = $urandom; exp_d.push_back(d);
            r_valid = 1; r_id = h.tid; r_data = d; r_resp = rs; r_last = (rb == int'(h.len));
            do begin #1 hs2 = r_ready; @(negedge clk); end while (!hs2);
            r_valid = 0; rb++;
          end
        end
      end
    end
  end
  always @(negedge clk) begin desc_ready = ($urandom_range(0, 2) != 0); d_ready = ($urandom_range(0, 2) != 0); end
  int n_desc = 0;
  always @(posedge clk) if (rst_n) begin
    if (desc_valid && desc_ready) begin
      check(exp_hdr.size() != 0 && desc_hdr == exp_hdr[0] && int'(desc_n_data) == exp_n[0], "response descriptor");
      if (exp_hdr.size() != 0) begin void'(exp_hdr.pop_front()); void'(exp_n.pop_front()); end
      n_desc++;
    end
    if (d_valid && d_ready) begin
      check(exp_d.size() != 0 && d_data == exp_d[0], "response data");
      if (exp_d.size() != 0) void'(exp_d.pop_front());
    end
  end
  initial begin
    wait (pushed == 200); wait (n_desc == 200 && exp_d.size() == 0);
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
