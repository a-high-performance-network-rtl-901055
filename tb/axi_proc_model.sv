// axi_proc_model: behavioural AXI master (a processor core) for the system
// testbenches. Not synthesizable.
//
// It issues N_REQ/2 writes and N_REQ/2 reads, with a random burst length
// (1..8 beats) and a random ID. Most IDs are 0..3, so that requests of one ID
// pile up. Addresses are spread uniformly over the regions 0..N_REGION-1 of
// 1 MiB each. Write data is wr_pat(address) and read data is expected to be
// rd_pat(address); an axi_mem_model answers with those patterns. Each R and B
// beat is checked against per-ID queues of the issued requests, so responses
// of one ID must come back in issue order with the right data and length.
// Inputs are driven on the falling clock edge, outputs sampled on the rising
// edge. `done` rises once every request has completed.
module axi_proc_model #(
  parameter int N_REQ    = 100,
  parameter int N_REGION = 25
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        aw_valid,
  input  logic        aw_ready,
  output logic [3:0]  aw_id,
  output logic [31:0] aw_addr,
  output logic [2:0]  aw_len,
  output logic        w_valid,
  input  logic        w_ready,
  output logic [31:0] w_data,
  output logic        w_last,
  input  logic        b_valid,
  output logic        b_ready,
  input  logic [3:0]  b_id,
  input  logic [1:0]  b_resp,
  output logic        ar_valid,
  input  logic        ar_ready,
  output logic [3:0]  ar_id,
  output logic [31:0] ar_addr,
  output logic [2:0]  ar_len,
  input  logic        r_valid,
  output logic        r_ready,
  input  logic [3:0]  r_id,
  input  logic [31:0] r_data,
  input  logic [1:0]  r_resp,
  input  logic        r_last,
  output logic        done,
  output int          checks,
  output int          failures,
  output int          latency_sum
);
  function automatic logic [31:0] rd_pat(input logic [31:0] a);
    return (a * 32'h9E3779B1) ^ 32'h1234_5678;
  endfunction
  function automatic logic [31:0] wr_pat(input logic [31:0] a);
    return (a * 32'h85EBCA6B) + 32'h0BAD_F00D;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %m %0t: %s", $time, what);
    end
  endtask

  function automatic logic [3:0] pick_tid();
    return ($urandom_range(0, 7) == 0) ? 4'($urandom_range(4, 15)) : 4'($urandom_range(0, 3));
  endfunction
  function automatic logic [31:0] rand_addr();
    return (32'($urandom_range(0, N_REGION - 1)) << 20) | (32'($urandom_range(0, 4095)) << 2);
  endfunction

  typedef struct packed { logic [31:0] addr; logic [2:0] len; logic [31:0] t0; } exp_t;
  exp_t rd_exp [16][$];
  exp_t wr_exp [16][$];
  int issued = 0, completed = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    checks = 0; failures = 0; latency_sum = 0; done = 1'b0;
  end

  int wb;
  bit hs_w, hs_r;
  logic [31:0] wa, ra; logic [2:0] wl, rl; logic [3:0] wt, rt;
  initial begin : writer
    aw_valid = 0; w_valid = 0; w_last = 0; aw_id = 0; aw_addr = 0; aw_len = 0; w_data = 0;
    @(posedge rst_n); @(negedge clk);
    repeat (N_REQ/2) begin
      wa = rand_addr(); wl = 3'($urandom_range(0, 7)); wt = pick_tid();
      repeat ($urandom_range(0, 6)) @(negedge clk);
      aw_valid = 1; aw_id = wt; aw_addr = wa; aw_len = wl;
      wr_exp[wt].push_back('{addr: wa, len: wl, t0: 32'(cyc)});
      do begin #1 hs_w = aw_ready; @(negedge clk); end while (!hs_w);
      aw_valid = 0;
      issued++;
      wb = 0;
      while (wb <= int'(wl)) begin
        w_valid = 1; w_data = wr_pat(wa + 32'(4*wb)); w_last = (wb == int'(wl));
        do begin #1 hs_w = w_ready; @(negedge clk); end while (!hs_w);
        w_valid = 0;
        wb++;
      end
    end
  end

  initial begin : reader
    ar_valid = 0; ar_id = 0; ar_addr = 0; ar_len = 0;
    @(posedge rst_n); @(negedge clk);
    repeat (N_REQ/2) begin
      ra = rand_addr(); rl = 3'($urandom_range(0, 7)); rt = pick_tid();
      repeat ($urandom_range(0, 6)) @(negedge clk);
      ar_valid = 1; ar_id = rt; ar_addr = ra; ar_len = rl;
      rd_exp[rt].push_back('{addr: ra, len: rl, t0: 32'(cyc)});
      do begin #1 hs_r = ar_ready; @(negedge clk); end while (!hs_r);
      ar_valid = 0;
      issued++;
    end
  end

  int rbeat = 0;
  always @(negedge clk) begin
    b_ready = ($urandom_range(0, 7) != 0);
    r_ready = ($urandom_range(0, 7) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (b_valid && b_ready) begin
      check(wr_exp[b_id].size() != 0, "B with no outstanding write of that ID");
      if (wr_exp[b_id].size() != 0) begin
        latency_sum += cyc - int'(wr_exp[b_id][0].t0);
        void'(wr_exp[b_id].pop_front());
      end
      check(b_resp == 2'b00, "BRESP not OKAY");
      completed++;
    end
    if (r_valid && r_ready) begin
      check(rd_exp[r_id].size() != 0, "R with no outstanding read of that ID");
      if (rd_exp[r_id].size() != 0) begin
        check(r_data == rd_pat(rd_exp[r_id][0].addr + 32'(4*rbeat)),
              $sformatf("R data id=%0d beat=%0d", r_id, rbeat));
        check(r_last == (rbeat == int'(rd_exp[r_id][0].len)), "RLAST position");
        check(r_resp == 2'b00, "RRESP not OKAY");
        if (r_last) begin
          latency_sum += cyc - int'(rd_exp[r_id][0].t0);
          void'(rd_exp[r_id].pop_front()); rbeat = 0; completed++;
        end else rbeat++;
      end
    end
  end

  always @(posedge clk) if (completed == N_REQ && issued == N_REQ) done <= 1'b1;
endmodule
