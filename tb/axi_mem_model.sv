// axi_mem_model: behavioural AXI slave (a memory core) for the system
// testbenches. Not synthesizable.
//
// Commands (AW or AR) are accepted with random backpressure and executed
// strictly in acceptance order, after a random service time of 0..MAX_WAIT
// cycles each; this is the in-order behaviour the slave-side network interface
// relies on. Reads return rd_pat(address) per beat; write beats are checked
// against wr_pat(address), the pattern axi_proc_model writes, and for the
// burst length and WLAST position. Drives on the falling edge, samples on the
// rising edge. `n_cmds` counts the commands executed.
module axi_mem_model #(
  parameter int MAX_WAIT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        aw_valid,
  output logic        aw_ready,
  input  logic [3:0]  aw_id,
  input  logic [31:0] aw_addr,
  input  logic [2:0]  aw_len,
  input  logic        w_valid,
  output logic        w_ready,
  input  logic [31:0] w_data,
  input  logic        w_last,
  output logic        b_valid,
  input  logic        b_ready,
  output logic [3:0]  b_id,
  output logic [1:0]  b_resp,
  input  logic        ar_valid,
  output logic        ar_ready,
  input  logic [3:0]  ar_id,
  input  logic [31:0] ar_addr,
  input  logic [2:0]  ar_len,
  output logic        r_valid,
  input  logic        r_ready,
  output logic [3:0]  r_id,
  output logic [31:0] r_data,
  output logic [1:0]  r_resp,
  output logic        r_last,
  output int          n_cmds,
  output int          checks,
  output int          failures
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

  typedef struct packed { logic wr; logic [3:0] id; logic [31:0] addr; logic [2:0] len; } cmd_t;
  cmd_t cmd_q[$];
  cmd_t wq[$];
  int wbeat = 0;

  initial begin
    checks = 0; failures = 0; n_cmds = 0;
  end

  always @(negedge clk) begin
    aw_ready = ($urandom_range(0, 2) != 0);
    ar_ready = ($urandom_range(0, 2) != 0);
    w_ready  = ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (aw_valid && aw_ready) begin
      cmd_q.push_back('{1'b1, aw_id, aw_addr, aw_len});
      wq.push_back('{1'b1, aw_id, aw_addr, aw_len});
    end
    if (ar_valid && ar_ready) cmd_q.push_back('{1'b0, ar_id, ar_addr, ar_len});
    if (w_valid && w_ready) begin
      check(wq.size() != 0, "W beat without AW");
      if (wq.size() != 0) begin
        check(w_data == wr_pat(wq[0].addr + 32'(4*wbeat)), "W data");
        check(w_last == (wbeat == int'(wq[0].len)), "WLAST position");
        if (w_last) begin void'(wq.pop_front()); wbeat = 0; end else wbeat++;
      end
    end
  end

  int rb;
  bit hs;
  cmd_t c;
  initial begin : respond
    b_valid = 0; r_valid = 0; b_id = 0; b_resp = 0; r_id = 0; r_data = 0; r_resp = 0; r_last = 0;
    @(posedge rst_n); @(negedge clk);
    forever begin
      @(negedge clk);
      if (cmd_q.size() != 0) begin
        c = cmd_q.pop_front();
        n_cmds++;
        repeat ($urandom_range(0, MAX_WAIT)) @(negedge clk);
        if (c.wr) begin
          b_valid = 1; b_id = c.id; b_resp = 0;
          do begin #1 hs = b_ready; @(negedge clk); end while (!hs);
          b_valid = 0;
        end else begin
          rb = 0;
          while (rb <= int'(c.len)) begin
            r_valid = 1; r_id = c.id; r_resp = 0;
            r_data = rd_pat(c.addr + 32'(4*rb)); r_last = (rb == int'(c.len));
            do begin #1 hs = r_ready; @(negedge clk); end while (!hs);
            r_valid = 0;
            rb++;
          end
        end
      end
    end
  end
endmodule
