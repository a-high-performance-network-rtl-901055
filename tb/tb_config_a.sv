// tb_config_a: system workload with separate processor and memory tiles.
// A 5x5 mesh of 25 nodes: nodes 0..9 are processors behind master network
// interfaces, nodes 10..24 are memories behind slave network interfaces, all at
// their default sizes (48-word shared reorder buffer, 4-bit IDs, 3-bit sequence
// numbers, memory interleaved over nodes 10..24 in 1 MiB regions); only NODE_ID
// differs per node.
//
// Every processor node has an axi_proc_model issuing N_REQ uniform random reads
// and writes (bursts of 1..8 beats, any of the 15 memories); every memory node
// has an axi_mem_model answering in order. noc_model carries the packets with
// distance-dependent, jittered latencies, so responses of one processor come
// back out of order. The processors check that each ID's responses arrive in
// issue order with the right data; the memories check the write data; the
// testbench checks that every packet reaching a node is of the kind that node
// serves. Counted mechanisms (each must occur): admission stall, out-of-order
// store, release from the reorder buffer, request served by a slave interface.
// The average request latency is printed for information.
module tb_config_a;
  import ni_pkg::*;

  localparam int N        = 25;
  localparam int NP       = 10;   // processor nodes 0..NP-1, memory nodes NP..N-1
  localparam int N_REQ    = 80;
  localparam int WATCHDOG = 200000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // processor side
  logic        aw_valid [N], aw_ready [N], w_valid [N], w_ready [N], w_last [N];
  logic        b_valid [N], b_ready [N], ar_valid [N], ar_ready [N];
  logic        r_valid [N], r_ready [N], r_last [N];
  logic [3:0]  aw_id [N], b_id [N], ar_id [N], r_id [N];
  logic [31:0] aw_addr [N], ar_addr [N], w_data [N], r_data [N];
  logic [2:0]  aw_len [N], ar_len [N];
  logic [1:0]  b_resp [N], r_resp [N];
  // memory side
  logic        s_aw_valid [N], s_aw_ready [N], s_w_valid [N], s_w_ready [N], s_w_last [N];
  logic        s_b_valid [N], s_b_ready [N], s_ar_valid [N], s_ar_ready [N];
  logic        s_r_valid [N], s_r_ready [N], s_r_last [N];
  logic [3:0]  s_aw_id [N], s_b_id [N], s_ar_id [N], s_r_id [N];
  logic [31:0] s_aw_addr [N], s_ar_addr [N], s_w_data [N], s_r_data [N];
  logic [2:0]  s_aw_len [N], s_ar_len [N];
  logic [1:0]  s_b_resp [N], s_r_resp [N];
  // network
  logic  tx_valid [N], tx_ready [N], rx_valid [N], rx_ready [N];
  flit_t tx_flit [N], rx_flit [N];
  // monitors and model results
  logic       adm_stall [N], ooo_store [N], rel_start [N];
  logic [5:0] rb_used [N];
  logic       p_done [N];
  int         p_checks [N], p_fail [N], p_lat [N];
  int         m_cmds [N], m_checks [N], m_fail [N];
  int         net_pkts, net_self, net_checks, net_fail;

  for (genvar i = 0; i < NP; i++) begin : g_proc
    master_ni #(.NODE_ID(5'(i))) u_ni (
      .clk, .rst_n,
      .aw_valid (aw_valid[i]), .aw_ready (aw_ready[i]), .aw_id (aw_id[i]), .aw_addr (aw_addr[i]),
      .aw_len (aw_len[i]), .w_valid (w_valid[i]), .w_ready (w_ready[i]), .w_data (w_data[i]),
      .w_last (w_last[i]), .b_valid (b_valid[i]), .b_ready (b_ready[i]), .b_id (b_id[i]),
      .b_resp (b_resp[i]), .ar_valid (ar_valid[i]), .ar_ready (ar_ready[i]), .ar_id (ar_id[i]),
      .ar_addr (ar_addr[i]), .ar_len (ar_len[i]), .r_valid (r_valid[i]), .r_ready (r_ready[i]),
      .r_id (r_id[i]), .r_data (r_data[i]), .r_resp (r_resp[i]), .r_last (r_last[i]),
      .rx_valid (rx_valid[i]), .rx_ready (rx_ready[i]), .rx_flit (rx_flit[i]),
      .tx_valid (tx_valid[i]), .tx_ready (tx_ready[i]), .tx_flit (tx_flit[i]),
      .adm_stall (adm_stall[i]), .ooo_store (ooo_store[i]), .rel_start (rel_start[i]),
      .rb_used (rb_used[i])
    );

    axi_proc_model #(.N_REQ(N_REQ), .N_REGION(N - NP)) u_proc (
      .clk, .rst_n,
      .aw_valid (aw_valid[i]), .aw_ready (aw_ready[i]), .aw_id (aw_id[i]), .aw_addr (aw_addr[i]),
      .aw_len (aw_len[i]), .w_valid (w_valid[i]), .w_ready (w_ready[i]), .w_data (w_data[i]),
      .w_last (w_last[i]), .b_valid (b_valid[i]), .b_ready (b_ready[i]), .b_id (b_id[i]),
      .b_resp (b_resp[i]), .ar_valid (ar_valid[i]), .ar_ready (ar_ready[i]), .ar_id (ar_id[i]),
      .ar_addr (ar_addr[i]), .ar_len (ar_len[i]), .r_valid (r_valid[i]), .r_ready (r_ready[i]),
      .r_id (r_id[i]), .r_data (r_data[i]), .r_resp (r_resp[i]), .r_last (r_last[i]),
      .done (p_done[i]), .checks (p_checks[i]), .failures (p_fail[i]), .latency_sum (p_lat[i])
    );

    assign m_cmds[i] = 0;
    assign m_checks[i] = 0;
    assign m_fail[i] = 0;
  end

  for (genvar i = NP; i < N; i++) begin : g_mem
    slave_ni #(.NODE_ID(5'(i))) u_ni (
      .clk, .rst_n,
      .rx_valid (rx_valid[i]), .rx_ready (rx_ready[i]), .rx_flit (rx_flit[i]),
      .tx_valid (tx_valid[i]), .tx_ready (tx_ready[i]), .tx_flit (tx_flit[i]),
      .aw_valid (s_aw_valid[i]), .aw_ready (s_aw_ready[i]), .aw_id (s_aw_id[i]),
      .aw_addr (s_aw_addr[i]), .aw_len (s_aw_len[i]), .w_valid (s_w_valid[i]),
      .w_ready (s_w_ready[i]), .w_data (s_w_data[i]), .w_last (s_w_last[i]),
      .b_valid (s_b_valid[i]), .b_ready (s_b_ready[i]), .b_id (s_b_id[i]), .b_resp (s_b_resp[i]),
      .ar_valid (s_ar_valid[i]), .ar_ready (s_ar_ready[i]), .ar_id (s_ar_id[i]),
      .ar_addr (s_ar_addr[i]), .ar_len (s_ar_len[i]), .r_valid (s_r_valid[i]),
      .r_ready (s_r_ready[i]), .r_id (s_r_id[i]), .r_data (s_r_data[i]), .r_resp (s_r_resp[i]),
      .r_last (s_r_last[i])
    );
    assign adm_stall[i] = 1'b0;
    assign ooo_store[i] = 1'b0;
    assign rel_start[i] = 1'b0;
    assign rb_used[i]   = '0;
    assign p_done[i]    = 1'b1;
    assign p_checks[i]  = 0;
    assign p_fail[i]    = 0;
    assign p_lat[i]     = 0;

    axi_mem_model u_mem (
      .clk, .rst_n,
      .aw_valid (s_aw_valid[i]), .aw_ready (s_aw_ready[i]), .aw_id (s_aw_id[i]),
      .aw_addr (s_aw_addr[i]), .aw_len (s_aw_len[i]), .w_valid (s_w_valid[i]),
      .w_ready (s_w_ready[i]), .w_data (s_w_data[i]), .w_last (s_w_last[i]),
      .b_valid (s_b_valid[i]), .b_ready (s_b_ready[i]), .b_id (s_b_id[i]), .b_resp (s_b_resp[i]),
      .ar_valid (s_ar_valid[i]), .ar_ready (s_ar_ready[i]), .ar_id (s_ar_id[i]),
      .ar_addr (s_ar_addr[i]), .ar_len (s_ar_len[i]), .r_valid (s_r_valid[i]),
      .r_ready (s_r_ready[i]), .r_id (s_r_id[i]), .r_data (s_r_data[i]), .r_resp (s_r_resp[i]),
      .r_last (s_r_last[i]), .n_cmds (m_cmds[i]), .checks (m_checks[i]), .failures (m_fail[i])
    );
  end

  noc_model #(.N(N)) u_noc (
    .clk, .rst_n, .tx_valid, .tx_ready, .tx_flit, .rx_valid, .rx_ready, .rx_flit,
    .n_pkts (net_pkts), .n_self (net_self), .checks (net_checks), .failures (net_fail)
  );

  // ---- mechanism counters --------------------------------------------------------------
  int n_stall = 0, n_store = 0, n_rel = 0, n_arb = 0, n_req_in = 0, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int t = 0; t < N; t++) begin
      if (adm_stall[t]) n_stall++;
      if (ooo_store[t]) n_store++;
      if (rel_start[t]) n_rel++;
      if (32'(rb_used[t]) > 48) begin checks++; failures++; $display("FAIL: buffer over 48 words"); end
    end
  end
  // a processor node only ever receives responses, a memory node only requests
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < N; t++) if (rx_valid[t] && rx_ready[t] && rx_flit[t].head) begin
      hdr_t h;
      h = hdr_t'(rx_flit[t].data);
      checks++;
      if (is_resp(h.typ) != (t < NP)) begin
        failures++; $display("FAIL: packet of the wrong kind reaches node %0d", t);
      end
      if (t < NP) n_arb++; else n_req_in++;
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  int all_done, sum_c, sum_f, sum_lat, sum_cmds;
  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int t = 0; t < N; t++) if (!p_done[t]) all_done = 0;
    end while (!all_done);
    repeat (50) @(posedge clk);
    sum_c = 0; sum_f = 0; sum_lat = 0; sum_cmds = 0;
    for (int t = 0; t < N; t++) begin
      sum_c += p_checks[t] + m_checks[t];
      sum_f += p_fail[t] + m_fail[t];
      sum_lat += p_lat[t];
      sum_cmds += m_cmds[t];
      check(rb_used[t] == 0, "reorder buffer empty at the end");
    end
    checks += sum_c + net_checks;
    failures += sum_f + net_fail;
    check(sum_cmds == NP * N_REQ, "every request reached a memory exactly once");
    check(net_pkts == 2 * NP * N_REQ, "one request and one response packet per transaction");
    $display("mechanisms: adm_stall_cycles=%0d ooo_stored=%0d released=%0d slave_cmds=%0d responses_in=%0d requests_in=%0d",
             n_stall, n_store, n_rel, sum_cmds, n_arb, n_req_in);
    $display("workload: %0d processors x %0d requests in %0d cycles, mean latency %0d cycles",
             NP, N_REQ, cyc, sum_lat / (NP * N_REQ));
    check(n_stall > 0, "admission stall happened");
    check(n_store > 0, "out-of-order store happened");
    check(n_rel > 0, "release from the reorder buffer happened");
    check(sum_cmds > 0, "requests served by slave sides");
    check(net_self == 0, "no node sends packets to itself");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
