// noc_model: behavioural stand-in for a 2D mesh of wormhole routers, used by
// the system testbenches. Not synthesizable.
//
// Every node has one outgoing link (tx_*, flits from the node's network
// interface) and one incoming link (rx_*, flits to it), with the flit_t
// valid/ready handshake of the network interfaces. A packet is taken whole
// from a tx link, its destination is read from the header flit, and it becomes
// deliverable after a latency of 2 cycles per mesh hop (XY distance on a
// MESH_X-wide mesh) plus its length plus a random 0..JITTER cycles standing in
// for contention. Each rx link delivers one packet at a time, chosen at random
// among the deliverable ones, but packets from the same source keep their
// order, as deterministic XY routing would keep them. Packets from different
// sources, and responses from different memories, therefore overtake each
// other. tx_ready is random (90 %). Checks: a packet starts with a head flit,
// ends with a tail flit, names an existing destination and is at most 10 flits.
module noc_model
  import ni_pkg::*;
#(
  parameter int N      = 25,
  parameter int MESH_X = 5,
  parameter int JITTER = 40
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tx_valid [N],
  output logic  tx_ready [N],
  input  flit_t tx_flit  [N],
  output logic  rx_valid [N],
  input  logic  rx_ready [N],
  output flit_t rx_flit  [N],
  output int    n_pkts,
  output int    n_self,
  output int    checks,
  output int    failures
);
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %m %0t: %s", $time, what);
    end
  endtask

  typedef struct { int due; int src; int n; flit_t f[10]; } pkt_t;
  flit_t txp  [N][$];
  pkt_t  pend [N][$];
  flit_t cur  [N][$];
  bit    rx_fire [N];
  int    cyc = 0;

  initial begin
    n_pkts = 0; n_self = 0; checks = 0; failures = 0;
    for (int p = 0; p < N; p++) begin rx_valid[p] = 1'b0; rx_flit[p] = '0; tx_ready[p] = 1'b0; end
  end

  function automatic int hops(input int a, input int b);
    int dx, dy;
    dx = (a % MESH_X) - (b % MESH_X); dy = (a / MESH_X) - (b / MESH_X);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int p = 0; p < N; p++) begin
      if (rx_valid[p] && rx_ready[p]) rx_fire[p] = 1'b1;
      if (tx_valid[p] && tx_ready[p]) begin
        txp[p].push_back(tx_flit[p]);
        if (tx_flit[p].tail) begin
          pkt_t k; hdr_t h;
          h = hdr_t'(txp[p][0].data);
          check(txp[p][0].head, "packet starts with a head flit");
          check(txp[p].size() <= 10, "packet length");
          check(int'(h.dst) < N, "destination exists");
          check(int'(h.src) == p, "source field names the sending node");
          k.src = p; k.n = 0;
          foreach (txp[p][i]) if (i < 10) begin k.f[i] = txp[p][i]; k.n++; end
          k.due = cyc + 2 * hops(p, int'(h.dst)) + k.n + $urandom_range(0, JITTER);
          if (int'(h.dst) < N) pend[int'(h.dst)].push_back(k);
          n_pkts++;
          if (int'(h.dst) == p) n_self++;
          txp[p].delete();
        end else if (tx_flit[p].head && txp[p].size() > 1) begin
          check(1'b0, "head flit inside a packet");
        end
      end
    end
  end

  int elig[$];
  bit seen[N];
  always @(negedge clk) begin
    for (int p = 0; p < N; p++) begin
      tx_ready[p] = ($urandom_range(0, 9) != 0);
      if (rx_fire[p]) begin
        void'(cur[p].pop_front());
        rx_fire[p] = 1'b0;
      end
      if (cur[p].size() == 0 && pend[p].size() != 0) begin
        elig.delete();
        for (int s = 0; s < N; s++) seen[s] = 1'b0;
        foreach (pend[p][i]) begin
          if (!seen[pend[p][i].src] && pend[p][i].due <= cyc) elig.push_back(i);
          seen[pend[p][i].src] = 1'b1;
        end
        if (elig.size() != 0) begin
          int k;
          k = elig[$urandom_range(0, elig.size() - 1)];
          for (int j = 0; j < pend[p][k].n; j++) cur[p].push_back(pend[p][k].f[j]);
          pend[p].delete(k);
        end
      end
      rx_valid[p] = (cur[p].size() != 0);
      rx_flit[p]  = (cur[p].size() != 0) ? cur[p][0] : '0;
    end
  end
endmodule
