// tb_status_unit: random test of the status register / status table.
//
// A reference model keeps, per transaction ID, the number of outstanding
// messages, the next expected sequence number, whether a table row is in use,
// and the sizes of its outstanding responses. Each cycle the testbench either
// asks for admittance of a random ID and size, or delivers the oldest response
// of a random busy ID (Procedure D). It checks adm_ok (space, row and
// in-flight limits), the sequence number of every admitted request, the
// in-order verdict for the expected and for a wrong sequence number, the
// status register and ReservedSize. Small RB_DEPTH/ST_ROWS make the limits bite.
module tb_status_unit;
  import ni_pkg::*;
  localparam int RB = 20, ROWS = 3, MAXO = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [3:0] adm_tid, dlv_tid, lk_tid; logic [3:0] adm_size, dlv_size;
  logic adm_ok, adm_fire, dlv_fire, lk_in_order;
  logic [2:0] adm_seq, lk_seq;
  logic [15:0] s_reg_o; logic [4:0] reserved_o;

  status_unit #(.RB_DEPTH(RB), .ST_ROWS(ROWS), .MAX_OUT(MAXO)) dut (.*);

  int cnt[16], es[16]; bit row[16]; int sizes[16][$];
  int reserved = 0, outstanding = 0, rows_used = 0;
  int n_a = 0, n_b = 0, n_c = 0, n_full = 0, n_d = 0;

  initial begin
    adm_fire = 0; dlv_fire = 0; adm_tid = 0; dlv_tid = 0; lk_tid = 0; adm_size = 0; dlv_size = 0; lk_seq = 0;
    foreach (cnt[i]) begin cnt[i] = 0; es[i] = 0; row[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4000) begin
      @(negedge clk);
      adm_fire = 0; dlv_fire = 0;
      if ($urandom_range(0, 1) == 0) begin
        // admission attempt
        int t, sz, exp_ok, exp_seq;
        t = $urandom_range(0, 15); sz = $urandom_range(0, 8);
        adm_tid = 4'(t); adm_size = 4'(sz);
        #1;
        exp_ok = (reserved + sz <= RB) && (outstanding < MAXO) &&
                 !(cnt[t] != 0 && !row[t] && rows_used == ROWS) && (cnt[t] < 8);
        exp_seq = (cnt[t] == 0) ? 0 : (es[t] + cnt[t]) % 8;
        check(adm_ok == exp_ok, $sformatf("adm_ok tid=%0d got %0d exp %0d res=%0d sz=%0d out=%0d cnt=%0d rows=%0d", t, adm_ok, exp_ok, reserved, sz, outstanding, cnt[t], rows_used));
        if (!adm_ok) n_full++;
        if (adm_ok) begin
          check(int'(adm_seq) == exp_seq, $sformatf("seq tid=%0d got %0d exp %0d", t, adm_seq, exp_seq));
          adm_fire = 1;
          if (cnt[t] == 0) begin n_a++; es[t] = 0; end
          else if (!row[t]) begin n_b++; row[t] = 1; rows_used++; end
          else n_c++;
          cnt[t]++; outstanding++; reserved += sz; sizes[t].push_back(sz);
        end
      end else begin
        // deliver the expected response of a busy ID
        int t; t = $urandom_range(0, 15);
        if (cnt[t] != 0) begin
          lk_tid = 4'(t); lk_seq = 3'(es[t] + 1);
          #1;
          check(lk_in_order == !row[t], "wrong seq judged");
          lk_seq = 3'(es[t]);
          #1;
          check(lk_in_order, "expected seq judged in order");
          dlv_tid = 4'(t); dlv_size = 4'(sizes[t].pop_front()); dlv_fire = 1;
          n_d++;
          cnt[t]--; outstanding--; reserved -= int'(dlv_size); es[t] = (es[t] + 1) % 8;
          if (cnt[t] == 0 && row[t]) begin row[t] = 0; rows_used--; end
        end
      end
      @(posedge clk); #1;
      check(int'(reserved_o) == reserved, "ReservedSize");
      for (int i = 0; i < 16; i++) check(s_reg_o[i] == (cnt[i] != 0), "status register bit");
    end
    $display("procA=%0d procB=%0d procC=%0d refused=%0d procD=%0d", n_a, n_b, n_c, n_full, n_d);
    check(n_a > 0 && n_b > 0 && n_c > 0 && n_full > 0 && n_d > 0, "all procedures exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
