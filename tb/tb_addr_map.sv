// tb_addr_map: checks the mapping unit on random and boundary addresses.
// Expected node = 10 + (addr / 2^20) mod 15, computed independently here.
module tb_addr_map;
  import ni_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] addr; logic [4:0] node;
  addr_map dut (.addr, .node);
  task automatic try(input logic [31:0] a);
    addr = a; #1;
    checks++;
    if (int'(node) != 10 + int'(a / 32'h10_0000) % 15) begin
      failures++; $display("FAIL addr %h node %0d", a, node);
    end
  endtask
  initial begin
    try(32'h0); try(32'h000F_FFFF); try(32'h0010_0000); try(32'h00E0_0000); try(32'h00F0_0000);
    try(32'hFFFF_FFFC);
    repeat (2000) try($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
