// tb_lpm_full: the co-processor at its full default size (32-bit addresses,
// 16 ports, 16K rows per partition, 256K routes in all) taken through one
// complete operation: reset, insertion of nested routes on several ports,
// lookups that must pick the longest prefix and its port, a deletion, and a
// lookup that falls back to the next shorter prefix. Expected results are
// written out by hand from the routes below.
module tb_lpm_full;
  import lpm_pkg::*;

  logic          clk = 0, rst_n;
  lpm_op_e       req_op;
  logic [31:0]   req_addr;
  logic [5:0]    req_len;
  logic [3:0]    req_port;
  logic          rsp_valid, rsp_hit, rsp_ok;
  lpm_op_e       rsp_op;
  logic [15:0]   rsp_port;
  logic [31:0]   rsp_len;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lpm_coprocessor dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic op(input lpm_op_e o, input logic [31:0] a, input int len, input int port);
    @(negedge clk);
    req_op = o; req_addr = a; req_len = 6'(len); req_port = 4'(port);
    @(posedge clk); #1;
    req_op = OP_NOP;
    check(rsp_valid && rsp_op == o, "response one cycle after request");
  endtask

  task automatic lookup(input logic [31:0] a, input int exp_port, input int exp_len);
    op(OP_LOOKUP, a, 0, 0);
    if (exp_len == 0) begin
      check(!rsp_hit && rsp_port == '0 && rsp_len == '0, $sformatf("miss for %h", a));
    end else begin
      check(rsp_hit, $sformatf("hit for %h", a));
      check(rsp_port == 16'(1 << exp_port), $sformatf("port for %h: %b", a, rsp_port));
      check(rsp_len == 32'(64'h1 << (exp_len - 1)), $sformatf("length for %h: %h", a, rsp_len));
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; req_op = OP_NOP; req_addr = '0; req_len = '0; req_port = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    lookup(32'hC0A8_0101, 0, 0);                      // empty table
    op(OP_INSERT, 32'hC000_0000, 8, 15);  check(rsp_ok, "insert 192/8");
    op(OP_INSERT, 32'hC0A8_0000, 16, 3);  check(rsp_ok, "insert 192.168/16");
    op(OP_INSERT, 32'hC0A8_0100, 24, 7);  check(rsp_ok, "insert 192.168.1/24");
    op(OP_INSERT, 32'hC0A8_0101, 32, 0);  check(rsp_ok, "insert 192.168.1.1/32");
    op(OP_INSERT, 32'h0A00_0000, 8, 3);   check(rsp_ok, "insert 10/8");
    lookup(32'hC0A8_0101, 0, 32);
    lookup(32'hC0A8_0102, 7, 24);
    lookup(32'hC0A8_0201, 3, 16);
    lookup(32'hC0FF_0000, 15, 8);
    lookup(32'h0A0B_0C0D, 3, 8);
    lookup(32'h0B00_0000, 0, 0);
    op(OP_DELETE, 32'hC0A8_0100, 24, 7);  check(rsp_ok, "delete 192.168.1/24");
    lookup(32'hC0A8_0102, 3, 16);
    op(OP_DELETE, 32'hC0A8_0100, 24, 7);  check(!rsp_ok, "second delete misses");
    op(OP_INSERT, 32'hC0A8_0100, 0, 7);   check(!rsp_ok, "length 0 refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
