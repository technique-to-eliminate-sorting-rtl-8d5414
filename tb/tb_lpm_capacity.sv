// tb_lpm_capacity: the capacity workload at full default size. The reference
// configuration is a 262144-route table spread evenly over 16 output ports,
// i.e. 16384 routes per port. This test loads one port's partition to
// exactly 16384 distinct /24 routes, one insertion per clock cycle, and checks
// that every insertion is accepted, that the 16385th is refused, that routes
// of other ports are still accepted, and that lookups across the loaded
// partition return the right port and length. It also checks that loading
// took one cycle per route, independent of how full the table already was.
module tb_lpm_capacity;
  import lpm_pkg::*;
  localparam int unsigned PER_PORT = 16384;   // 262144 routes / 16 ports

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
  int accepted = 0;
  longint cycles = 0, t0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  lpm_coprocessor dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (PER_PORT + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // route i of port 5: 0x0A000000 + i*256, length 24
  function automatic logic [31:0] route(int i);
    return 32'h0A00_0000 + 32'(i << 8);
  endfunction

  // count accepted insertions as their responses come back
  always @(posedge clk)
    if (rsp_valid && rsp_op == OP_INSERT && rsp_ok) accepted++;

  initial begin
    rst_n = 0; req_op = OP_NOP; req_addr = '0; req_len = '0; req_port = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    t0 = cycles;
    for (int i = 0; i < int'(PER_PORT); i++) begin
      req_op = OP_INSERT; req_addr = route(i); req_len = 6'd24; req_port = 4'd5;
      @(negedge clk);
    end
    req_op = OP_NOP;
    @(negedge clk);
    check(accepted == int'(PER_PORT), $sformatf("%0d of %0d insertions accepted", accepted, PER_PORT));
    check(cycles - t0 == longint'(PER_PORT) + 1,
          $sformatf("loading took %0d cycles for %0d routes", cycles - t0, PER_PORT));
    // partition 5 is now full
    req_op = OP_INSERT; req_addr = 32'hC0A8_0000; req_len = 6'd16; req_port = 4'd5;
    @(posedge clk); #1;
    check(rsp_valid && !rsp_ok, "insertion into a full partition refused");
    // another port still has room
    @(negedge clk);
    req_op = OP_INSERT; req_addr = 32'h0A00_0000; req_len = 6'd8; req_port = 4'd9;
    @(posedge clk); #1;
    check(rsp_valid && rsp_ok, "insertion into another partition accepted");
    // lookups spread over the loaded routes: /24 on port 5 beats /8 on port 9
    for (int k = 0; k < 64; k++) begin
      int i;
      i = (k * 257) % int'(PER_PORT);
      @(negedge clk);
      req_op = OP_LOOKUP; req_addr = route(i) | 32'(k & 8'hFF); req_len = '0; req_port = '0;
      @(posedge clk); #1;
      check(rsp_hit && rsp_port == 16'h0020 && rsp_len == 32'h0080_0000,
            $sformatf("lookup of route %0d: port %b len %h", i, rsp_port, rsp_len));
    end
    // outside the loaded range only the /8 of port 9 matches
    @(negedge clk);
    req_op = OP_LOOKUP; req_addr = route(PER_PORT) | 32'h1;
    @(posedge clk); #1;
    check(rsp_hit && rsp_port == 16'h0200 && rsp_len == 32'h0000_0080, "fallback to /8 on port 9");
    @(negedge clk);
    req_op = OP_NOP;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
