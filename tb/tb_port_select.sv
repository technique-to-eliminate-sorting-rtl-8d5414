// tb_port_select: self-checking test of the Port Selection Logic at its
// default size (16 ports, 32 lengths). Drives a one-hot longest length and
// random partition length lines and compares each port line with a reference
// that tests the chosen length bit of every partition.
module tb_port_select;
  localparam int unsigned L = 32;
  localparam int unsigned P = 16;

  logic [L-1:0]        longest;
  logic [P-1:0][L-1:0] part_len;
  logic [P-1:0]        port_hit;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  port_select dut (.longest(longest), .part_len(part_len), .port_hit(port_hit));

  task automatic check_one(input int len_idx);
    logic [P-1:0] exp;
    for (int p = 0; p < int'(P); p++)
      exp[p] = (len_idx >= 0) ? part_len[p][len_idx] : 1'b0;
    #1;
    checks++;
    if (port_hit !== exp) begin
      failures++;
      $display("FAIL: len_idx=%0d port_hit=%b exp=%b", len_idx, port_hit, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // one port owns exactly the selected length
    for (int n = 0; n < int'(L); n++) begin
      part_len = '0;
      for (int p = 0; p < int'(P); p++) part_len[p] = $urandom() & ~(32'h1 << n);
      part_len[(n * 7) % P][n] = 1'b1;
      longest = 32'h1 << n;
      check_one(n);
    end
    // no length selected: no port
    longest = '0;
    for (int p = 0; p < int'(P); p++) part_len[p] = $urandom();
    check_one(-1);
    for (int i = 0; i < 2000; i++) begin
      int n;
      n = int'($urandom_range(L - 1));
      longest = 32'h1 << n;
      for (int p = 0; p < int'(P); p++) part_len[p] = $urandom();
      check_one(n);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
