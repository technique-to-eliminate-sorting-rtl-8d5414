// tb_length_select: self-checking test of the Length Selection Logic at its
// default size (16 partitions x 32 length lines). Drives directed and random
// patterns of length lines and compares the one-hot longest length and the
// any-match flag with a reference that scans the lengths from longest down.
module tb_length_select;
  localparam int unsigned L = 32;
  localparam int unsigned P = 16;

  logic [P-1:0][L-1:0] part_len;
  logic [L-1:0]        longest;
  logic                any_match;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  length_select dut (.part_len(part_len), .longest(longest), .any_match(any_match));

  task automatic check_one();
    logic [L-1:0] exp_long;
    logic         exp_any;
    exp_long = '0;
    exp_any  = 1'b0;
    for (int n = int'(L) - 1; n >= 0; n--) begin
      for (int p = 0; p < int'(P); p++) begin
        if (part_len[p][n] && !exp_any) begin
          exp_long[n] = 1'b1;
          exp_any = 1'b1;
        end
      end
    end
    #1;
    checks++;
    if (longest !== exp_long || any_match !== exp_any) begin
      failures++;
      $display("FAIL: longest=%h exp=%h any=%b exp=%b", longest, exp_long, any_match, exp_any);
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
    part_len = '0;
    check_one();                              // nothing matched
    for (int n = 0; n < int'(L); n++) begin   // single length in each position
      part_len = '0;
      part_len[n % P][n] = 1'b1;
      check_one();
    end
    // every length in partition 0 plus one longer one elsewhere
    part_len = '0;
    part_len[0] = 32'h00FF_FFFF;
    part_len[9][27] = 1'b1;
    check_one();
    for (int i = 0; i < 2000; i++) begin
      for (int p = 0; p < int'(P); p++)
        // sparse patterns so that the longest length varies widely
        part_len[p] = $urandom() & $urandom() & $urandom() & $urandom();
      check_one();
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
