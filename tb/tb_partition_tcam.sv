// tb_partition_tcam: self-checking test of one unsorted table partition,
// shrunk to 8 rows so that it can be filled. A reference copy of the stored
// routes is kept here; after every update the testbench searches with random
// keys and with keys built to hit stored prefixes and compares the length
// lines with the OR of the length rows of the reference routes that match.
// It checks that insertion takes one cycle, that a full partition refuses
// further entries, and that deletion frees a row for reuse.
module tb_partition_tcam;
  localparam int unsigned L    = 32;
  localparam int unsigned ROWS = 8;

  logic          clk = 0, rst_n;
  logic [L-1:0]  search_key, len_match;
  logic          ins_en, del_en, full, del_found;
  logic [L-1:0]  ins_value, ins_mask, ins_len_row, del_value, del_mask;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  partition_tcam #(.ADDR_W(L), .ROWS(ROWS)) dut (.*);

  // reference table
  logic [L-1:0] ref_pfx [$];
  int           ref_len [$];

  function automatic logic [L-1:0] mask_of(int len);
    return L'(~((64'h1 << (32 - len)) - 1));
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic search_check(input logic [L-1:0] key);
    logic [L-1:0] exp;
    exp = '0;
    foreach (ref_pfx[i])
      if (((key ^ ref_pfx[i]) & mask_of(ref_len[i])) == 0) exp[ref_len[i] - 1] = 1'b1;
    search_key = key;
    #1;
    check(len_match == exp, $sformatf("search %h: got %h exp %h", key, len_match, exp));
  endtask

  task automatic search_all();
    foreach (ref_pfx[i]) begin
      search_check(ref_pfx[i] | ($urandom() & ~mask_of(ref_len[i])));
    end
    repeat (4) search_check($urandom());
  endtask

  task automatic insert(input logic [L-1:0] pfx, input int len);
    @(negedge clk);
    ins_en = 1; ins_value = pfx; ins_mask = mask_of(len); ins_len_row = 32'h1 << (len - 1);
    @(posedge clk); #1;
    ins_en = 0;
    if (ref_pfx.size() < ROWS) begin
      ref_pfx.push_back(pfx & mask_of(len));
      ref_len.push_back(len);
    end
  endtask

  task automatic delete(input logic [L-1:0] pfx, input int len, input bit expect_found);
    @(negedge clk);
    del_value = pfx & mask_of(len); del_mask = mask_of(len);
    #1;
    check(del_found == expect_found, "delete found flag");
    del_en = 1;
    @(posedge clk); #1;
    del_en = 0;
    foreach (ref_pfx[i])
      if (ref_pfx[i] == (pfx & mask_of(len)) && ref_len[i] == len) begin
        ref_pfx.delete(i);
        ref_len.delete(i);
        break;
      end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] p;
    int           n;
    rst_n = 0; ins_en = 0; del_en = 0; search_key = '0;
    ins_value = '0; ins_mask = '0; ins_len_row = '0; del_value = '0; del_mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(!full, "empty after reset");
    search_all();
    // nested prefixes of several lengths: 10/8, 10.1/16, 10.1.2/24, 10.1.2.3/32
    insert(32'h0A00_0000, 8);   search_all();
    insert(32'h0A01_0000, 16);  search_all();
    insert(32'h0A01_0200, 24);  search_all();
    insert(32'h0A01_0203, 32);  search_all();
    search_check(32'h0A01_0203);
    check(len_match == 32'h8080_8080, "all four nested lengths raised");
    // fill the rest with random routes
    while (ref_pfx.size() < ROWS) begin
      insert($urandom(), int'($urandom_range(32, 1)));
      search_all();
    end
    check(full, "full after ROWS insertions");
    // refused insertion leaves the table unchanged
    p = $urandom();
    @(negedge clk);
    ins_en = 1; ins_value = p; ins_mask = mask_of(4); ins_len_row = 32'h8;
    @(posedge clk); #1; ins_en = 0;
    search_check(p);
    search_all();
    // missing route is not found
    delete(32'hC0A8_0000, 17, 1'b0);
    check(full, "still full after failed delete");
    // delete one, reuse its row
    delete(32'h0A01_0200, 24, 1'b1);
    check(!full, "room after delete");
    search_check(32'h0A01_0203);
    search_all();
    insert(32'hC0A8_0000, 16);
    check(full, "full again");
    search_all();
    // random churn
    for (int i = 0; i < 200; i++) begin
      if (ref_pfx.size() > 0 && $urandom_range(1) == 0) begin
        n = int'($urandom_range(ref_pfx.size() - 1));
        delete(ref_pfx[n], ref_len[n], 1'b1);
      end else if (ref_pfx.size() < ROWS) begin
        insert($urandom(), int'($urandom_range(32, 1)));
      end
      check(full == (ref_pfx.size() == ROWS), "full flag");
      search_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
