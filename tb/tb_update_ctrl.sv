// tb_update_ctrl: self-checking test of the route update decoder at its
// default size (32-bit addresses, 16 ports). For random and corner-case
// routes it checks the care mask (computed here by shifting), the masked
// prefix value, the one-hot length row, that only the route's own partition
// is strobed, and the outcome flag for full partitions, missing routes and
// malformed lengths.
module tb_update_ctrl;
  localparam int unsigned L = 32;
  localparam int unsigned P = 16;

  logic          upd_insert, upd_delete;
  logic [L-1:0]  upd_prefix;
  logic [5:0]    upd_len;
  logic [3:0]    upd_port;
  logic [P-1:0]  ins_en, del_en, part_full, part_del_found;
  logic [L-1:0]  ent_value, ent_mask, ent_len_row;
  logic          upd_ok;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  update_ctrl dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (len=%0d port=%0d ins=%b del=%b)", what, upd_len, upd_port,
               upd_insert, upd_delete);
    end
  endtask

  task automatic apply_and_check();
    logic [L-1:0] exp_mask, exp_row;
    logic [P-1:0] exp_strobe;
    bit           good, exp_ok;
    good       = (upd_len >= 1) && (upd_len <= 32);
    exp_mask   = good ? L'(~((64'h1 << (32 - upd_len)) - 1)) : 32'h0;
    exp_row    = good ? (32'h1 << (upd_len - 1)) : 32'h0;
    exp_strobe = good ? (16'h1 << upd_port) : 16'h0;
    if (upd_insert)      exp_ok = good && !part_full[upd_port];
    else if (upd_delete) exp_ok = good && part_del_found[upd_port];
    else                 exp_ok = 1'b0;
    #1;
    if (good) begin
      check(ent_mask == exp_mask, "care mask");
      check(ent_value == (upd_prefix & exp_mask), "masked value");
      check(ent_len_row == exp_row, "length row");
    end
    check(ins_en == ((upd_insert && !part_full[upd_port]) ? exp_strobe : '0), "insert strobe");
    check(del_en == (upd_delete ? exp_strobe : '0), "delete strobe");
    check(upd_ok == exp_ok, "outcome");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    part_full = '0;
    part_del_found = '0;
    // every length, insert into a port with room
    for (int n = 0; n <= 33; n++) begin
      upd_insert = 1; upd_delete = 0;
      upd_prefix = $urandom(); upd_len = 6'(n); upd_port = 4'(n % P);
      apply_and_check();
      @(posedge clk);
    end
    // random mix of inserts, deletes and idle cycles
    for (int i = 0; i < 3000; i++) begin
      int kind;
      kind = int'($urandom_range(2));
      upd_insert = (kind == 0);
      upd_delete = (kind == 1);
      upd_prefix = $urandom();
      upd_len    = ($urandom_range(15) == 0) ? 6'($urandom_range(63)) : 6'($urandom_range(32, 1));
      upd_port   = 4'($urandom_range(P - 1));
      part_full      = 16'($urandom());
      part_del_found = 16'($urandom());
      apply_and_check();
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
