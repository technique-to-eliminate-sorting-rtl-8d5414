// tb_lpm_coprocessor: end-to-end, self-checking test of the co-processor,
// shrunk to 4 ports with 8 rows per partition so that partitions fill up.
// A reference route table is kept here. Random insertions, deletions and
// lookups are issued one per cycle; each response is checked one cycle after
// its request against a longest-prefix search of the reference table. Routes
// are drawn from a few nested address blocks so that lookups often match
// several lengths in several partitions. The test counts how often each
// mechanism occurred and fails if one never did: single-cycle insertion seen
// by the very next lookup, refusal on a full partition, refusal of a
// malformed length, deletion hit and miss, lookup hit and miss, and a longer
// prefix in one partition winning over a shorter one in another.
module tb_lpm_coprocessor;
  import lpm_pkg::*;
  localparam int unsigned L    = 32;
  localparam int unsigned P    = 4;
  localparam int unsigned ROWS = 8;

  logic          clk = 0, rst_n;
  lpm_op_e       req_op;
  logic [L-1:0]  req_addr;
  logic [5:0]    req_len;
  logic [1:0]    req_port;
  logic          rsp_valid, rsp_hit, rsp_ok;
  lpm_op_e       rsp_op;
  logic [P-1:0]  rsp_port;
  logic [L-1:0]  rsp_len;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lpm_coprocessor #(.ADDR_W(L), .NUM_PORTS(P), .PART_ROWS(ROWS)) dut (.*);

  // reference table
  logic [L-1:0] r_pfx  [$];
  int           r_len  [$];
  int           r_port [$];

  // mechanism counters
  int n_ins_ok, n_ins_full, n_ins_bad, n_del_ok, n_del_miss;
  int n_hit, n_miss, n_longer_wins, n_ins_then_hit;

  function automatic logic [L-1:0] mask_of(int len);
    return L'(~((64'h1 << (32 - len)) - 1));
  endfunction

  function automatic int port_count(int p);
    int c = 0;
    foreach (r_port[i]) if (r_port[i] == p) c++;
    return c;
  endfunction

  function automatic int find_route(logic [L-1:0] pfx, int len);
    foreach (r_pfx[i]) if (r_pfx[i] == (pfx & mask_of(len)) && r_len[i] == len) return i;
    return -1;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Issue one request and check its response one cycle later.
  task automatic issue(input lpm_op_e op, input logic [L-1:0] addr, input int len, input int port);
    bit           exp_ok, exp_hit;
    logic [P-1:0] exp_port;
    logic [L-1:0] exp_len;
    int           best, idx;
    bit           shorter_elsewhere;
    exp_ok = 0; exp_hit = 0; exp_port = '0; exp_len = '0;
    shorter_elsewhere = 0;
    case (op)
      OP_INSERT: begin
        if (len < 1 || len > 32) begin
          exp_ok = 0; n_ins_bad++;
        end else if (port_count(port) == ROWS) begin
          exp_ok = 0; n_ins_full++;
        end else begin
          exp_ok = 1; n_ins_ok++;
        end
      end
      OP_DELETE: begin
        idx = (len >= 1 && len <= 32) ? find_route(addr, len) : -1;
        exp_ok = (idx >= 0) && (r_port[idx] == port);
        if (exp_ok) n_del_ok++; else n_del_miss++;
      end
      OP_LOOKUP: begin
        best = 0;
        foreach (r_pfx[i])
          if (((addr ^ r_pfx[i]) & mask_of(r_len[i])) == 0 && r_len[i] > best) best = r_len[i];
        foreach (r_pfx[i])
          if (((addr ^ r_pfx[i]) & mask_of(r_len[i])) == 0) begin
            if (r_len[i] == best) exp_port[r_port[i]] = 1'b1;
          end
        foreach (r_pfx[i])
          if (((addr ^ r_pfx[i]) & mask_of(r_len[i])) == 0 && r_len[i] < best &&
              !exp_port[r_port[i]]) shorter_elsewhere = 1;
        exp_hit = (best > 0);
        exp_ok  = exp_hit;
        if (exp_hit) exp_len[best - 1] = 1'b1;
        if (exp_hit) n_hit++; else n_miss++;
        if (shorter_elsewhere) n_longer_wins++;
      end
      default: ;
    endcase
    @(negedge clk);
    req_op = op; req_addr = addr; req_len = 6'(len); req_port = 2'(port);
    @(posedge clk); #1;
    req_op = OP_NOP;
    check(rsp_valid == (op != OP_NOP) && (op == OP_NOP || rsp_op == op),
          "response exactly one cycle after request");
    check(rsp_ok == exp_ok, $sformatf("ok flag op=%s addr=%h len=%0d port=%0d: %b exp %b",
                                      op.name(), addr, len, port, rsp_ok, exp_ok));
    if (op == OP_LOOKUP) begin
      check(rsp_hit == exp_hit, "hit flag");
      check(rsp_port == exp_port, $sformatf("port %b exp %b (addr %h)", rsp_port, exp_port, addr));
      check(rsp_len == exp_len, $sformatf("length %h exp %h (addr %h)", rsp_len, exp_len, addr));
    end
    // keep the reference in step
    if (op == OP_INSERT && exp_ok) begin
      r_pfx.push_back(addr & mask_of(len)); r_len.push_back(len); r_port.push_back(port);
    end
    if (op == OP_DELETE && exp_ok) begin
      idx = find_route(addr, len);
      r_pfx.delete(idx); r_len.delete(idx); r_port.delete(idx);
    end
  endtask

  // Address blocks the random routes are drawn from.
  logic [L-1:0] base [4] = '{32'h0A00_0000, 32'hC0A8_0000, 32'hAC10_0000, 32'h8000_0000};

  function automatic logic [L-1:0] rand_addr();
    return base[$urandom_range(3)] | (L'($urandom()) & 32'h0003_0F0F);
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] a;
    int           len, port, idx, pick;
    n_ins_ok = 0; n_ins_full = 0; n_ins_bad = 0; n_del_ok = 0; n_del_miss = 0;
    n_hit = 0; n_miss = 0; n_longer_wins = 0; n_ins_then_hit = 0;
    rst_n = 0; req_op = OP_NOP; req_addr = '0; req_len = '0; req_port = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    check(!rsp_valid, "idle response after reset");

    // directed: lookup on the empty table, nested routes on different ports
    issue(OP_LOOKUP, 32'h0A01_0203, 0, 0);
    issue(OP_INSERT, 32'h0A00_0000, 8, 1);
    issue(OP_LOOKUP, 32'h0A01_0203, 0, 0);     // inserted in the cycle before
    if (rsp_hit && rsp_port == 4'b0010) n_ins_then_hit++;
    issue(OP_INSERT, 32'h0A01_0000, 16, 2);
    issue(OP_INSERT, 32'h0A01_0200, 24, 3);
    issue(OP_LOOKUP, 32'h0A01_0203, 0, 0);     // /24 on port 3 wins
    issue(OP_LOOKUP, 32'h0A01_FF00, 0, 0);     // /16 on port 2 wins
    issue(OP_LOOKUP, 32'h0AFF_0000, 0, 0);     // /8 on port 1
    issue(OP_LOOKUP, 32'h0B00_0000, 0, 0);     // miss
    issue(OP_INSERT, 32'h0A01_0203, 0, 0);     // length 0: malformed
    issue(OP_INSERT, 32'h0A01_0203, 33, 0);    // length 33: malformed
    issue(OP_DELETE, 32'h0A01_0200, 24, 3);
    issue(OP_LOOKUP, 32'h0A01_0203, 0, 0);     // falls back to the /16
    issue(OP_DELETE, 32'h0A01_0200, 24, 3);    // already gone
    // fill partition 0 and overflow it
    for (int i = 0; i <= int'(ROWS); i++)
      issue(OP_INSERT, 32'h2000_0000 + 32'(i << 8), 24, 0);
    for (int i = 0; i <= int'(ROWS); i++)
      issue(OP_LOOKUP, 32'h2000_0011 + 32'(i << 8), 0, 0);
    for (int i = 0; i < int'(ROWS); i++)
      issue(OP_DELETE, 32'h2000_0000 + 32'(i << 8), 24, 0);

    // random traffic
    for (int i = 0; i < 3000; i++) begin
      pick = int'($urandom_range(9));
      if (pick < 3) begin
        a = rand_addr(); len = int'($urandom_range(32, 4)); port = int'($urandom_range(P - 1));
        idx = find_route(a, len);
        if (idx < 0) begin
          issue(OP_INSERT, a, len, port);
          // the very next cycle: a lookup inside the new prefix
          if (rsp_ok) begin
            issue(OP_LOOKUP, a | (L'($urandom()) & ~mask_of(len)), 0, 0);
            if (rsp_hit) n_ins_then_hit++;
          end
        end else begin
          issue(OP_DELETE, a, len, r_port[idx]);
        end
      end else if (pick < 4 && r_pfx.size() > 0) begin
        idx = int'($urandom_range(r_pfx.size() - 1));
        // sometimes name the wrong port, which must miss
        port = ($urandom_range(3) == 0) ? int'($urandom_range(P - 1)) : r_port[idx];
        issue(OP_DELETE, r_pfx[idx], r_len[idx], port);
      end else if (pick < 5) begin
        issue(OP_NOP, '0, 0, 0);
        check(!rsp_valid, "no response to an idle cycle");
      end else begin
        if (r_pfx.size() > 0 && $urandom_range(1) == 0) begin
          idx = int'($urandom_range(r_pfx.size() - 1));
          a = r_pfx[idx] | (L'($urandom()) & ~mask_of(r_len[idx]));
        end else a = rand_addr();
        issue(OP_LOOKUP, a, 0, 0);
      end
    end

    $display("mechanisms: insert=%0d insert_full=%0d insert_malformed=%0d delete=%0d delete_miss=%0d",
             n_ins_ok, n_ins_full, n_ins_bad, n_del_ok, n_del_miss);
    $display("mechanisms: lookup_hit=%0d lookup_miss=%0d longer_prefix_wins=%0d insert_then_lookup=%0d",
             n_hit, n_miss, n_longer_wins, n_ins_then_hit);
    check(n_ins_ok > 0, "insertion happened");
    check(n_ins_full > 0, "full partition refusal happened");
    check(n_ins_bad > 0, "malformed insertion happened");
    check(n_del_ok > 0, "deletion happened");
    check(n_del_miss > 0, "deletion miss happened");
    check(n_hit > 0, "lookup hit happened");
    check(n_miss > 0, "lookup miss happened");
    check(n_longer_wins > 0, "longer prefix beat a shorter one in another partition");
    check(n_ins_then_hit > 0, "insertion visible to the next lookup");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
