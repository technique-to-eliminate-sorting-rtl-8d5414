// partition_tcam: one partition of the forwarding table, holding only the
// routes of a single output port, in unsorted order.
//
// Each row is a ternary prefix (value plus care mask, the TCAM cells) and a
// length row of ADDR_W bits (the SRAM cells) with a single bit set at
// position len-1. There is no priority encoder and no address decoder: a
// search compares the key with every valid row in parallel, and each row that
// matches drives its length row onto the shared length lines, which are the
// wired OR of all matching rows (len_match). Because all rows of a partition
// point to the same port, their order does not matter, and a partition that
// holds no duplicates raises at most one row per length line.
//
// Insertion writes the new entry into the lowest free row in one clock cycle
// (any free row would do; lowest is this design's choice). It is refused
// when no row is free (full). Deletion, this design's addition so that routes
// can be withdrawn, clears every valid row whose value and mask equal the
// given ones in one cycle and reports whether any did (del_found, combinational
// while del_en is high).
//
// Timing: len_match, full and del_found are combinational from the stored rows
// and the inputs. ins_en and del_en take effect at the rising clock edge, so a
// search in the next cycle sees the change. Reset (active low, synchronous to
// the clock edge) empties the partition; the row contents are not reset and
// are never read while their valid bit is low.
module partition_tcam #(
  parameter int unsigned ADDR_W = lpm_pkg::ADDR_W_DEF,
  parameter int unsigned ROWS   = lpm_pkg::PART_ROWS_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  // search
  input  logic [ADDR_W-1:0] search_key,
  output logic [ADDR_W-1:0] len_match,   // bit n-1: a prefix of length n matched
  // insertion
  input  logic              ins_en,
  input  logic [ADDR_W-1:0] ins_value,
  input  logic [ADDR_W-1:0] ins_mask,    // 1 = bit is compared, 0 = don't care
  input  logic [ADDR_W-1:0] ins_len_row,
  output logic              full,
  // deletion
  input  logic              del_en,
  input  logic [ADDR_W-1:0] del_value,
  input  logic [ADDR_W-1:0] del_mask,
  output logic              del_found
);

  localparam int unsigned IDX_W = (ROWS > 1) ? $clog2(ROWS) : 1;

  logic [ROWS-1:0]   valid;
  logic [ADDR_W-1:0] tcam_value [ROWS];
  logic [ADDR_W-1:0] tcam_mask  [ROWS];
  logic [ADDR_W-1:0] sram_len   [ROWS];

  logic [ROWS-1:0]   del_hit;
  logic [IDX_W-1:0]  free_idx;

  // Search: match lines of all rows, each gating its length row onto the
  // length lines.
  always_comb begin
    len_match = '0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      if (valid[r] && (((search_key ^ tcam_value[r]) & tcam_mask[r]) == '0))
        len_match |= sram_len[r];
    end
  end

  // Rows that hold exactly the entry to be deleted.
  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++)
      del_hit[r] = valid[r] && (tcam_value[r] == del_value) && (tcam_mask[r] == del_mask);
  end
  assign del_found = |del_hit;

  // Lowest free row for the next insertion.
  always_comb begin
    free_idx = '0;
    for (int r = int'(ROWS) - 1; r >= 0; r--)
      if (!valid[r]) free_idx = IDX_W'(r);
  end
  assign full = &valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < ROWS; r++) valid[r] <= 1'b0;
    end else begin
      if (del_en) valid <= valid & ~del_hit;
      if (ins_en && !full) begin
        valid[free_idx]      <= 1'b1;
        tcam_value[free_idx] <= ins_value & ins_mask;
        tcam_mask[free_idx]  <= ins_mask;
        sram_len[free_idx]   <= ins_len_row;
      end
    end
  end

  // The update controller never issues both in one cycle.
  a_one_update: assert property (@(posedge clk) disable iff (!rst_n) !(ins_en && del_en));

endmodule
