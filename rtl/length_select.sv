// length_select: the Length Selection Logic. Finds the length of the longest
// prefix that matched in any partition.
//
// Input is the length lines of all NUM_PORTS partitions (NUM_PORTS x ADDR_W
// lines, bit n-1 of a partition's word meaning "a prefix of length n matched
// here"). The first level ORs, for every length, the lines of all partitions,
// which gives the set of lengths that matched anywhere. The second level keeps
// only the highest of those: a length line survives when no longer length
// matched. The output is one-hot (or all zero when nothing matched) and
// any_match says whether anything matched at all.
//
// Purely combinational, made of two-input-gate equivalents: ADDR_W*(P-1) OR
// gates in the first level and (L*L-L)/2 gates in the second, as a tree of
// depth about log2(P) + log2(L).
module length_select #(
  parameter int unsigned ADDR_W    = lpm_pkg::ADDR_W_DEF,
  parameter int unsigned NUM_PORTS = lpm_pkg::NUM_PORTS_DEF
) (
  input  logic [NUM_PORTS-1:0][ADDR_W-1:0] part_len,
  output logic [ADDR_W-1:0]                longest,
  output logic                             any_match
);

  logic [ADDR_W-1:0] len_any;    // level 1: length matched in some partition
  logic [ADDR_W-1:0] longer_hit; // some longer length matched

  always_comb begin
    len_any = '0;
    for (int unsigned p = 0; p < NUM_PORTS; p++)
      len_any |= part_len[p];
  end

  always_comb begin
    for (int unsigned n = 0; n < ADDR_W; n++) begin
      longer_hit[n] = 1'b0;
      for (int unsigned m = n + 1; m < ADDR_W; m++)
        longer_hit[n] |= len_any[m];
    end
  end

  assign longest   = len_any & ~longer_hit;
  assign any_match = |len_any;

endmodule
