// port_select: the Port Selection Logic. Tells which partition, and so which
// output port, holds the longest matching prefix.
//
// Inputs are the one-hot longest length from length_select and the length
// lines of every partition. For each partition the logic ANDs its ADDR_W
// length lines with the one-hot length and ORs the results, i.e. P*(2L-1)
// two-input gates with a depth of log2(L)+1. Output line p is high when
// partition p matched at the longest length. With a table free of duplicate
// routes exactly one line is high after a hit and none after a miss; if the
// same prefix was stored for two ports, both their lines rise.
//
// Purely combinational.
module port_select #(
  parameter int unsigned ADDR_W    = lpm_pkg::ADDR_W_DEF,
  parameter int unsigned NUM_PORTS = lpm_pkg::NUM_PORTS_DEF
) (
  input  logic [ADDR_W-1:0]                longest,
  input  logic [NUM_PORTS-1:0][ADDR_W-1:0] part_len,
  output logic [NUM_PORTS-1:0]             port_hit
);

  always_comb begin
    for (int unsigned p = 0; p < NUM_PORTS; p++)
      port_hit[p] = |(part_len[p] & longest);
  end

endmodule
