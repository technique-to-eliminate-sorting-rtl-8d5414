// lpm_pkg: constants, types and helper functions shared by the unsorted-TCAM
// longest-prefix-match co-processor.
//
// Defaults describe the main configuration: IPv4 (32-bit addresses, so 32
// possible prefix lengths), 16 output ports and a 256K-entry table split
// evenly into 16 partitions of 16K rows. A prefix length n (1..L) is carried
// in two forms: as a binary number on the update interface, and as a one-hot
// "length row" of L bits in which bit n-1 is set; the length row is what the
// partitions store and what the selection logic works on.
package lpm_pkg;

  parameter int unsigned ADDR_W_DEF      = 32;     // L: IPv4 address length
  parameter int unsigned NUM_PORTS_DEF   = 16;     // P: output ports / partitions
  parameter int unsigned PART_ROWS_DEF   = 16384;  // 262144 entries / 16 ports

  // Operation requested of the co-processor; one per clock cycle.
  typedef enum logic [1:0] {
    OP_NOP    = 2'd0,
    OP_LOOKUP = 2'd1,
    OP_INSERT = 2'd2,
    OP_DELETE = 2'd3
  } lpm_op_e;

endpackage
