// update_ctrl: turns a route update into writes to one table partition.
//
// A route is (prefix, length n, output port). The controller checks that
// 1 <= n <= ADDR_W and that the port exists, forms the ternary care mask (the
// top n address bits are compared, the rest are don't care), the prefix value
// with its don't-care bits cleared, and the one-hot length row (bit n-1), and
// raises the insert or delete strobe of the partition that belongs to the
// route's output port only. Because partitions are unsorted, no other row and
// no other partition is touched: an insertion is a single write.
//
// upd_ok reports the outcome: an insertion succeeds when the request is well
// formed and the target partition is not full; a deletion succeeds when the
// target partition held the entry. All outputs are combinational; the strobes
// act at the partitions' next clock edge.
module update_ctrl #(
  parameter int unsigned ADDR_W    = lpm_pkg::ADDR_W_DEF,
  parameter int unsigned NUM_PORTS = lpm_pkg::NUM_PORTS_DEF,
  localparam int unsigned LEN_W    = $clog2(ADDR_W + 1),
  localparam int unsigned PORT_W   = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1
) (
  input  logic                 upd_insert,   // insertion requested this cycle
  input  logic                 upd_delete,   // deletion requested this cycle
  input  logic [ADDR_W-1:0]    upd_prefix,
  input  logic [LEN_W-1:0]     upd_len,      // prefix length, 1..ADDR_W
  input  logic [PORT_W-1:0]    upd_port,     // output port index
  // to / from the partitions
  output logic [NUM_PORTS-1:0] ins_en,
  output logic [NUM_PORTS-1:0] del_en,
  output logic [ADDR_W-1:0]    ent_value,
  output logic [ADDR_W-1:0]    ent_mask,
  output logic [ADDR_W-1:0]    ent_len_row,
  input  logic [NUM_PORTS-1:0] part_full,
  input  logic [NUM_PORTS-1:0] part_del_found,
  // outcome
  output logic                 upd_ok
);

  logic                 well_formed;
  logic [NUM_PORTS-1:0] port_sel;

  assign well_formed = (upd_len != '0) && (32'(upd_len) <= ADDR_W)
                    && (32'(upd_port) < NUM_PORTS);

  always_comb begin
    ent_mask    = '0;
    ent_len_row = '0;
    for (int unsigned b = 0; b < ADDR_W; b++) begin
      // address bit b (0 = least significant) is compared when it lies within
      // the top upd_len bits
      ent_mask[b] = (32'(ADDR_W - b) <= 32'(upd_len));
      ent_len_row[b] = (32'(b + 1) == 32'(upd_len));
    end
    ent_value = upd_prefix & ent_mask;
  end

  always_comb begin
    port_sel = '0;
    for (int unsigned p = 0; p < NUM_PORTS; p++)
      port_sel[p] = well_formed && (32'(upd_port) == p);
  end

  assign ins_en = upd_insert ? (port_sel & ~part_full) : '0;
  assign del_en = upd_delete ? port_sel : '0;

  always_comb begin
    upd_ok = 1'b0;
    if (upd_insert) upd_ok = |ins_en;
    else if (upd_delete) upd_ok = |(port_sel & part_del_found);
  end

endmodule
