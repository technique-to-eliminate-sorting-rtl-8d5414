// lpm_coprocessor: IP longest-prefix-match co-processor whose forwarding
// table is kept unsorted, so that a route insertion costs one clock cycle
// instead of O(N) moves.
//
// The table is split by output port into NUM_PORTS partitions
// (partition_tcam), each holding only the routes of its port. A lookup
// presents the destination address to all partitions at once; each returns
// ADDR_W length lines telling which prefix lengths matched in it. The Length
// Selection Logic (length_select) finds the longest length that matched
// anywhere and the Port Selection Logic (port_select) finds the partition,
// and therefore the output port, that matched at that length. No priority
// encoder and no port SRAM are needed. Updates go through update_ctrl, which
// writes a new route into any free row of its port's partition or removes
// one.
//
// Interface: one request per clock cycle on req_* (req_op = OP_NOP, OP_LOOKUP,
// OP_INSERT or OP_DELETE; req_len is the prefix length in binary, req_port the
// output port index). A lookup and an update cannot share a cycle. The
// response appears on rsp_* one cycle later, registered: rsp_valid and rsp_op
// echo the request; for a lookup rsp_hit, the one-hot output port rsp_port and
// the one-hot matched length rsp_len (bit n-1 for length n); for an update
// rsp_ok (insertion refused when the partition is full or the request is
// malformed; deletion refused when the route was not stored). An update is
// visible to a lookup issued in the next cycle.
//
// The search path (partition match, length selection, port selection) is
// combinational within the one cycle, as in the unpipelined organisation;
// the output register is this design's choice. Reset is active low and
// synchronous and empties the table. A route with length 0 (default route)
// cannot be stored: there are ADDR_W length lines, for lengths 1..ADDR_W.
module lpm_coprocessor
  import lpm_pkg::*;
#(
  parameter int unsigned ADDR_W    = ADDR_W_DEF,
  parameter int unsigned NUM_PORTS = NUM_PORTS_DEF,
  parameter int unsigned PART_ROWS = PART_ROWS_DEF,
  localparam int unsigned LEN_W    = $clog2(ADDR_W + 1),
  localparam int unsigned PORT_W   = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // request
  input  lpm_op_e              req_op,
  input  logic [ADDR_W-1:0]    req_addr,   // lookup address or route prefix
  input  logic [LEN_W-1:0]     req_len,
  input  logic [PORT_W-1:0]    req_port,
  // response, one cycle after the request
  output logic                 rsp_valid,
  output lpm_op_e              rsp_op,
  output logic                 rsp_hit,
  output logic [NUM_PORTS-1:0] rsp_port,
  output logic [ADDR_W-1:0]    rsp_len,
  output logic                 rsp_ok
);

  logic [NUM_PORTS-1:0][ADDR_W-1:0] part_len;
  logic [NUM_PORTS-1:0]             part_full, part_del_found;
  logic [NUM_PORTS-1:0]             ins_en, del_en;
  logic [ADDR_W-1:0]                ent_value, ent_mask, ent_len_row;
  logic                             upd_ok;
  logic [ADDR_W-1:0]                longest;
  logic                             any_match;
  logic [NUM_PORTS-1:0]             port_hit;

  update_ctrl #(.ADDR_W(ADDR_W), .NUM_PORTS(NUM_PORTS)) u_update (
    .upd_insert     (req_op == OP_INSERT),
    .upd_delete     (req_op == OP_DELETE),
    .upd_prefix     (req_addr),
    .upd_len        (req_len),
    .upd_port       (req_port),
    .ins_en         (ins_en),
    .del_en         (del_en),
    .ent_value      (ent_value),
    .ent_mask       (ent_mask),
    .ent_len_row    (ent_len_row),
    .part_full      (part_full),
    .part_del_found (part_del_found),
    .upd_ok         (upd_ok)
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_part
    partition_tcam #(.ADDR_W(ADDR_W), .ROWS(PART_ROWS)) u_part (
      .clk         (clk),
      .rst_n       (rst_n),
      .search_key  (req_addr),
      .len_match   (part_len[p]),
      .ins_en      (ins_en[p]),
      .ins_value   (ent_value),
      .ins_mask    (ent_mask),
      .ins_len_row (ent_len_row),
      .full        (part_full[p]),
      .del_en      (del_en[p]),
      .del_value   (ent_value),
      .del_mask    (ent_mask),
      .del_found   (part_del_found[p])
    );
  end

  length_select #(.ADDR_W(ADDR_W), .NUM_PORTS(NUM_PORTS)) u_lsl (
    .part_len  (part_len),
    .longest   (longest),
    .any_match (any_match)
  );

  port_select #(.ADDR_W(ADDR_W), .NUM_PORTS(NUM_PORTS)) u_psl (
    .longest  (longest),
    .part_len (part_len),
    .port_hit (port_hit)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_op    <= OP_NOP;
      rsp_hit   <= 1'b0;
      rsp_port  <= '0;
      rsp_len   <= '0;
      rsp_ok    <= 1'b0;
    end else begin
      rsp_valid <= (req_op != OP_NOP);
      rsp_op    <= req_op;
      rsp_hit   <= (req_op == OP_LOOKUP) && any_match;
      rsp_port  <= (req_op == OP_LOOKUP) ? port_hit : '0;
      rsp_len   <= (req_op == OP_LOOKUP) ? longest  : '0;
      rsp_ok    <= (req_op == OP_LOOKUP) ? any_match : upd_ok;
    end
  end

endmodule
