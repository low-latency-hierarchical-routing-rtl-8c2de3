// routing_logic: hierarchical destination decode for one router input.
//
// A router is placed in the tree by two parameters, its LEVEL (1, 2 or 3)
// and its INDEX within that level. A level-L router with index I owns the
// nodes I*8^(L-1)*8 .. (I+1)*8^(L-1)*8-1, that is 8 nodes at level 1 and
// 64 at level 2. If the 7-bit destination lies in that range, the packet goes
// down the port named by the destination's field for that level: bits [2:0]
// of the destination (flit bits [59:57]) at level 1, bits [5:3] ([62:60]) at
// level 2 and bit [6] ([63]) at level 3. Otherwise it goes to the up port (8).
// Levels 1 and 2 follow the published pseudocode; the level-3 case, which the
// pseudocode leaves out, applies the same rule to bit [63]. Purely
// combinational: dir is valid in the cycle dest is.
module routing_logic
  import noc_pkg::*;
#(
  parameter int unsigned LEVEL = 1,
  parameter int unsigned INDEX = 0
) (
  input  node_t dest,
  output port_t dir
);

  localparam int unsigned SHIFT = 3 * (LEVEL - 1);   // field of this level

  logic [31:0] d;
  logic        in_cluster;
  logic [2:0]  field;

  always_comb begin
    d          = 32'(dest);
    // INDEX*8^LEVEL <= d < (INDEX+1)*8^LEVEL
    in_cluster = (d >> (SHIFT + 3)) == INDEX;
    field      = 3'(d >> SHIFT);
    dir = in_cluster ? port_t'(field) : port_t'(UP_PORT);
  end

  initial begin
    assert (LEVEL >= 1 && LEVEL <= 3) else $error("routing_logic: LEVEL must be 1..3");
  end

endmodule
