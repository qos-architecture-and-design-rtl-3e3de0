// qnoc_route: routing function of one router.
//
// Symmetric X-Y routing over fixed shortest paths, as used in the 4x4 design
// example: a packet whose target column is east of its source column goes
// along X (the row) first and then along Y; every other packet goes along Y
// first and then along X. This way the two directions between a pair of
// modules use the same path. The router does not know the source of a
// packet, so the rule is applied on the current position: while the target
// column lies east of this router, go east; otherwise correct the row first
// (north or south), then go west, and deliver locally when both match.
// Applied hop by hop this yields exactly the X-Y path for eastbound packets
// and the Y-X path for the others.
//
// Purely combinational. Rows grow southwards, columns eastwards.
module qnoc_route
  import qnoc_pkg::*;
#(
  parameter int unsigned MY_ROW = 0,
  parameter int unsigned MY_COL = 0
) (
  input  logic [COORD_W-1:0] tgt_row,
  input  logic [COORD_W-1:0] tgt_col,
  output port_e              out_port
);

  localparam logic [COORD_W-1:0] R = COORD_W'(MY_ROW);
  localparam logic [COORD_W-1:0] C = COORD_W'(MY_COL);

  always_comb begin
    if (tgt_col > C)       out_port = P_EAST;
    else if (tgt_row < R)  out_port = P_NORTH;
    else if (tgt_row > R)  out_port = P_SOUTH;
    else if (tgt_col < C)  out_port = P_WEST;
    else                   out_port = P_LOCAL;
  end

endmodule
