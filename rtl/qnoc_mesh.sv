// qnoc_mesh: the network of the design example, ROWS x COLS routers in a
// mesh with one module attached to each router.
//
// Router (r, c) sits in row r and column c; rows grow southwards and
// columns eastwards, so the TRA of a packet for the module at (r, c) is
// {r, c}. Neighbouring routers are joined by a pair of opposite links,
// each with its own credit wires. Ports that would leave the mesh are
// trimmed in the router. The module side of every router is brought out as
// ports, flattened in row-major order (index r*COLS + c):
//   inj_link / inj_credit : module to network and its buffer-credits back,
//   ej_link / ej_credit   : network to module and the module's credits.
// A module obeys the same credit rule as a router: it starts with DEPTH
// credits per service level towards the network and must return a credit
// for each flit it takes (it may return it at once).
//
// Every link is one flit wide and runs on the common clock clk; the
// per-link widths and clock rates of a customised layout are not modelled.
module qnoc_mesh
  import qnoc_pkg::*;
#(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned COLS  = 4,
  parameter int unsigned DEPTH = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  link_t   inj_link   [ROWS*COLS],
  output credit_t inj_credit [ROWS*COLS],
  output link_t   ej_link    [ROWS*COLS],
  input  credit_t ej_credit  [ROWS*COLS]
);

  // Router port signals, indexed by router and port.
  link_t   r_link_in    [ROWS*COLS][NUM_PORTS];
  credit_t r_credit_out [ROWS*COLS][NUM_PORTS];
  link_t   r_link_out   [ROWS*COLS][NUM_PORTS];
  credit_t r_credit_in  [ROWS*COLS][NUM_PORTS];

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      localparam int unsigned N = r*COLS + c;
      localparam logic [NUM_PORTS-1:0] EN = {
        (c > 0),         // west
        (r < ROWS-1),    // south
        (c < COLS-1),    // east
        (r > 0),         // north
        1'b1             // local
      };

      qnoc_router #(.MY_ROW(r), .MY_COL(c), .DEPTH(DEPTH), .PORT_EN(EN)) u_router (
        .clk,
        .rst_n,
        .link_in   (r_link_in[N]),
        .credit_out(r_credit_out[N]),
        .link_out  (r_link_out[N]),
        .credit_in (r_credit_in[N])
      );

      // Module side.
      assign r_link_in[N][P_LOCAL]   = inj_link[N];
      assign inj_credit[N]           = r_credit_out[N][P_LOCAL];
      assign ej_link[N]              = r_link_out[N][P_LOCAL];
      assign r_credit_in[N][P_LOCAL] = ej_credit[N];

      // North neighbour.
      if (r > 0) begin : g_n
        assign r_link_in[N][P_NORTH]   = r_link_out[N-COLS][P_SOUTH];
        assign r_credit_in[N][P_NORTH] = r_credit_out[N-COLS][P_SOUTH];
      end else begin : g_n_edge
        assign r_link_in[N][P_NORTH]   = LINK_IDLE;
        assign r_credit_in[N][P_NORTH] = CREDIT_NONE;
      end
      // South neighbour.
      if (r < ROWS-1) begin : g_s
        assign r_link_in[N][P_SOUTH]   = r_link_out[N+COLS][P_NORTH];
        assign r_credit_in[N][P_SOUTH] = r_credit_out[N+COLS][P_NORTH];
      end else begin : g_s_edge
        assign r_link_in[N][P_SOUTH]   = LINK_IDLE;
        assign r_credit_in[N][P_SOUTH] = CREDIT_NONE;
      end
      // East neighbour.
      if (c < COLS-1) begin : g_e
        assign r_link_in[N][P_EAST]   = r_link_out[N+1][P_WEST];
        assign r_credit_in[N][P_EAST] = r_credit_out[N+1][P_WEST];
      end else begin : g_e_edge
        assign r_link_in[N][P_EAST]   = LINK_IDLE;
        assign r_credit_in[N][P_EAST] = CREDIT_NONE;
      end
      // West neighbour.
      if (c > 0) begin : g_w
        assign r_link_in[N][P_WEST]   = r_link_out[N-1][P_EAST];
        assign r_credit_in[N][P_WEST] = r_credit_out[N-1][P_EAST];
      end else begin : g_w_edge
        assign r_link_in[N][P_WEST]   = LINK_IDLE;
        assign r_credit_in[N][P_WEST] = CREDIT_NONE;
      end
    end
  end

endmodule
