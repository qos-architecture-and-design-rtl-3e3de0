// qnoc_router: five-port QoS wormhole router.
//
// The router links up to four mesh neighbours (north, east, south, west)
// and one module (local port), all with the same link interface: a flit
// with its type and service level forward, buffer-credits backward. Each
// input port buffers flits per service level and routes each packet on its
// first flit (X-Y routing). Each output port schedules among the waiting
// flits by service-level priority, round robin within a level, and credit
// availability at the next router, and drives its link through the
// crossbar. Flits of different levels interleave on a link; within a level
// a packet holds the output until its last flit (wormhole).
//
// PORT_EN trims ports: a cleared bit removes the input and output logic of
// that port, as for a router at the mesh edge or a link that the custom
// layout leaves out. A trimmed port's link_out is idle and its credit_out
// empty.
//
// Timing: one cycle in the input buffer and one in the output register,
// i.e. a flit on link_in at edge t can appear on link_out after edge t+2.
// All state is reset synchronously by rst_n (active low).
module qnoc_router
  import qnoc_pkg::*;
#(
  parameter int unsigned MY_ROW  = 0,
  parameter int unsigned MY_COL  = 0,
  parameter int unsigned DEPTH   = 2,
  parameter logic [NUM_PORTS-1:0] PORT_EN = '1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  link_t   link_in    [NUM_PORTS],
  output credit_t credit_out [NUM_PORTS],
  output link_t   link_out   [NUM_PORTS],
  input  credit_t credit_in  [NUM_PORTS]
);

  logic  [NUM_SL-1:0] head_valid [NUM_PORTS];
  flit_t              head_flit  [NUM_PORTS][NUM_SL];
  port_e              req_port   [NUM_PORTS][NUM_SL];
  logic  [NUM_SL-1:0] pop        [NUM_PORTS];

  logic               grant_valid [NUM_PORTS];
  logic  [PORT_W-1:0] grant_in    [NUM_PORTS];
  sl_e                grant_sl    [NUM_PORTS];
  flit_t              sel_flit    [NUM_PORTS];

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    if (PORT_EN[i]) begin : g_on
      qnoc_input_port #(.MY_ROW(MY_ROW), .MY_COL(MY_COL), .DEPTH(DEPTH)) u_in (
        .clk,
        .rst_n,
        .link_in   (link_in[i]),
        .credit_out(credit_out[i]),
        .pop       (pop[i]),
        .head_valid(head_valid[i]),
        .head_flit (head_flit[i]),
        .req_port  (req_port[i])
      );
    end else begin : g_off
      assign credit_out[i] = CREDIT_NONE;
      assign head_valid[i] = '0;
      for (genvar s = 0; s < NUM_SL; s++) begin : g_sl
        assign head_flit[i][s] = '{ftype: FT_IDLE, data: '0};
        assign req_port[i][s]  = P_LOCAL;
      end
    end
  end

  qnoc_crossbar u_xbar (
    .head_flit  (head_flit),
    .grant_valid(grant_valid),
    .grant_in   (grant_in),
    .grant_sl   (grant_sl),
    .out_flit   (sel_flit),
    .pop        (pop)
  );

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    if (PORT_EN[o]) begin : g_on
      logic [NUM_SL-1:0] req [NUM_PORTS];
      always_comb
        for (int i = 0; i < NUM_PORTS; i++)
          for (int s = 0; s < NUM_SL; s++)
            req[i][s] = head_valid[i][s] && (req_port[i][s] == port_e'(o));

      qnoc_output_port #(.DEPTH(DEPTH)) u_out (
        .clk,
        .rst_n,
        .req        (req),
        .credit_in  (credit_in[o]),
        .grant_valid(grant_valid[o]),
        .grant_in   (grant_in[o]),
        .grant_sl   (grant_sl[o]),
        .sel_flit   (sel_flit[o]),
        .link_out   (link_out[o])
      );
    end else begin : g_off
      assign grant_valid[o] = 1'b0;
      assign grant_in[o]    = '0;
      assign grant_sl[o]    = SL_SIGNAL;
      assign link_out[o]    = LINK_IDLE;
    end
  end

  // X-Y routing never sends a flit to a trimmed port.
  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_chk
    for (genvar s = 0; s < NUM_SL; s++) begin : g_sl
      a_route_to_present_port: assert property (@(posedge clk) disable iff (!rst_n)
        head_valid[i][s] |-> PORT_EN[req_port[i][s]]);
    end
  end

endmodule
