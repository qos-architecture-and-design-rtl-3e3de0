// qnoc_input_port: one input port of the router.
//
// Every non-idle flit arriving on the link is written into the buffer of
// its service level (one buffer per level, "direct buffer mapping"). For
// each level the port keeps one Current Routing Table (CRT) entry: the
// output port of the packet now at the head of that buffer. When a packet's
// first flit reaches the head, the routing function computes the output
// port from the TRA field of that flit and the request is made at once;
// when that first flit is forwarded and is not also the last, the port is
// written into the CRT, and the body flits that follow use it until the
// tail (EP) has been forwarded. Each forwarded flit frees one buffer slot,
// and the port returns one buffer-credit per freed slot to the previous
// router: the credit mask has one bit per service level, so flits of
// several levels forwarded in the same cycle are credited together.
//
// Timing: a flit on link_in at a clock edge is at the buffer head in the
// next cycle. pop[s] (from the output port that took the flit) removes it
// at the next edge, and the matching credit is on credit_out during the
// cycle after that edge (a registered output). Reset is synchronous and
// active low; it empties the buffers and the CRT.
//
// Routing at the buffer head instead of at arrival is this design's
// choice: with two-flit buffers the head of one packet and the tail of the
// one before can be buffered together, and a single CRT entry per level
// then serves both.
module qnoc_input_port
  import qnoc_pkg::*;
#(
  parameter int unsigned MY_ROW = 0,
  parameter int unsigned MY_COL = 0,
  parameter int unsigned DEPTH  = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  link_t   link_in,
  output credit_t credit_out,
  input  logic    [NUM_SL-1:0] pop,
  output logic    [NUM_SL-1:0] head_valid,
  output flit_t   head_flit [NUM_SL],
  output port_e   req_port  [NUM_SL]
);

  logic  [NUM_SL-1:0] crt_valid;
  port_e              crt_port [NUM_SL];
  port_e              route_port [NUM_SL];

  for (genvar s = 0; s < NUM_SL; s++) begin : g_sl
    logic [$clog2(DEPTH+1)-1:0] cnt_unused;

    qnoc_sl_buffer #(.DEPTH(DEPTH)) u_buf (
      .clk,
      .rst_n,
      .push      (link_in.ftype != FT_IDLE && link_in.sl == sl_e'(s)),
      .push_flit ('{ftype: link_in.ftype, data: link_in.data}),
      .pop       (pop[s]),
      .head_valid(head_valid[s]),
      .head_flit (head_flit[s]),
      .count     (cnt_unused)
    );

    qnoc_route #(.MY_ROW(MY_ROW), .MY_COL(MY_COL)) u_route (
      .tgt_row (tra_row(head_flit[s].data)),
      .tgt_col (tra_col(head_flit[s].data)),
      .out_port(route_port[s])
    );

    assign req_port[s] = crt_valid[s] ? crt_port[s] : route_port[s];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        crt_valid[s] <= 1'b0;
        crt_port[s]  <= P_LOCAL;
      end else if (pop[s]) begin
        crt_valid[s] <= !is_tail(head_flit[s].ftype);
        crt_port[s]  <= req_port[s];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) credit_out <= CREDIT_NONE;
    else        credit_out <= '{valid: |pop, sl_mask: pop};
  end

endmodule
