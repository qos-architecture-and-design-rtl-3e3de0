// qnoc_crossbar: switch from the input buffers to the output ports.
//
// Every (input port, service level) buffer head is a crossbar source. Each
// output port names one source per cycle (its grant) and receives that
// head flit. Because the flits of one buffer all go to the output named in
// its routing entry, no two outputs ever select the same source, and each
// output is a plain multiplexer. The module also forms the pop signals of
// the buffers: a buffer is popped when some output grants it.
//
// Purely combinational. The structure (a full crossbar between all inputs
// and outputs) follows the router diagram; the multiplexer form is this
// design's choice.
module qnoc_crossbar
  import qnoc_pkg::*;
(
  input  flit_t  head_flit   [NUM_PORTS][NUM_SL],
  input  logic   grant_valid [NUM_PORTS],
  input  logic   [PORT_W-1:0] grant_in [NUM_PORTS],
  input  sl_e    grant_sl    [NUM_PORTS],
  output flit_t  out_flit    [NUM_PORTS],
  output logic   [NUM_SL-1:0] pop [NUM_PORTS]
);

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_flit[o] = '{ftype: FT_IDLE, data: '0};
      for (int i = 0; i < NUM_PORTS; i++)
        for (int s = 0; s < NUM_SL; s++)
          if (grant_valid[o] && grant_in[o] == PORT_W'(i) && grant_sl[o] == sl_e'(s))
            out_flit[o] = head_flit[i][s];
    end
    for (int i = 0; i < NUM_PORTS; i++) begin
      pop[i] = '0;
      for (int o = 0; o < NUM_PORTS; o++)
        if (grant_valid[o] && grant_in[o] == PORT_W'(i))
          pop[i][grant_sl[o]] = 1'b1;
    end
  end

endmodule
