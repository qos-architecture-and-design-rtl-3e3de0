// qnoc_output_port: scheduler and link driver of one router output.
//
// For each service level the port keeps two entries:
//  * NBS (Next Buffer State): free flit slots in that level's buffer of the
//    next router's input port. It starts at the buffer depth, is
//    decremented for each flit sent and incremented for each credit
//    received.
//  * CSIP (Currently Served Input Port): the round-robin pointer among the
//    input ports that have flits of that level waiting for this output.
// Each cycle the port takes, per level, a candidate input. While a packet of
// that level is part-way through this output, the candidate is the input
// that sends it (wormhole: flits of two packets of one level never
// interleave on a link). Otherwise the candidate is the first requesting
// input from CSIP on. Of the levels whose candidate has a flit and whose
// NBS is not zero, the highest-priority one is sent (Signalling first,
// Block Transfer last). A higher-level flit therefore preempts a
// lower-level packet between any two of its flits, and the lower packet
// resumes once no higher level has anything to send. When the last flit of
// a packet is sent, CSIP moves one past the input that sent it.
//
// Interface: req[i][s] says input i has a head flit of level s for this
// output. The grant (valid, input, level) drives the crossbar, whose
// selected flit comes back on sel_flit and is registered onto link_out.
// credit_in carries the next router's buffer-credits.
//
// Timing: grant is combinational from req, NBS and CSIP; the flit is on
// link_out during the cycle after the edge that took it. A credit on
// credit_in may be used in the cycle it arrives. An idle link keeps its
// last data and level and only shows type IDLE, to avoid toggling wires.
//
// Searching all inputs in one cycle (rather than advancing CSIP one input
// per cycle when the served input has nothing to send) and the credit
// bypass are this design's choices.
module qnoc_output_port
  import qnoc_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    [NUM_SL-1:0] req [NUM_PORTS],
  input  credit_t credit_in,
  output logic    grant_valid,
  output logic    [PORT_W-1:0] grant_in,
  output sl_e     grant_sl,
  input  flit_t   sel_flit,
  output link_t   link_out
);

  localparam int unsigned CNT_W = $clog2(DEPTH+1);

  logic [CNT_W-1:0]  nbs  [NUM_SL];
  logic [PORT_W-1:0] csip [NUM_SL];
  logic [NUM_SL-1:0] locked;

  logic [NUM_SL-1:0] cand_valid;
  logic [PORT_W-1:0] cand_in [NUM_SL];
  logic [NUM_SL-1:0] credit_avail;
  logic [NUM_SL-1:0] sent;

  // Events of interest for monitoring: a lower-level packet part-way
  // through this output is overtaken, a level waits for credits, or the
  // round robin passes over an input with nothing to send.
  logic              preempt;
  logic              credit_stall;
  logic              rr_skip;

  function automatic logic [PORT_W-1:0] wrap_inc(input logic [PORT_W-1:0] p);
    return (p == PORT_W'(NUM_PORTS-1)) ? '0 : p + 1'b1;
  endfunction

  // Candidate input per service level.
  always_comb begin
    logic [PORT_W-1:0] idx;
    idx = '0;
    for (int s = 0; s < NUM_SL; s++) begin
      cand_valid[s] = 1'b0;
      cand_in[s]    = csip[s];
      idx           = csip[s];
      for (int k = 0; k < NUM_PORTS; k++) begin
        if (!cand_valid[s] && req[idx][s] && (!locked[s] || idx == csip[s])) begin
          cand_valid[s] = 1'b1;
          cand_in[s]    = idx;
        end
        idx = wrap_inc(idx);
      end
    end
  end

  always_comb
    for (int s = 0; s < NUM_SL; s++)
      credit_avail[s] = (nbs[s] != '0) || (credit_in.valid && credit_in.sl_mask[s]);

  // Priority among service levels: lowest code wins.
  always_comb begin
    grant_valid = 1'b0;
    grant_in    = '0;
    grant_sl    = SL_SIGNAL;
    for (int s = NUM_SL-1; s >= 0; s--) begin
      if (cand_valid[s] && credit_avail[s]) begin
        grant_valid = 1'b1;
        grant_in    = cand_in[s];
        grant_sl    = sl_e'(s);
      end
    end
    for (int s = 0; s < NUM_SL; s++)
      sent[s] = grant_valid && (grant_sl == sl_e'(s));
  end

  always_comb begin
    preempt      = 1'b0;
    credit_stall = 1'b0;
    rr_skip      = grant_valid && (grant_in != csip[grant_sl]);
    for (int s = 0; s < NUM_SL; s++) begin
      if (grant_valid && locked[s] && sl_e'(s) > grant_sl) preempt = 1'b1;
      if (cand_valid[s] && !credit_avail[s]) credit_stall = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_SL; s++) begin
        nbs[s]  <= CNT_W'(DEPTH);
        csip[s] <= '0;
      end
      locked   <= '0;
      link_out <= LINK_IDLE;
    end else begin
      for (int s = 0; s < NUM_SL; s++) begin
        nbs[s] <= nbs[s] + CNT_W'(credit_in.valid && credit_in.sl_mask[s])
                         - CNT_W'(sent[s]);
        if (sent[s]) begin
          if (is_tail(sel_flit.ftype)) begin
            locked[s] <= 1'b0;
            csip[s]   <= wrap_inc(grant_in);
          end else begin
            locked[s] <= 1'b1;
            csip[s]   <= grant_in;
          end
        end
      end
      if (grant_valid) begin
        link_out <= '{ftype: sel_flit.ftype, sl: grant_sl, data: sel_flit.data};
      end else begin
        link_out.ftype <= FT_IDLE;
      end
    end
  end

  c_preempt:      cover property (@(posedge clk) disable iff (!rst_n) preempt);
  c_credit_stall: cover property (@(posedge clk) disable iff (!rst_n) credit_stall);
  c_rr_skip:      cover property (@(posedge clk) disable iff (!rst_n) rr_skip);

  // A credit never raises NBS above the depth of the next buffer.
  for (genvar s = 0; s < NUM_SL; s++) begin : g_chk
    a_nbs_bound: assert property (@(posedge clk) disable iff (!rst_n)
      nbs[s] <= CNT_W'(DEPTH));
  end
  a_grant_not_idle: assert property (@(posedge clk) disable iff (!rst_n)
    grant_valid |-> sel_flit.ftype != FT_IDLE);

endmodule
