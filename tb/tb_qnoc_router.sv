// tb_qnoc_router: self-checking test of one five-port router.
//
// The router sits at row 1, column 1 of a 4x4 address space with all five
// ports present, and a traffic endpoint on each port. Phase 1 sends one
// single-flit Signalling packet through the idle router and checks the
// latency of two cycles from input link to output link. Phase 1b lets a
// single-flit Signalling packet overtake a Real-Time packet on one output
// and checks the flit order on that link. Phase 2 runs random
// traffic of all four levels from all ports (Block Transfer shortened to
// 40-120 flits so that many packets complete), with two sinks withholding
// credits at random; phase 3 stops the sources and lets the router drain.
// Every flit must reach the port its packet's address routes to, intact
// and in order; afterwards nothing may be missing. Preemption of a packet
// by a higher level, credit stalls, round-robin between inputs, single-flit
// and multi-flit packets are counted, and each must have happened.
module tb_qnoc_router;
  import qnoc_pkg::*;
  import tb_noc_sb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  always #5 clk = ~clk;

  link_t   link_in    [NUM_PORTS];
  credit_t credit_out [NUM_PORTS];
  link_t   link_out   [NUM_PORTS];
  credit_t credit_in  [NUM_PORTS];

  qnoc_router #(.MY_ROW(1), .MY_COL(1)) dut (.*);

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_ep
    tb_noc_endpoint #(
      .SRC_ID(p), .SINK_ID(p), .MODE(2), .LOAD_PCT(150),
      .SIG_MIN(1), .SIG_MAX(2), .BT_MIN(40), .BT_MAX(120), .BT_MEAN(1500),
      .SINK_HOLD((p == 2 || p == 3) ? 300 : 0)
    ) u_ep (
      .clk, .rst_n, .enable,
      .inj_link(link_in[p]), .inj_credit(credit_out[p]),
      .ej_link(link_out[p]), .ej_credit(credit_in[p]));
  end

  // Mechanism counters from the output ports.
  int n_preempt = 0, n_stall = 0, n_rr = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_out[0].g_on.u_out.preempt) n_preempt++;
    if (dut.g_out[1].g_on.u_out.preempt) n_preempt++;
    if (dut.g_out[2].g_on.u_out.preempt) n_preempt++;
    if (dut.g_out[3].g_on.u_out.preempt) n_preempt++;
    if (dut.g_out[4].g_on.u_out.preempt) n_preempt++;
    if (dut.g_out[0].g_on.u_out.credit_stall) n_stall++;
    if (dut.g_out[1].g_on.u_out.credit_stall) n_stall++;
    if (dut.g_out[2].g_on.u_out.credit_stall) n_stall++;
    if (dut.g_out[3].g_on.u_out.credit_stall) n_stall++;
    if (dut.g_out[4].g_on.u_out.credit_stall) n_stall++;
    if (dut.g_out[0].g_on.u_out.rr_skip) n_rr++;
    if (dut.g_out[1].g_on.u_out.rr_skip) n_rr++;
    if (dut.g_out[2].g_on.u_out.rr_skip) n_rr++;
    if (dut.g_out[3].g_on.u_out.rr_skip) n_rr++;
    if (dut.g_out[4].g_on.u_out.rr_skip) n_rr++;
  end

  task automatic expect_count(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) fail($sformatf("%s never happened", what));
  endtask

  initial begin
    int t0, lat;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // Phase 1: latency through the idle router, west input to east output.
    g_ep[4].u_ep.send(0, 1, 3, int'(P_EAST), 1);
    t0 = -1;
    lat = -1;
    for (int c = 0; c < 20 && lat < 0; c++) begin
      @(negedge clk);
      if (t0 < 0 && link_in[P_WEST].ftype != FT_IDLE) t0 = c;
      if (link_out[P_EAST].ftype != FT_IDLE) lat = c - t0;
    end
    checks++;
    if (lat != 2) fail($sformatf("router latency %0d cycles, 2 expected", lat));

    // Phase 1b: a Real-Time packet from the west input is preempted on the
    // east output by a single-flit Signalling packet from the north input:
    // the east link must show Real-Time BDY, Signalling FP, Real-Time BDY
    // in consecutive cycles.
    repeat (5) @(posedge clk);
    g_ep[4].u_ep.send(1, 1, 3, int'(P_EAST), 12);
    begin
      int seen_rt, cyc_sig;
      link_t prev, cur;
      bit ok;
      seen_rt = 0;
      ok = 0;
      prev = LINK_IDLE;
      for (int c = 0; c < 60; c++) begin
        @(negedge clk);
        if (c == 6) g_ep[1].u_ep.send(0, 1, 3, int'(P_EAST), 1);
        cur = link_out[P_EAST];
        if (cur.ftype != FT_IDLE && cur.sl == SL_RT) begin
          if (prev.ftype == FT_FP && prev.sl == SL_SIGNAL && seen_rt > 0) ok = 1;
          seen_rt++;
        end
        if (cur.ftype != FT_IDLE) prev = cur;
      end
      checks++;
      if (!ok) fail("Signalling flit did not preempt the Real-Time packet on the east link");
      checks++;
      if (seen_rt != 12) fail($sformatf("Real-Time packet had %0d flits on the east link, 12 expected", seen_rt));
    end

    // Phase 2: random traffic.
    enable = 1'b1;
    repeat (30000) @(posedge clk);
    // Phase 3: drain.
    enable = 1'b0;
    for (int c = 0; c < 20000 && outstanding() != 0; c++) @(posedge clk);
    checks++;
    if (!all_empty()) fail($sformatf("%0d flits never arrived", outstanding()));

    $display("router: packets delivered per level %0d %0d %0d %0d",
             n_pkts_rx[0], n_pkts_rx[1], n_pkts_rx[2], n_pkts_rx[3]);
    expect_count("preemptions", n_preempt);
    expect_count("credit stalls", n_stall);
    expect_count("round-robin skips", n_rr);
    expect_count("single-flit packets", n_fp_rx);
    expect_count("multi-flit packets", n_long_rx);
    expect_count("interleaved levels at a sink", n_rx_interleave);
    for (int l = 0; l < 4; l++) expect_count($sformatf("level %0d packets", l), n_pkts_rx[l]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
