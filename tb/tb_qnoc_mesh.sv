// tb_qnoc_mesh: end-to-end test of the 4x4 network at its default sizes.
//
// A traffic endpoint sits on the module port of every router. Phase 1
// sends one single-flit Signalling packet across the idle mesh from the
// north-west corner (0,0) to the south-east corner (3,3): seven routers of
// two cycles each, so it must arrive 14 cycles after it entered. Phase 2
// runs random traffic of all four service levels between all modules
// (Signalling 1-2 flits, Real-Time 20-60, RD/WR 2-6, Block Transfer
// shortened to 100-300 flits), with two modules withholding credits at
// random so that back-pressure spreads into the mesh; phase 3 stops the
// sources and drains. Every flit must arrive at its addressed module,
// intact and in order, and none may be missing. The mechanisms of the
// design are counted and each must have occurred: preemption of a packet by
// a higher level inside the routers, credit stalls, round-robin among
// inputs, single- and multi-flit packets, X-first and Y-first routes.
module tb_qnoc_mesh;
  import qnoc_pkg::*;
  import tb_noc_sb_pkg::*;

  localparam int ROWS = 4;
  localparam int COLS = 4;
  localparam int NODES = ROWS * COLS;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  always #5 clk = ~clk;

  link_t   inj_link   [NODES];
  credit_t inj_credit [NODES];
  link_t   ej_link    [NODES];
  credit_t ej_credit  [NODES];

  qnoc_mesh dut (.*);

  for (genvar n = 0; n < NODES; n++) begin : g_ep
    tb_noc_endpoint #(
      .SRC_ID(n), .SINK_ID(n), .MODE(0), .LOAD_PCT(100),
      .SIG_MIN(1), .SIG_MAX(2), .BT_MIN(100), .BT_MAX(300), .BT_MEAN(2000),
      .SINK_HOLD((n == 5 || n == 10) ? 400 : 0)
    ) u_ep (
      .clk, .rst_n, .enable,
      .inj_link(inj_link[n]), .inj_credit(inj_credit[n]),
      .ej_link(ej_link[n]), .ej_credit(ej_credit[n]));
  end

  // Mechanism counters, summed over every present output port.
  int n_preempt = 0, n_stall = 0, n_rr = 0;
  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      for (genvar o = 0; o < NUM_PORTS; o++) begin : g_o
        if (o == 0 || (o == 1 && r > 0) || (o == 2 && c < COLS-1) ||
            (o == 3 && r < ROWS-1) || (o == 4 && c > 0)) begin : g_on
          always @(posedge clk) if (rst_n) begin
            if (dut.g_r[r].g_c[c].u_router.g_out[o].g_on.u_out.preempt) n_preempt++;
            if (dut.g_r[r].g_c[c].u_router.g_out[o].g_on.u_out.credit_stall) n_stall++;
            if (dut.g_r[r].g_c[c].u_router.g_out[o].g_on.u_out.rr_skip) n_rr++;
          end
        end
      end
    end
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

    // Phase 1: corner to corner through the idle mesh.
    g_ep[0].u_ep.send(0, 3, 3, 15, 1);
    t0 = -1;
    lat = -1;
    for (int c = 0; c < 60 && lat < 0; c++) begin
      @(negedge clk);
      if (t0 < 0 && inj_link[0].ftype != FT_IDLE) t0 = c;
      if (ej_link[15].ftype != FT_IDLE) lat = c - t0;
    end
    checks++;
    $display("corner-to-corner latency %0d cycles", lat);
    if (lat != 14) fail($sformatf("corner-to-corner latency %0d cycles, 14 expected", lat));

    // Phase 2: random traffic.
    enable = 1'b1;
    repeat (40000) @(posedge clk);
    // Phase 3: drain.
    enable = 1'b0;
    for (int c = 0; c < 100000 && outstanding() != 0; c++) @(posedge clk);
    checks++;
    if (!all_empty()) fail($sformatf("%0d flits never arrived", outstanding()));

    $display("mesh: packets delivered per level %0d %0d %0d %0d",
             n_pkts_rx[0], n_pkts_rx[1], n_pkts_rx[2], n_pkts_rx[3]);
    for (int l = 0; l < 4; l++)
      $display("  level %0d delay: mean %0.1f, 99%% below %0d, max %0d cycles",
               l, mean_delay(l), percentile(l, 990), max_delay(l));
    expect_count("preemptions in routers", n_preempt);
    expect_count("credit stalls", n_stall);
    expect_count("round-robin skips", n_rr);
    expect_count("single-flit packets", n_fp_rx);
    expect_count("multi-flit packets", n_long_rx);
    expect_count("X-first routes", n_xy_rx);
    expect_count("Y-first routes", n_yx_rx);
    expect_count("preemptions at sources", n_src_preempt);
    for (int l = 0; l < 4; l++) expect_count($sformatf("level %0d packets", l), n_pkts_rx[l]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
