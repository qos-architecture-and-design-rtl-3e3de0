// tb_qnoc_workload_load_sweep: mean end-to-end delay of each service level
// against offered load, on the 4x4 network at its default sizes.
//
// The benchmark sources (uniform targets, packet sizes and rates of the
// uniform workload) run at 50, 75, 100 and 125 percent of the benchmark
// load, each for 40,000 cycles followed by a drain. For every load point
// the mean delay of each level is printed. Checked: every flit arrives
// intact and nothing is lost at any load; the Signalling delay stays
// nearly constant (at most twice its value at the lowest load) while the
// Block Transfer delay grows with load, as a preemptive priority network
// should behave.
module tb_qnoc_workload_load_sweep;
  import qnoc_pkg::*;
  import tb_noc_sb_pkg::*;

  localparam int NODES = 16;
  localparam int NPTS = 4;
  localparam int LOADS [NPTS] = '{50, 75, 100, 125};
  localparam int RUN = 40000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  int   sweep_load = 100;
  always #5 clk = ~clk;

  link_t   inj_link   [NODES];
  credit_t inj_credit [NODES];
  link_t   ej_link    [NODES];
  credit_t ej_credit  [NODES];

  qnoc_mesh dut (.*);

  for (genvar n = 0; n < NODES; n++) begin : g_ep
    tb_noc_endpoint #(.SRC_ID(n), .SINK_ID(n), .MODE(0)) u_ep (
      .clk, .rst_n, .enable,
      .inj_link(inj_link[n]), .inj_credit(inj_credit[n]),
      .ej_link(ej_link[n]), .ej_credit(ej_credit[n]));
    always @(sweep_load) u_ep.load_pct = sweep_load;
  end

  real mean [NPTS][4];

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NPTS; p++) begin
      sweep_load = LOADS[p];
      repeat (2) @(posedge clk);
      for (int l = 0; l < 4; l++) delays[l].delete();
      enable = 1'b1;
      repeat (RUN) @(posedge clk);
      enable = 1'b0;
      for (int c = 0; c < 200000 && outstanding() != 0; c++) @(posedge clk);
      checks++;
      if (!all_empty()) fail($sformatf("load %0d%%: %0d flits never arrived", LOADS[p], outstanding()));
      for (int l = 0; l < 4; l++) mean[p][l] = mean_delay(l);
      $display("load %0d%%: mean delay Signalling %0.1f, Real-Time %0.1f, RD/WR %0.1f, Block Transfer %0.1f cycles",
               LOADS[p], mean[p][0], mean[p][1], mean[p][2], mean[p][3]);
    end
    checks++;
    if (mean[NPTS-1][0] > 2.0 * mean[0][0])
      fail("Signalling delay grows with load");
    checks++;
    if (!(mean[NPTS-1][3] > mean[0][3]))
      fail("Block Transfer delay does not grow with load");
    checks++;
    if (!(mean[NPTS-1][2] > mean[0][2]))
      fail("RD/WR delay does not grow with load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * NPTS * (RUN + 200000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
