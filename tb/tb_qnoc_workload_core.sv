// tb_qnoc_workload_core: the benchmark traffic of the 4x4 design example
// run on the network at its default sizes, used by the uniform and the
// non-uniform workload testbenches.
//
// Every module carries four sources with the benchmark's packet sizes and
// rates, one cycle standing for 1 ns of a 1 GHz link clock: Signalling
// 2 flits every 50-150 ns (uniform), Real-Time 20-60 flits every 2 us,
// RD/WR 2-6 flits every 25 ns, Block Transfer 2000 flits every 12.5 us
// (exponential), about 720 MB/s per module in all. MODE 0 sends uniformly to
// all other modules; MODE 1 makes direct neighbours twice as likely as any
// other module. After CYCLES cycles the sources stop and the network
// drains. Checked: every flit arrives at its module intact and in order,
// nothing is lost, and each level meets the benchmark's delay requirement.
// The end-to-end delay of each level (packet creation to arrival of its
// last flit, source queueing included) is printed as mean, 99th and
// 99.9th percentile and maximum.
module tb_qnoc_workload_core
  import qnoc_pkg::*;
  import tb_noc_sb_pkg::*;
#(
  parameter int MODE   = 0,
  parameter int CYCLES = 120000
) ();

  // Delay requirements of the benchmark, in cycles of 1 ns: Signalling
  // 20-30 ns (99.9 %), RD/WR about 100 ns (99 %), Real-Time 125 us, Block
  // Transfer a few times its 20 us transfer time on a 32-bit 50 MHz bus
  // (taken here as five times).
  localparam int SIG_BOUND  = 30;
  localparam int RDWR_BOUND = 100;
  localparam int RT_BOUND   = 125000;
  localparam int BT_BOUND   = 100000;

  localparam int NODES = 16;

  // Set when the run has printed its result; the wrapper then ends the
  // simulation.
  logic done = 1'b0;

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
    tb_noc_endpoint #(.SRC_ID(n), .SINK_ID(n), .MODE(MODE)) u_ep (
      .clk, .rst_n, .enable,
      .inj_link(inj_link[n]), .inj_credit(inj_credit[n]),
      .ej_link(ej_link[n]), .ej_credit(ej_credit[n]));
  end

  longint flits_rx = 0;
  always @(posedge clk)
    for (int n = 0; n < NODES; n++) if (ej_link[n].ftype != FT_IDLE) flits_rx++;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    enable = 1'b1;
    repeat (CYCLES) @(posedge clk);
    $display("%s traffic: %0d flits delivered in %0d cycles, %0.3f flits per cycle per module",
             MODE == 0 ? "uniform" : "non-uniform", flits_rx, CYCLES,
             real'(flits_rx) / real'(CYCLES) / real'(NODES));
    enable = 1'b0;
    for (int c = 0; c < 200000 && outstanding() != 0; c++) @(posedge clk);
    checks++;
    if (!all_empty()) fail($sformatf("%0d flits never arrived", outstanding()));
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (n_pkts_rx[l] == 0) fail($sformatf("no packet of level %0d delivered", l));
      $display("  level %0d: %0d packets, delay mean %0.1f, 99%% %0d, 99.9%% %0d, max %0d cycles",
               l, n_pkts_rx[l], mean_delay(l), percentile(l, 990), percentile(l, 999), max_delay(l));
    end
    checks++;
    if (percentile(0, 999) > SIG_BOUND)
      fail($sformatf("Signalling 99.9%% delay above %0d cycles", SIG_BOUND));
    checks++;
    if (percentile(2, 990) > RDWR_BOUND)
      fail($sformatf("RD/WR 99%% delay above %0d cycles", RDWR_BOUND));
    checks++;
    if (percentile(1, 999) > RT_BOUND)
      fail($sformatf("Real-Time 99.9%% delay above %0d cycles", RT_BOUND));
    checks++;
    if (percentile(3, 999) > BT_BOUND)
      fail($sformatf("Block Transfer 99.9%% delay above %0d cycles", BT_BOUND));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    done = 1'b1;
  end

  initial begin
    #(10 * (CYCLES + 250000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    done = 1'b1;
  end
endmodule
