// tb_noc_endpoint: traffic source and sink attached to one network port,
// used by the router and mesh testbenches.
//
// Source: four packet generators, one per service level, each with its own
// inter-arrival time and packet length range (defaults are the uniform
// benchmark: Signalling 2 flits every 50-150 cycles, Real-Time 20-60 flits
// every 2000 cycles on average, RD/WR 2-6 flits every 25, Block Transfer
// 2000 flits every 12500; exponential inter-arrival times except
// Signalling). LOAD_PCT scales all rates; the variable load_pct holds the
// scale at run time. One cycle stands for 1 ns.
// Generated flits wait in one queue per level; each cycle the source sends
// one flit of the highest level that has a flit and a credit, so levels
// interleave at the source as in a router. The first flit of a packet is
// {TRA, source id, sequence number}; other flits carry random data.
//
// Targets: MODE 0 picks any other module at random; MODE 1 makes the
// (up to four) direct neighbours twice as likely as any other module;
// MODE 2 is for a lone router at row 1, column 1 whose ports are the sinks:
// any mesh address is drawn and the sink is the port it routes to, the
// source's own port excepted. Real-Time packets (MODE 0 and 1) visit the
// other modules in a fixed cyclic order, as periodic connections do.
//
// Sink: takes every flit, checks it against the scoreboard and returns its
// credit; with SINK_HOLD > 0 it withholds credits in random cycles (per
// mille), to back the network up.
module tb_noc_endpoint
  import qnoc_pkg::*;
  import tb_noc_sb_pkg::*;
#(
  parameter int SRC_ID   = 0,
  parameter int SINK_ID  = 0,
  parameter int MODE     = 0,
  parameter int ROWS     = 4,
  parameter int COLS     = 4,
  parameter int DEPTH    = 2,
  parameter int LOAD_PCT = 100,
  parameter int SIG_MEAN = 100,
  parameter int RT_MEAN  = 2000,
  parameter int RW_MEAN  = 25,
  parameter int BT_MEAN  = 12500,
  parameter int SIG_MIN  = 2,
  parameter int SIG_MAX  = 2,
  parameter int RT_MIN   = 20,
  parameter int RT_MAX   = 60,
  parameter int RW_MIN   = 2,
  parameter int RW_MAX   = 6,
  parameter int BT_MIN   = 2000,
  parameter int BT_MAX   = 2000,
  parameter int SINK_HOLD = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    enable,
  output link_t   inj_link,
  input  credit_t inj_credit,
  input  link_t   ej_link,
  output credit_t ej_credit
);

  localparam int NODES = ROWS * COLS;
  localparam int MY_R = SRC_ID / COLS;
  localparam int MY_C = SRC_ID % COLS;

  // Load in percent of the benchmark rates; starts at LOAD_PCT and may be
  // changed by a testbench between runs.
  int     load_pct;

  longint now;
  longint next_t [4];
  flit_t  txq  [4][$];
  int     cred [4];
  bit     tx_mid [4];
  int     seq  [4];
  int     rt_next;
  int     sent_pkts [4];

  bit     rx_mid [4];
  int     rx_src [4];
  int     rx_len [4];
  bit     rx_east [4];
  int     pend [4];

  function automatic int mean_of(input int l);
    case (l)
      0: return SIG_MEAN;
      1: return RT_MEAN;
      2: return RW_MEAN;
      default: return BT_MEAN;
    endcase
  endfunction

  function automatic int draw_gap(input int l);
    real m, u;
    m = real'(mean_of(l)) * 100.0 / real'(load_pct);
    if (l == 0) return $urandom_range(int'(m / 2.0), int'(m * 1.5));
    u = (real'($urandom_range(1, 1000000)) / 1000000.0);
    return int'(-m * $ln(u)) + 1;
  endfunction

  function automatic int draw_len(input int l);
    case (l)
      0: return $urandom_range(SIG_MIN, SIG_MAX);
      1: return $urandom_range(RT_MIN, RT_MAX);
      2: return $urandom_range(RW_MIN, RW_MAX);
      default: return $urandom_range(BT_MIN, BT_MAX);
    endcase
  endfunction

  // Reference X-Y rule for the lone-router mode.
  function automatic int route_11(input int tr, input int tc);
    if (tc > 1) return int'(P_EAST);
    if (tr < 1) return int'(P_NORTH);
    if (tr > 1) return int'(P_SOUTH);
    if (tc < 1) return int'(P_WEST);
    return int'(P_LOCAL);
  endfunction

  function automatic bit adjacent(input int a, input int b);
    int ar, ac, br, bc, d;
    ar = a / COLS; ac = a % COLS; br = b / COLS; bc = b % COLS;
    d = ((ar > br) ? ar - br : br - ar) + ((ac > bc) ? ac - bc : bc - ac);
    return d == 1;
  endfunction

  // Draw a target address {row, col} and the sink it belongs to.
  task automatic pick_target(input int l, output int tr, output int tc, output int sink);
    if (MODE == 2) begin
      do begin
        tr = $urandom_range(0, ROWS-1);
        tc = $urandom_range(0, COLS-1);
        sink = route_11(tr, tc);
      end while (sink == SRC_ID);
    end else begin
      int d;
      if (l == 1) begin
        d = (SRC_ID + 1 + rt_next) % NODES;
        rt_next = (rt_next + 1) % (NODES - 1);
      end else if (MODE == 1) begin
        // Weight 2 for neighbours, 1 for the others.
        int total, pick, acc;
        total = 0;
        for (int n = 0; n < NODES; n++) if (n != SRC_ID) total += adjacent(SRC_ID, n) ? 2 : 1;
        pick = $urandom_range(0, total - 1);
        acc = 0;
        d = 0;
        for (int n = 0; n < NODES; n++) if (n != SRC_ID) begin
          acc += adjacent(SRC_ID, n) ? 2 : 1;
          if (pick < acc) begin d = n; break; end
        end
      end else begin
        d = $urandom_range(0, NODES - 2);
        if (d >= SRC_ID) d++;
      end
      tr = d / COLS;
      tc = d % COLS;
      sink = d;
    end
  endtask

  // Put one packet of level l for address (tr, tc) into the source queue.
  task automatic enqueue(input int l, input int tr, input int tc, input int sink, input int len);
    for (int k = 0; k < len; k++) begin
      flit_t f;
      if (k == 0) f.data = {2'(tr), 2'(tc), 4'(SRC_ID), 8'(seq[l])};
      else        f.data = 16'($urandom);
      f.ftype = (k != len - 1) ? FT_BDY : ((len == 1) ? FT_FP : FT_EP);
      txq[l].push_back(f);
      exp_q[sink][SRC_ID][l].push_back({f.ftype, f.data});
    end
    t_q[sink][SRC_ID][l].push_back(now);
    seq[l]++;
    sent_pkts[l]++;
  endtask

  // Directed injection, for testbenches that need a known packet.
  task automatic send(input int l, input int tr, input int tc, input int sink, input int len);
    enqueue(l, tr, tc, sink, len);
  endtask

  initial begin
    load_pct = LOAD_PCT;
    rt_next = $urandom_range(0, NODES - 2);
    for (int l = 0; l < 4; l++) begin
      seq[l] = 0; sent_pkts[l] = 0;
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      now <= 0;
      inj_link <= LINK_IDLE;
      ej_credit <= CREDIT_NONE;
      for (int l = 0; l < 4; l++) begin
        cred[l] = DEPTH;
        tx_mid[l] = 0;
        rx_mid[l] = 0;
        pend[l] = 0;
        next_t[l] = draw_gap(l);
      end
    end else begin
      int best;
      logic [3:0] cmask;
      now <= now + 1;
      // Traffic generation.
      for (int l = 0; l < 4; l++) begin
        if (enable && now >= next_t[l]) begin
          int tr, tc, sink;
          pick_target(l, tr, tc, sink);
          enqueue(l, tr, tc, sink, draw_len(l));
          next_t[l] = now + draw_gap(l);
        end
        if (!enable) next_t[l] = now + draw_gap(l);
      end
      // Transmit: credits that arrive now may be used now.
      if (inj_credit.valid)
        for (int l = 0; l < 4; l++) if (inj_credit.sl_mask[l]) cred[l]++;
      best = -1;
      for (int l = 3; l >= 0; l--)
        if (txq[l].size() != 0 && cred[l] > 0) best = l;
      if (best >= 0) begin
        flit_t f;
        f = txq[best].pop_front();
        cred[best]--;
        for (int l = best + 1; l < 4; l++) if (tx_mid[l]) begin n_src_preempt++; break; end
        tx_mid[best] = !is_tail(f.ftype);
        inj_link <= '{ftype: f.ftype, sl: sl_e'(best), data: f.data};
      end else begin
        inj_link.ftype <= FT_IDLE;
      end
      // Receive.
      if (ej_link.ftype != FT_IDLE) begin
        int l, src;
        l = int'(ej_link.sl);
        for (int m = l + 1; m < 4; m++) if (rx_mid[m]) begin n_rx_interleave++; break; end
        if (!rx_mid[l]) begin
          rx_src[l] = int'(ej_link.data[11:8]);
          rx_len[l] = 0;
          rx_east[l] = (int'(ej_link.data[13:12]) > (rx_src[l] % COLS));
          checks++;
          if (MODE != 2 && (int'(ej_link.data[15:14]) != SINK_ID / COLS ||
                            int'(ej_link.data[13:12]) != SINK_ID % COLS))
            fail($sformatf("sink %0d got a packet for (%0d,%0d)", SINK_ID,
                           ej_link.data[15:14], ej_link.data[13:12]));
        end
        src = rx_src[l];
        rx_len[l]++;
        checks++;
        if (exp_q[SINK_ID][src][l].size() == 0)
          fail($sformatf("sink %0d level %0d: unexpected flit %h from %0d", SINK_ID, l, ej_link.data, src));
        else begin
          logic [17:0] e;
          e = exp_q[SINK_ID][src][l].pop_front();
          if (e != {ej_link.ftype, ej_link.data})
            fail($sformatf("sink %0d level %0d from %0d: flit %0d/%h, expected %0d/%h", SINK_ID, l, src,
                           ej_link.ftype, ej_link.data, e[17:16], e[15:0]));
        end
        if (is_tail(ej_link.ftype)) begin
          rx_mid[l] = 0;
          n_pkts_rx[l]++;
          if (ej_link.ftype == FT_FP) n_fp_rx++;
          if (rx_len[l] > 2) n_long_rx++;
          if (MODE != 2) begin
            if (rx_east[l]) n_xy_rx++; else n_yx_rx++;
          end
          if (t_q[SINK_ID][src][l].size() != 0)
            delays[l].push_back(int'(now - t_q[SINK_ID][src][l].pop_front()));
        end else begin
          rx_mid[l] = 1;
        end
        pend[l]++;
        checks++;
        if (pend[l] > DEPTH) fail($sformatf("sink %0d level %0d: more flits than credits", SINK_ID, l));
      end
      // Return credits, one per level per cycle, unless holding.
      cmask = '0;
      if (SINK_HOLD == 0 || $urandom_range(0, 999) >= SINK_HOLD)
        for (int l = 0; l < 4; l++) if (pend[l] > 0) begin cmask[l] = 1'b1; pend[l]--; end
      ej_credit <= '{valid: cmask != '0, sl_mask: cmask};
    end
  end

endmodule
