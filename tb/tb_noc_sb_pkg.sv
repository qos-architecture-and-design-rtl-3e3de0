// tb_noc_sb_pkg: scoreboard shared by the traffic endpoints of the router
// and mesh testbenches.
//
// A source writes every flit it generates into exp_q[sink][source][level]
// and the time its packet was made into t_q; the sink that receives the
// flit takes it from the same queue and compares. Because routes are fixed
// and every buffer is first-in first-out, flits of one (source, sink,
// level) triple arrive in the order they were made. End-to-end delays
// (from packet creation, source queueing included, to the arrival of its
// last flit) are kept per level for statistics.
package tb_noc_sb_pkg;
  localparam int MAX_EP = 16;

  logic [17:0] exp_q [MAX_EP][MAX_EP][4][$];
  longint      t_q   [MAX_EP][MAX_EP][4][$];
  int          delays [4][$];

  int checks = 0;
  int failures = 0;

  // Mechanism counters filled by the endpoints.
  int n_pkts_rx [4];
  int n_fp_rx = 0;            // single-flit packets delivered
  int n_long_rx = 0;          // packets of more than two flits
  int n_xy_rx = 0;            // eastbound packets (X first)
  int n_yx_rx = 0;            // other packets (Y first)
  int n_rx_interleave = 0;    // a level's flit arriving inside another level's packet
  int n_src_preempt = 0;      // a source sent a higher level inside a lower packet

  function automatic void fail(input string msg);
    failures++;
    $display("FAIL: %s", msg);
  endfunction

  function automatic bit all_empty();
    for (int d = 0; d < MAX_EP; d++)
      for (int s = 0; s < MAX_EP; s++)
        for (int l = 0; l < 4; l++)
          if (exp_q[d][s][l].size() != 0) return 0;
    return 1;
  endfunction

  function automatic int outstanding();
    int n;
    n = 0;
    for (int d = 0; d < MAX_EP; d++)
      for (int s = 0; s < MAX_EP; s++)
        for (int l = 0; l < 4; l++)
          n += exp_q[d][s][l].size();
    return n;
  endfunction

  // Delay below which the given fraction (per mille) of packets arrived.
  function automatic int percentile(input int l, input int per_mille);
    int n, idx;
    n = delays[l].size();
    if (n == 0) return 0;
    delays[l].sort();
    idx = (n * per_mille) / 1000;
    if (idx >= n) idx = n - 1;
    return delays[l][idx];
  endfunction

  function automatic int max_delay(input int l);
    int m;
    m = 0;
    foreach (delays[l][k]) if (delays[l][k] > m) m = delays[l][k];
    return m;
  endfunction

  function automatic real mean_delay(input int l);
    real sum;
    sum = 0.0;
    foreach (delays[l][k]) sum += real'(delays[l][k]);
    return (delays[l].size() == 0) ? 0.0 : sum / real'(delays[l].size());
  endfunction
endpackage
