// tb_qnoc_output_port: self-checking test of a router output port.
//
// The testbench plays the five input ports (random packets of all levels,
// with random gaps between flits, as when an upstream buffer runs dry), the
// crossbar (it returns the granted head flit) and the next router (a
// buffer of DEPTH flits per level that drains at random and returns one
// credit per drained flit). Each cycle it checks, from its own view of
// the link:
//  * the flit on the link is the one granted in the cycle before,
//  * a grant is made exactly when some level has a flit and a free slot
//    downstream, and it goes to the highest such level,
//  * a level part-way through a packet is served only from the input that
//    sends that packet (no interleaving of two packets of a level),
//  * a new packet of a level comes from the first requesting input after
//    the one that sent the level's previous packet (round robin),
//  * the next router's buffer never holds more than DEPTH flits.
// Preemptions and credit stalls are counted; each must occur.
module tb_qnoc_output_port;
  import qnoc_pkg::*;

  localparam int DEPTH = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  logic  [NUM_SL-1:0] req [NUM_PORTS];
  credit_t            credit_in;
  logic               grant_valid;
  logic  [PORT_W-1:0] grant_in;
  sl_e                grant_sl;
  flit_t              sel_flit;
  link_t              link_out;

  qnoc_output_port #(.DEPTH(DEPTH)) dut (.*);

  flit_t pq    [NUM_PORTS][NUM_SL][$];
  bit    gap   [NUM_PORTS][NUM_SL];
  int    occ   [NUM_SL];       // flits in the next router's buffer
  int    outst [NUM_SL];       // flits sent and not yet credited
  bit    mid   [NUM_SL];
  int    owner [NUM_SL];
  int    ptr   [NUM_SL];
  link_t exp_link;
  int    n_preempt = 0, n_stall = 0, n_rr = 0, n_sent = 0;
  logic [NUM_SL-1:0] drain_mask;

  task automatic new_packet(input int i, input int s);
    int len;
    len = $urandom_range(1, 6);
    for (int k = 0; k < len; k++) begin
      flit_t f;
      f.data = {4'(i), 2'(s), 10'($urandom)};
      f.ftype = (k != len-1) ? FT_BDY : (len == 1 ? FT_FP : FT_EP);
      pq[i][s].push_back(f);
    end
  endtask

  initial begin
    credit_in = CREDIT_NONE;
    drain_mask = '0;
    exp_link = LINK_IDLE;
    for (int s = 0; s < NUM_SL; s++) begin
      occ[s] = 0; outst[s] = 0; mid[s] = 0; owner[s] = 0; ptr[s] = 0;
    end
    for (int i = 0; i < NUM_PORTS; i++) begin
      req[i] = '0;
      for (int s = 0; s < NUM_SL; s++) gap[i][s] = 0;
    end
    sel_flit = '{ftype: FT_IDLE, data: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit elig [NUM_SL];
      bit cred_ok [NUM_SL];
      bit any;
      logic g_valid;
      logic [PORT_W-1:0] g_in;
      sl_e g_sl;
      int best;
      @(negedge clk);
      // Link output from the previous cycle's grant.
      if (cyc > 0) begin
        checks++;
        if (link_out.ftype != exp_link.ftype ||
            (exp_link.ftype != FT_IDLE && link_out != exp_link)) begin
          failures++;
          $display("FAIL cyc %0d: link %h expected %h", cyc, link_out, exp_link);
        end
      end
      // Traffic: new packets; random gaps inside packets.
      for (int i = 0; i < NUM_PORTS; i++)
        for (int s = 0; s < NUM_SL; s++) begin
          if (pq[i][s].size() == 0 && $urandom_range(0, 999) < (s == 0 ? 15 : 40))
            new_packet(i, s);
          gap[i][s] = ($urandom_range(0, 99) < 15);
          req[i][s] = (pq[i][s].size() != 0) && !gap[i][s];
        end
      // Next router: drain at random, credit during this cycle.
      drain_mask = '0;
      for (int s = 0; s < NUM_SL; s++)
        if (occ[s] > 0 && $urandom_range(0, 99) < ((cyc / 2000) % 2 == 0 ? 70 : 20)) begin
          drain_mask[s] = 1'b1;
          occ[s]--;
        end
      credit_in = '{valid: drain_mask != '0, sl_mask: drain_mask};
      #1;
      // Expected decision.
      any = 0;
      best = 0;
      for (int s = NUM_SL-1; s >= 0; s--) begin
        bit has;
        has = 0;
        if (mid[s]) has = req[owner[s]][s];
        else for (int i = 0; i < NUM_PORTS; i++) has |= req[i][s];
        cred_ok[s] = (outst[s] < DEPTH) || drain_mask[s];
        elig[s] = has && cred_ok[s];
        if (has && !cred_ok[s]) n_stall++;
        if (elig[s]) begin any = 1; best = s; end
      end
      checks++;
      if (grant_valid != any || (any && int'(grant_sl) != best)) begin
        failures++;
        $display("FAIL cyc %0d: grant %0d sl %0d, expected %0d sl %0d", cyc, grant_valid, grant_sl, any, best);
      end
      if (grant_valid && any && int'(grant_sl) == best) begin
        int exp_in;
        if (mid[best]) exp_in = owner[best];
        else begin
          exp_in = -1;
          for (int k = 0; k < NUM_PORTS; k++) begin
            int i;
            i = (ptr[best] + k) % NUM_PORTS;
            if (exp_in < 0 && req[i][best]) exp_in = i;
          end
          if (exp_in != ptr[best]) n_rr++;
        end
        checks++;
        if (int'(grant_in) != exp_in) begin
          failures++;
          $display("FAIL cyc %0d: sl %0d served input %0d, expected %0d", cyc, best, grant_in, exp_in);
        end
        for (int s = best + 1; s < NUM_SL; s++) if (mid[s]) begin n_preempt++; break; end
      end
      // Crossbar.
      if (grant_valid && pq[grant_in][grant_sl].size() != 0)
        sel_flit = pq[grant_in][grant_sl][0];
      else
        sel_flit = '{ftype: FT_IDLE, data: '0};
      #1;
      g_valid = grant_valid;
      g_in = grant_in;
      g_sl = grant_sl;
      @(posedge clk);
      #1;
      // Bookkeeping of the cycle's transfer.
      for (int s = 0; s < NUM_SL; s++) if (drain_mask[s]) outst[s]--;
      if (g_valid) begin
        flit_t f;
        int i, s;
        i = g_in;
        s = g_sl;
        f = pq[i][s].pop_front();
        exp_link = '{ftype: f.ftype, sl: sl_e'(s), data: f.data};
        outst[s]++;
        occ[s]++;
        n_sent++;
        checks++;
        if (occ[s] > DEPTH) begin
          failures++;
          $display("FAIL cyc %0d: next buffer of level %0d overflows", cyc, s);
        end
        if (is_tail(f.ftype)) begin mid[s] = 0; ptr[s] = (i + 1) % NUM_PORTS; end
        else begin mid[s] = 1; owner[s] = i; end
      end else begin
        exp_link.ftype = FT_IDLE;
      end
    end
    $display("sent %0d flits, %0d preemptions, %0d credit stalls, %0d round-robin skips",
             n_sent, n_preempt, n_stall, n_rr);
    checks++;
    if (n_preempt == 0 || n_stall == 0 || n_rr == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
