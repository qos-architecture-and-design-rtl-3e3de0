// tb_qnoc_input_port: self-checking test of a router input port.
//
// The port sits at row 1, column 1 of a 4x4 mesh. A sender drives random
// packets of all four service levels on the link, interleaved flit by flit
// across levels, and obeys credit flow control with its own count of free
// slots per level (starting at the buffer depth, refilled from credit_out).
// Body flits carry random data, so a body flit routed on its own data would
// usually pick a wrong port. A consumer pops random heads. Checked:
//  * each level's head flit follows the order sent,
//  * every flit of a packet requests the port its first flit's TRA
//    selects (the routing-table entry holds across the packet),
//  * the credit mask in each cycle equals the pops of the cycle before,
//  * the credits returned equal the flits taken, per level.
module tb_qnoc_input_port;
  import qnoc_pkg::*;

  localparam int DEPTH = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  link_t              link_in;
  credit_t            credit_out;
  logic  [NUM_SL-1:0] pop;
  logic  [NUM_SL-1:0] head_valid;
  flit_t              head_flit [NUM_SL];
  port_e              req_port  [NUM_SL];

  qnoc_input_port #(.MY_ROW(1), .MY_COL(1), .DEPTH(DEPTH)) dut (.*);

  function automatic port_e exp_port(input int tr, input int tc);
    if (tc > 1) return P_EAST;
    if (tr < 1) return P_NORTH;
    if (tr > 1) return P_SOUTH;
    if (tc < 1) return P_WEST;
    return P_LOCAL;
  endfunction

  // Sender state per level: flits left in the current packet, its port.
  int     left  [NUM_SL];
  port_e  pport [NUM_SL];
  int     cred  [NUM_SL];
  flit_t  exp_f [NUM_SL][$];
  port_e  exp_p [NUM_SL][$];
  int     popped [NUM_SL];
  int     credited [NUM_SL];
  logic [NUM_SL-1:0] pop_d;
  int     ports_seen [NUM_PORTS];
  int     crt_holds = 0;

  initial begin
    link_in = LINK_IDLE;
    pop = '0;
    pop_d = '0;
    for (int s = 0; s < NUM_SL; s++) begin
      left[s] = 0; cred[s] = DEPTH; popped[s] = 0; credited[s] = 0; pport[s] = P_LOCAL;
    end
    for (int p = 0; p < NUM_PORTS; p++) ports_seen[p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      // Check the outputs of this cycle.
      for (int s = 0; s < NUM_SL; s++) begin
        checks++;
        if (head_valid[s] != (exp_f[s].size() != 0)) begin
          failures++;
          $display("FAIL cyc %0d sl %0d: head_valid %0d, %0d expected", cyc, s, head_valid[s], exp_f[s].size());
        end else if (head_valid[s]) begin
          checks++;
          if (head_flit[s] != exp_f[s][0] || req_port[s] != exp_p[s][0]) begin
            failures++;
            $display("FAIL cyc %0d sl %0d: head %h port %0d, expected %h port %0d",
                     cyc, s, head_flit[s], req_port[s], exp_f[s][0], exp_p[s][0]);
          end
        end
      end
      checks++;
      if (credit_out.valid != (pop_d != '0) || (credit_out.valid && credit_out.sl_mask != pop_d)) begin
        failures++;
        $display("FAIL cyc %0d: credit %b/%b after pops %b", cyc, credit_out.valid, credit_out.sl_mask, pop_d);
      end
      // Sender gets its credits back.
      if (credit_out.valid)
        for (int s = 0; s < NUM_SL; s++)
          if (credit_out.sl_mask[s]) begin cred[s]++; credited[s]++; end
      // Consumer.
      for (int s = 0; s < NUM_SL; s++)
        pop[s] = head_valid[s] && ($urandom_range(0, 99) < 45);
      // Sender: one flit of a random level that has a credit.
      link_in = '{ftype: FT_IDLE, sl: link_in.sl, data: link_in.data};
      if ($urandom_range(0, 99) < 80) begin
        int s;
        s = $urandom_range(0, NUM_SL-1);
        if (cred[s] > 0) begin
          flit_t f;
          bit first;
          first = (left[s] == 0);
          if (first) begin
            int tr, tc, len;
            tr = $urandom_range(0, 3);
            tc = $urandom_range(0, 3);
            len = $urandom_range(1, 5);
            pport[s] = exp_port(tr, tc);
            ports_seen[pport[s]]++;
            f.data = {2'(tr), 2'(tc), 12'($urandom)};
            left[s] = len;
          end else begin
            f.data = 16'($urandom);
            crt_holds++;
          end
          left[s]--;
          f.ftype = (left[s] != 0) ? FT_BDY : (first ? FT_FP : FT_EP);
          link_in = '{ftype: f.ftype, sl: sl_e'(s), data: f.data};
          cred[s]--;
          exp_f[s].push_back(f);
          exp_p[s].push_back(pport[s]);
        end
      end
      @(posedge clk);
      #1;
      pop_d = pop;
      for (int s = 0; s < NUM_SL; s++)
        if (pop[s]) begin
          void'(exp_f[s].pop_front());
          void'(exp_p[s].pop_front());
          popped[s]++;
        end
    end
    @(negedge clk);
    link_in = LINK_IDLE;
    pop = '0;
    repeat (3) @(posedge clk);
    #1;
    for (int s = 0; s < NUM_SL; s++) begin
      checks++;
      if (credited[s] + (pop_d[s] ? 1 : 0) < popped[s] - 1 || credited[s] > popped[s]) begin
        failures++;
        $display("FAIL: level %0d took %0d flits and returned %0d credits", s, popped[s], credited[s]);
      end
    end
    for (int p = 0; p < NUM_PORTS; p++) begin
      checks++;
      if (ports_seen[p] == 0) begin
        failures++;
        $display("FAIL: no packet routed to port %0d", p);
      end
    end
    checks++;
    if (crt_holds == 0) begin failures++; $display("FAIL: no body flits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
