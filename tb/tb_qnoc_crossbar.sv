// tb_qnoc_crossbar: self-checking test of the router crossbar.
//
// Each trial gives every (input, service level) source a random head flit
// and lets each output grant a distinct random source (or nothing). The
// test checks that each output receives exactly the granted head flit, that
// an output without a grant gets an idle flit, and that the pop mask of each
// input has a bit for exactly the levels granted by some output.
module tb_qnoc_crossbar;
  import qnoc_pkg::*;

  int checks = 0;
  int failures = 0;

  flit_t              head_flit   [NUM_PORTS][NUM_SL];
  logic               grant_valid [NUM_PORTS];
  logic  [PORT_W-1:0] grant_in    [NUM_PORTS];
  sl_e                grant_sl    [NUM_PORTS];
  flit_t              out_flit    [NUM_PORTS];
  logic  [NUM_SL-1:0] pop         [NUM_PORTS];

  qnoc_crossbar dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      bit used [NUM_PORTS][NUM_SL];
      logic [NUM_SL-1:0] exp_pop [NUM_PORTS];
      for (int i = 0; i < NUM_PORTS; i++) begin
        exp_pop[i] = '0;
        for (int s = 0; s < NUM_SL; s++) begin
          used[i][s] = 0;
          head_flit[i][s] = '{ftype: flit_type_e'($urandom_range(1, 3)), data: 16'($urandom)};
        end
      end
      for (int o = 0; o < NUM_PORTS; o++) begin
        int i, s;
        grant_valid[o] = 1'b0;
        grant_in[o] = PORT_W'($urandom_range(0, NUM_PORTS-1));
        grant_sl[o] = sl_e'($urandom_range(0, NUM_SL-1));
        i = $urandom_range(0, NUM_PORTS-1);
        s = $urandom_range(0, NUM_SL-1);
        if ($urandom_range(0, 99) < 80 && !used[i][s]) begin
          used[i][s] = 1;
          grant_valid[o] = 1'b1;
          grant_in[o] = PORT_W'(i);
          grant_sl[o] = sl_e'(s);
          exp_pop[i][s] = 1'b1;
        end
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        checks++;
        if (grant_valid[o]) begin
          if (out_flit[o] != head_flit[grant_in[o]][grant_sl[o]]) begin
            failures++;
            $display("FAIL t%0d: output %0d got %h", t, o, out_flit[o]);
          end
        end else if (out_flit[o].ftype != FT_IDLE) begin
          failures++;
          $display("FAIL t%0d: output %0d without grant is not idle", t, o);
        end
      end
      for (int i = 0; i < NUM_PORTS; i++) begin
        checks++;
        if (pop[i] != exp_pop[i]) begin
          failures++;
          $display("FAIL t%0d: pop[%0d]=%b expected %b", t, i, pop[i], exp_pop[i]);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
