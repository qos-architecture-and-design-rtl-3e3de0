// tb_qnoc_sl_buffer: self-checking test of the service-level flit buffer.
//
// Random pushes and pops (push only while the buffer has room, as credit
// flow control guarantees) are compared against a queue model: head flit,
// head valid and occupancy are checked every cycle, including simultaneous
// push and pop on a full buffer. A default-depth (2) and a depth-4 buffer
// run side by side.
module tb_qnoc_sl_buffer;
  import qnoc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  always #5 clk = ~clk;

  localparam int NB = 2;
  localparam int DEPTHS [NB] = '{2, 4};

  logic  push [NB];
  logic  pop  [NB];
  flit_t din  [NB];
  logic  hv   [NB];
  flit_t hf   [NB];
  logic [2:0] cnt [NB];

  for (genvar b = 0; b < NB; b++) begin : g_b
    logic [$clog2(DEPTHS[b]+1)-1:0] c;
    qnoc_sl_buffer #(.DEPTH(DEPTHS[b])) dut (
      .clk, .rst_n, .push(push[b]), .push_flit(din[b]), .pop(pop[b]),
      .head_valid(hv[b]), .head_flit(hf[b]), .count(c));
    assign cnt[b] = 3'(c);
  end

  flit_t model [NB][$];
  int    full_both = 0;

  initial begin
    for (int b = 0; b < NB; b++) begin push[b] = 0; pop[b] = 0; din[b] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        // Compare outputs with the model.
        checks++;
        if (hv[b] != (model[b].size() != 0) || int'(cnt[b]) != model[b].size()) begin
          failures++;
          $display("FAIL b%0d cyc %0d: hv=%0d cnt=%0d model=%0d", b, cyc, hv[b], cnt[b], model[b].size());
        end
        if (model[b].size() != 0) begin
          checks++;
          if (hf[b] != model[b][0]) begin
            failures++;
            $display("FAIL b%0d cyc %0d: head %h expected %h", b, cyc, hf[b], model[b][0]);
          end
        end
        // New stimulus.
        pop[b]  = (model[b].size() != 0) && ($urandom_range(0, 99) < 50);
        push[b] = ((model[b].size() < DEPTHS[b]) || pop[b]) && ($urandom_range(0, 99) < 60);
        din[b]  = '{ftype: flit_type_e'($urandom_range(1, 3)), data: 16'($urandom)};
        if (push[b] && pop[b] && model[b].size() == DEPTHS[b]) full_both++;
      end
      @(posedge clk);
      #1;
      for (int b = 0; b < NB; b++) begin
        if (pop[b])  void'(model[b].pop_front());
        if (push[b]) model[b].push_back(din[b]);
      end
    end
    checks++;
    if (full_both == 0) begin
      failures++;
      $display("FAIL: push and pop on a full buffer never happened");
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
