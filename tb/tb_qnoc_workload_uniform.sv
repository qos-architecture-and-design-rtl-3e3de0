// tb_qnoc_workload_uniform: uniform benchmark traffic on the 4x4 network
// (every module sends to every other module with equal probability).
module tb_qnoc_workload_uniform;
  tb_qnoc_workload_core #(.MODE(0)) u_run ();

  initial begin
    wait (u_run.done);
    $finish;
  end
endmodule
