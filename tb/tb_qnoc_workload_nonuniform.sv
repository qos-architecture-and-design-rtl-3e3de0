// tb_qnoc_workload_nonuniform: non-uniform benchmark traffic on the 4x4
// network (a module sends to each direct neighbour with twice the
// probability of any other module).
module tb_qnoc_workload_nonuniform;
  tb_qnoc_workload_core #(.MODE(1)) u_run ();

  initial begin
    wait (u_run.done);
    $finish;
  end
endmodule
