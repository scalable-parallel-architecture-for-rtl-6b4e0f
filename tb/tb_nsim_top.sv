// tb_nsim_top: end-to-end test of the base unit at reduced sizes (512-row
// DSP FIFOs, 64 common nodes, 16 somas) with 12 seven-segment neurons of 2
// to 6 compartments per segment, run for 6 simulation steps. The bench
// itself is described in nsim_bench.
module tb_nsim_top;
  nsim_bench #(.FULL(1'b0), .NCELL(12), .NMIN(2), .NMAX(6), .STEPS(6)) u_bench ();
endmodule
