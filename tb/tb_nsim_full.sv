// tb_nsim_full: the base unit with every parameter at its default (three
// DSPs with 8K-row FIFOs, 2048 common nodes, 4096 somas, 2048-entry gate
// tables) running 48 seven-segment neurons of 8 to 12 (on average 10) compartments per segment
// (336 segments, 144 common nodes, 48 somas) for 3 simulation steps. The
// bench itself is described in nsim_bench.
module tb_nsim_full;
  nsim_bench #(.FULL(1'b1), .NCELL(48), .NMIN(8), .NMAX(12), .STEPS(3)) u_bench ();
endmodule
