// idle_monitor: the CNP Monitor / SP Monitor of the server processors.
//
// Counts outstanding work: the counter goes up by INC for each incoming
// request (inc) and down by DEC for each completed result (dec); both may
// happen in the same clock. idle is high when the counter is zero and the
// processor's output buffer is empty (out_empty), so the end of a simulation
// step is declared only when every answer has also been collected. For the
// common node processor INC=1, DEC=3 (three requests make one update); for
// the soma processor INC=DEC=1.
module idle_monitor #(
  parameter int CW  = 16,
  parameter int INC = 1,
  parameter int DEC = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic inc,
  input  logic dec,
  input  logic out_empty,
  output logic idle,
  output logic [CW-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + (inc ? CW'(INC) : '0) - (dec ? CW'(DEC) : '0);
  end
  assign idle = (count == '0) && out_empty;

  assert property (@(posedge clk) disable iff (!rst_n) !(dec && !inc && count < CW'(DEC)))
    else $error("idle_monitor: more results than requests");
endmodule
