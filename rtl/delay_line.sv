// delay_line: a W-bit shift register of DEPTH stages, used to keep operands
// and side information in step with the floating point pipelines. DEPTH 0
// passes the input straight through. No reset: callers carry a separately
// reset valid bit alongside.
module delay_line #(
  parameter int W     = 64,
  parameter int DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] r [DEPTH];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int i = 1; i < DEPTH; i++) r[i] <= r[i-1];
    end
    assign q = r[DEPTH-1];
  end
endmodule
