// fp_mul: pipelined IEEE-754 double precision multiplier, a stand-in for the
// vendor floating point multiplier core. The product (round-to-nearest-even, see
// fp64_pkg for the treatment of subnormals) appears LAT clock cycles after the
// operands; a new operand pair is accepted every clock. in_valid travels with
// the data and comes out as out_valid. Reset clears only the valid pipeline.
module fp_mul #(
  parameter int LAT = 11    // clock cycles from operands to product, at least 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        out_valid,
  output logic [63:0] y
);
  import fp64_pkg::*;

  logic [63:0] pipe_d [LAT];
  logic        pipe_v [LAT];

  always_ff @(posedge clk) begin
    pipe_d[0] <= fp_mul_f(a, b);
    for (int i = 1; i < LAT; i++) pipe_d[i] <= pipe_d[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) pipe_v[i] <= 1'b0;
    end else begin
      pipe_v[0] <= in_valid;
      for (int i = 1; i < LAT; i++) pipe_v[i] <= pipe_v[i-1];
    end
  end

  assign y         = pipe_d[LAT-1];
  assign out_valid = pipe_v[LAT-1];
endmodule
