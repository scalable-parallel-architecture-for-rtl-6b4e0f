// dsp_voltage_proc: Voltage Processor of the dendrite segment processor.
//
// Computes the passive compartment update of the forward Euler scheme
//   v0_new = A_d * (v_m1 + v_p1) + (B_d * v0 + C_d)
// with two floating point adders and two multipliers arranged as in the
// DSP core diagram: one branch adds the neighbours and scales by A_d, the
// other scales the node by B_d and adds C_d, and a third adder joins them.
// The injection adder that follows in the diagram is the separate
// dsp_inj_ctrl block. One node enters per clock; the result leaves
// LAT = 2*ADD_LAT + MUL_LAT clocks later. The coefficients travel with each
// node so that segments with different coefficients can follow back to back.
// TAG is side information (the node's injection flag) carried along.
module dsp_voltage_proc #(
  parameter int ADD_LAT = 11,
  parameter int MUL_LAT = 11,
  parameter int TAG_W   = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [63:0]      v_m1,     // V^-1, previous node
  input  logic [63:0]      v_0,      // V^0, node being updated
  input  logic [63:0]      v_p1,     // V^1, next node
  input  logic [63:0]      a_d,
  input  logic [63:0]      b_d,
  input  logic [63:0]      c_d,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [63:0]      v_new,
  output logic [TAG_W-1:0] out_tag
);
  localparam int LAT = 2 * ADD_LAT + MUL_LAT;

  logic [63:0] nsum, bv, a_d_q, c_d_q, a_term, bc_term;
  logic        nsum_v, bv_v, a_v, bc_v, unused_v;

  // branch 1: (V^-1 + V^1) then x A_d
  fp_add #(.LAT(ADD_LAT)) u_add_nb (.clk, .rst_n, .in_valid, .a(v_m1), .b(v_p1),
                                    .out_valid(nsum_v), .y(nsum));
  delay_line #(.W(64), .DEPTH(ADD_LAT)) u_dly_a (.clk, .d(a_d), .q(a_d_q));
  fp_mul #(.LAT(MUL_LAT)) u_mul_a (.clk, .rst_n, .in_valid(nsum_v), .a(nsum), .b(a_d_q),
                                   .out_valid(a_v), .y(a_term));

  // branch 2: V^0 x B_d then + C_d
  fp_mul #(.LAT(MUL_LAT)) u_mul_b (.clk, .rst_n, .in_valid, .a(v_0), .b(b_d),
                                   .out_valid(bv_v), .y(bv));
  delay_line #(.W(64), .DEPTH(MUL_LAT)) u_dly_c (.clk, .d(c_d), .q(c_d_q));
  fp_add #(.LAT(ADD_LAT)) u_add_c (.clk, .rst_n, .in_valid(bv_v), .a(bv), .b(c_d_q),
                                   .out_valid(bc_v), .y(bc_term));

  // join
  fp_add #(.LAT(ADD_LAT)) u_add_j (.clk, .rst_n, .in_valid(a_v), .a(a_term), .b(bc_term),
                                   .out_valid(out_valid), .y(v_new));
  assign unused_v = bc_v;

  delay_line #(.W(TAG_W), .DEPTH(LAT)) u_dly_tag (.clk, .d(in_tag), .q(out_tag));
endmodule
