// scp: Soma Conductance Processor.
//
// Takes each new soma voltage from the soma voltage processor, converts it in
// the floating-to-fixed point unit into the 11-bit lookup table address
// (8 integer and 3 fraction bits over -64 mV .. 192 mV, 0.125 mV steps), and
// hands the address to the potassium and sodium conductance processors,
// which run side by side. Their new G_K and G_Na come out together
// LAT = 1 + ADD_LAT + 4*MUL_LAT clocks after the voltage, with the soma
// address, to be written into the soma processor's conductance memories.
module scp
  import nsim_pkg::*;
#(
  parameter int N_SOMA  = 4096,
  parameter int ADD_LAT = 11,
  parameter int MUL_LAT = 11,
  localparam int AW = $clog2(N_SOMA)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  sp_cfg_e       cfg_sel,
  input  gate_e         cfg_gate,
  input  logic [15:0]   cfg_addr,
  input  fp64_t         cfg_data,
  input  logic          in_valid,
  input  logic [AW-1:0] in_idx,
  input  fp64_t         in_v0,
  output logic          out_valid,
  output logic [AW-1:0] out_idx,
  output fp64_t         g_k,
  output fp64_t         g_na
);
  logic [10:0]   vf;
  logic          vf_valid;
  logic [AW-1:0] vf_idx;

  fp_to_fix #(.FRAC_BITS(3), .ADDR_W(11), .V_MIN_MV(-64)) u_f2f (.clk, .v(in_v0), .addr(vf));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vf_valid <= 1'b0;
    else        vf_valid <= in_valid;
  end
  always_ff @(posedge clk) vf_idx <= in_idx;

  logic          na_valid;
  logic [AW-1:0] na_idx;
  k_cond_proc #(.N_SOMA(N_SOMA), .LUT_AW(11), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_k (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_gate, .cfg_addr, .cfg_data,
    .in_valid(vf_valid), .in_idx(vf_idx), .lut_addr(vf),
    .out_valid, .out_idx, .g_k);
  na_cond_proc #(.N_SOMA(N_SOMA), .LUT_AW(11), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_na (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_gate, .cfg_addr, .cfg_data,
    .in_valid(vf_valid), .in_idx(vf_idx), .lut_addr(vf),
    .out_valid(na_valid), .out_idx(na_idx), .g_na);

  // both conductance processors have the same depth
  assert property (@(posedge clk) disable iff (!rst_n) na_valid == out_valid && (!out_valid || na_idx == out_idx))
    else $error("scp: K and Na processors out of step");
endmodule
