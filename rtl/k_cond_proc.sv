// k_cond_proc: Potassium conductance processor of the soma conductance
// processor.
//
// For a soma whose new voltage has been quantised to the table address
// lut_addr, it updates the n-gate probability by the exponential-Euler
// recursion n(k+1) = A_n + B_n * n(k), with A_n and B_n read from two 2048
// entry lookup tables at that address, writes n(k+1) back to the per-soma
// gate memory, and forms G_K = gbar_K * n^4 as (n*n)*(n*n) times gbar_K.
// Tables, initial gate values and gbar_K are loaded through cfg_*. Latency
// from in_valid to out_valid: ADD_LAT + 4*MUL_LAT clocks, one soma per clock.
module k_cond_proc
  import nsim_pkg::*;
#(
  parameter int N_SOMA  = 4096,
  parameter int LUT_AW  = 11,
  parameter int ADD_LAT = 11,
  parameter int MUL_LAT = 11,
  localparam int AW = $clog2(N_SOMA)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  sp_cfg_e           cfg_sel,
  input  gate_e             cfg_gate,
  input  logic [15:0]       cfg_addr,
  input  fp64_t             cfg_data,
  input  logic              in_valid,
  input  logic [AW-1:0]     in_idx,
  input  logic [LUT_AW-1:0] lut_addr,
  output logic              out_valid,
  output logic [AW-1:0]     out_idx,
  output fp64_t             g_k
);
  localparam int LAT = ADD_LAT + 4 * MUL_LAT;

  fp64_t lut_a [2**LUT_AW];
  fp64_t lut_b [2**LUT_AW];
  fp64_t n_m   [N_SOMA];
  fp64_t gbar;

  fp64_t bn, a_q, n1, n2, n4;
  logic  bn_v, n1_v, n2_v, n4_v;
  logic [AW-1:0] idx_n1;

  fp_mul #(.LAT(MUL_LAT)) u_mb (.clk, .rst_n, .in_valid, .a(lut_b[lut_addr]), .b(n_m[in_idx]),
                                .out_valid(bn_v), .y(bn));
  delay_line #(.W(64), .DEPTH(MUL_LAT)) u_d_a (.clk, .d(lut_a[lut_addr]), .q(a_q));
  fp_add #(.LAT(ADD_LAT)) u_add (.clk, .rst_n, .in_valid(bn_v), .a(bn), .b(a_q),
                                 .out_valid(n1_v), .y(n1));
  delay_line #(.W(AW), .DEPTH(MUL_LAT + ADD_LAT)) u_d_i1 (.clk, .d(in_idx), .q(idx_n1));

  fp_mul #(.LAT(MUL_LAT)) u_sq1 (.clk, .rst_n, .in_valid(n1_v), .a(n1), .b(n1),
                                 .out_valid(n2_v), .y(n2));
  fp_mul #(.LAT(MUL_LAT)) u_sq2 (.clk, .rst_n, .in_valid(n2_v), .a(n2), .b(n2),
                                 .out_valid(n4_v), .y(n4));
  fp_mul #(.LAT(MUL_LAT)) u_g   (.clk, .rst_n, .in_valid(n4_v), .a(n4), .b(gbar),
                                 .out_valid(out_valid), .y(g_k));
  delay_line #(.W(AW), .DEPTH(LAT)) u_d_i2 (.clk, .d(in_idx), .q(out_idx));

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_sel == SP_LUT_A && cfg_gate == GATE_N) lut_a[cfg_addr[LUT_AW-1:0]] <= cfg_data;
    if (cfg_we && cfg_sel == SP_LUT_B && cfg_gate == GATE_N) lut_b[cfg_addr[LUT_AW-1:0]] <= cfg_data;
    if (cfg_we && cfg_sel == SP_GBAR_K) gbar <= cfg_data;
    if (cfg_we && cfg_sel == SP_N)      n_m[cfg_addr[AW-1:0]] <= cfg_data;
    else if (n1_v)                      n_m[idx_n1] <= n1;
  end
endmodule
