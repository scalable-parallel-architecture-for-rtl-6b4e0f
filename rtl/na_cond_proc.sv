// na_cond_proc: Sodium conductance processor of the soma conductance
// processor.
//
// Updates the m- and h-gate probabilities of a soma by the recursions
// m(k+1) = A_m + B_m m(k) and h(k+1) = A_h + B_h h(k), with the four
// coefficients read from 2048 entry lookup tables at the quantised voltage
// lut_addr, writes both back to the per-soma gate memories and forms
// G_Na = gbar_Na * m^3 h as (m*m) * (m*h) times gbar_Na, the multiplier
// arrangement of the sodium processor diagram. Latency ADD_LAT + 4*MUL_LAT
// clocks (the same as the potassium processor), one soma per clock.
module na_cond_proc
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
  output fp64_t             g_na
);
  localparam int LAT = ADD_LAT + 4 * MUL_LAT;

  fp64_t lut_am [2**LUT_AW];
  fp64_t lut_bm [2**LUT_AW];
  fp64_t lut_ah [2**LUT_AW];
  fp64_t lut_bh [2**LUT_AW];
  fp64_t m_m    [N_SOMA];
  fp64_t h_m    [N_SOMA];
  fp64_t gbar;

  fp64_t bm, bh, am_q, ah_q, m1, h1, m2, mh, m3h;
  logic  bm_v, bh_v, m1_v, h1_v, m2_v, mh_v, m3h_v;
  logic [AW-1:0] idx_1;

  fp_mul #(.LAT(MUL_LAT)) u_mbm (.clk, .rst_n, .in_valid, .a(lut_bm[lut_addr]), .b(m_m[in_idx]),
                                 .out_valid(bm_v), .y(bm));
  fp_mul #(.LAT(MUL_LAT)) u_mbh (.clk, .rst_n, .in_valid, .a(lut_bh[lut_addr]), .b(h_m[in_idx]),
                                 .out_valid(bh_v), .y(bh));
  delay_line #(.W(128), .DEPTH(MUL_LAT)) u_d_a (.clk, .d({lut_am[lut_addr], lut_ah[lut_addr]}),
                                                .q({am_q, ah_q}));
  fp_add #(.LAT(ADD_LAT)) u_am (.clk, .rst_n, .in_valid(bm_v), .a(bm), .b(am_q),
                                .out_valid(m1_v), .y(m1));
  fp_add #(.LAT(ADD_LAT)) u_ah (.clk, .rst_n, .in_valid(bh_v), .a(bh), .b(ah_q),
                                .out_valid(h1_v), .y(h1));
  delay_line #(.W(AW), .DEPTH(MUL_LAT + ADD_LAT)) u_d_i1 (.clk, .d(in_idx), .q(idx_1));

  fp_mul #(.LAT(MUL_LAT)) u_m2  (.clk, .rst_n, .in_valid(m1_v), .a(m1), .b(m1),
                                 .out_valid(m2_v), .y(m2));
  fp_mul #(.LAT(MUL_LAT)) u_mh  (.clk, .rst_n, .in_valid(m1_v), .a(m1), .b(h1),
                                 .out_valid(mh_v), .y(mh));
  fp_mul #(.LAT(MUL_LAT)) u_m3h (.clk, .rst_n, .in_valid(m2_v), .a(m2), .b(mh),
                                 .out_valid(m3h_v), .y(m3h));
  fp_mul #(.LAT(MUL_LAT)) u_g   (.clk, .rst_n, .in_valid(m3h_v), .a(m3h), .b(gbar),
                                 .out_valid(out_valid), .y(g_na));
  delay_line #(.W(AW), .DEPTH(LAT)) u_d_i2 (.clk, .d(in_idx), .q(out_idx));

  logic unused;
  assign unused = ^{bh_v, h1_v, mh_v};

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_sel == SP_LUT_A && cfg_gate == GATE_M) lut_am[cfg_addr[LUT_AW-1:0]] <= cfg_data;
    if (cfg_we && cfg_sel == SP_LUT_B && cfg_gate == GATE_M) lut_bm[cfg_addr[LUT_AW-1:0]] <= cfg_data;
    if (cfg_we && cfg_sel == SP_LUT_A && cfg_gate == GATE_H) lut_ah[cfg_addr[LUT_AW-1:0]] <= cfg_data;
    if (cfg_we && cfg_sel == SP_LUT_B && cfg_gate == GATE_H) lut_bh[cfg_addr[LUT_AW-1:0]] <= cfg_data;
    if (cfg_we && cfg_sel == SP_GBAR_NA) gbar <= cfg_data;
    if (cfg_we && cfg_sel == SP_M)       m_m[cfg_addr[AW-1:0]] <= cfg_data;
    else if (m1_v)                       m_m[idx_1] <= m1;
    if (cfg_we && cfg_sel == SP_H)       h_m[cfg_addr[AW-1:0]] <= cfg_data;
    else if (h1_v)                       h_m[idx_1] <= h1;
  end
endmodule
