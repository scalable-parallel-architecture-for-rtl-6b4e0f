// svp: Soma Voltage Processor.
//
// Computes the Hodgkin-Huxley soma update of the forward Euler scheme
//   V0(k+1) = (A_s + B_s (G_Na + G_K)) V0 + C_s G_Na + D_s G_K + E_s V1 + F_s
// where V1 is the voltage of the dendritic compartment attached to the soma
// (it arrives with the request) and G_K, G_Na are the soma's conductances
// read from the conductance memories at the request's address. The datapath
// follows the soma voltage processor diagram: six adders, five multipliers
// and one delay line:
//   E_s*V1 + F_s ;  D_s*G_K + C_s*G_Na ;  ((G_K + G_Na)*B_s + A_s) * V0
// the first two are added, delayed to meet the third, and added to it.
// Per-soma coefficients A_s..F_s and the soma voltage V0 live in memories
// addressed by the soma number (low bits of the CNI); the new voltage is
// written back to V0 and leaves on out_* LAT = 3*ADD_LAT + 2*MUL_LAT clocks
// after the request. One request per clock.
module svp
  import nsim_pkg::*;
#(
  parameter int N_SOMA  = 4096,
  parameter int ADD_LAT = 11,
  parameter int MUL_LAT = 11,
  localparam int AW = $clog2(N_SOMA)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration of coefficients and initial voltage
  input  logic          cfg_we,
  input  sp_cfg_e       cfg_sel,
  input  logic [AW-1:0] cfg_addr,
  input  fp64_t         cfg_data,
  // request
  input  logic          req_valid,
  input  logic [31:0]   req_cni,
  input  fp64_t         req_v1,
  // conductances of the requested soma (read combinationally)
  output logic [AW-1:0] g_addr,
  input  fp64_t         g_k,
  input  fp64_t         g_na,
  // result
  output logic          out_valid,
  output logic [31:0]   out_cni,
  output fp64_t         out_v0
);
  localparam int LAT = 3 * ADD_LAT + 2 * MUL_LAT;

  fp64_t as_m [N_SOMA];
  fp64_t bs_m [N_SOMA];
  fp64_t cs_m [N_SOMA];
  fp64_t ds_m [N_SOMA];
  fp64_t es_m [N_SOMA];
  fp64_t fs_m [N_SOMA];
  fp64_t v0_m [N_SOMA];

  logic [AW-1:0] idx;
  assign idx    = req_cni[AW-1:0];
  assign g_addr = idx;

  // E_s*V1 + F_s
  fp64_t m1, fs_q, a1;
  logic  m1_v, a1_v;
  fp_mul #(.LAT(MUL_LAT)) u_m1 (.clk, .rst_n, .in_valid(req_valid), .a(es_m[idx]), .b(req_v1),
                                .out_valid(m1_v), .y(m1));
  delay_line #(.W(64), .DEPTH(MUL_LAT)) u_d_fs (.clk, .d(fs_m[idx]), .q(fs_q));
  fp_add #(.LAT(ADD_LAT)) u_a1 (.clk, .rst_n, .in_valid(m1_v), .a(m1), .b(fs_q),
                                .out_valid(a1_v), .y(a1));

  // D_s*G_K + C_s*G_Na
  fp64_t m2, m3, a2;
  logic  m2_v, m3_v, a2_v;
  fp_mul #(.LAT(MUL_LAT)) u_m2 (.clk, .rst_n, .in_valid(req_valid), .a(ds_m[idx]), .b(g_k),
                                .out_valid(m2_v), .y(m2));
  fp_mul #(.LAT(MUL_LAT)) u_m3 (.clk, .rst_n, .in_valid(req_valid), .a(cs_m[idx]), .b(g_na),
                                .out_valid(m3_v), .y(m3));
  fp_add #(.LAT(ADD_LAT)) u_a2 (.clk, .rst_n, .in_valid(m2_v), .a(m2), .b(m3),
                                .out_valid(a2_v), .y(a2));

  // sum of the two, then the delay line
  fp64_t a5, a5_q;
  logic  a5_v;
  fp_add #(.LAT(ADD_LAT)) u_a5 (.clk, .rst_n, .in_valid(a1_v), .a(a1), .b(a2),
                                .out_valid(a5_v), .y(a5));
  delay_line #(.W(64), .DEPTH(MUL_LAT)) u_d_a5 (.clk, .d(a5), .q(a5_q));

  // ((G_K + G_Na) * B_s + A_s) * V0
  fp64_t a3, bs_q, m4, as_q, a4, v0_q, m5;
  logic  a3_v, m4_v, a4_v, m5_v;
  fp_add #(.LAT(ADD_LAT)) u_a3 (.clk, .rst_n, .in_valid(req_valid), .a(g_k), .b(g_na),
                                .out_valid(a3_v), .y(a3));
  delay_line #(.W(64), .DEPTH(ADD_LAT)) u_d_bs (.clk, .d(bs_m[idx]), .q(bs_q));
  fp_mul #(.LAT(MUL_LAT)) u_m4 (.clk, .rst_n, .in_valid(a3_v), .a(a3), .b(bs_q),
                                .out_valid(m4_v), .y(m4));
  delay_line #(.W(64), .DEPTH(ADD_LAT + MUL_LAT)) u_d_as (.clk, .d(as_m[idx]), .q(as_q));
  fp_add #(.LAT(ADD_LAT)) u_a4 (.clk, .rst_n, .in_valid(m4_v), .a(m4), .b(as_q),
                                .out_valid(a4_v), .y(a4));
  delay_line #(.W(64), .DEPTH(2 * ADD_LAT + MUL_LAT)) u_d_v0 (.clk, .d(v0_m[idx]), .q(v0_q));
  fp_mul #(.LAT(MUL_LAT)) u_m5 (.clk, .rst_n, .in_valid(a4_v), .a(a4), .b(v0_q),
                                .out_valid(m5_v), .y(m5));

  fp_add #(.LAT(ADD_LAT)) u_a6 (.clk, .rst_n, .in_valid(m5_v), .a(a5_q), .b(m5),
                                .out_valid(out_valid), .y(out_v0));
  delay_line #(.W(32), .DEPTH(LAT)) u_d_cni (.clk, .d(req_cni), .q(out_cni));

  logic unused;
  assign unused = ^{m3_v, a2_v, a5_v};

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      unique case (cfg_sel)
        SP_AS: as_m[cfg_addr] <= cfg_data;
        SP_BS: bs_m[cfg_addr] <= cfg_data;
        SP_CS: cs_m[cfg_addr] <= cfg_data;
        SP_DS: ds_m[cfg_addr] <= cfg_data;
        SP_ES: es_m[cfg_addr] <= cfg_data;
        SP_FS: fs_m[cfg_addr] <= cfg_data;
        default: ;
      endcase
    end
    if (cfg_we && cfg_sel == SP_V0) v0_m[cfg_addr] <= cfg_data;
    else if (out_valid)             v0_m[out_cni[AW-1:0]] <= out_v0;
  end
endmodule
