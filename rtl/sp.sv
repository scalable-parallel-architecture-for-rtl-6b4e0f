// sp: Soma Processor.
//
// Serves the requests of the dendrite segment processors for somas: a request
// carries the soma's CNI (somas occupy the lowest CNIs) and the voltage of the
// dendritic compartment attached to the soma. The soma voltage processor
// (svp) computes the new soma voltage from it and from the soma's K and Na
// conductances; the new voltage goes to the output buffer as the response and
// to the soma conductance processor (scp), which updates the gate
// probabilities and writes the new G_K and G_Na into the K and Na conductance
// memories for the next step. The two sub-processors work in a pipeline: one
// request per clock, the voltage of step k+1 computed while the conductances
// of other somas are still being updated.
//
// The SP monitor counts +1 per request and -1 per conductance write-back, so
// idle is high only when both sub-processors have finished and the output
// buffer is empty. Response latency: 3*ADD_LAT + 2*MUL_LAT clocks; the
// conductances of that soma are written 1 + ADD_LAT + 4*MUL_LAT clocks later.
// A soma must not be requested again before its conductances are written,
// which holds when every soma is requested once per simulation step.
module sp
  import nsim_pkg::*;
#(
  parameter int N_SOMA    = 4096,
  parameter int OUT_DEPTH = 64,
  parameter int ADD_LAT   = 11,
  parameter int MUL_LAT   = 11,
  localparam int AW = $clog2(N_SOMA)
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        cfg_we,
  input  sp_cfg_e     cfg_sel,
  input  gate_e       cfg_gate,
  input  logic [15:0] cfg_addr,
  input  fp64_t       cfg_data,
  // requests from the communication media
  input  logic        req_valid,
  input  msg_t        req,
  // responses (output buffer)
  output logic        out_empty,
  output msg_t        out_data,
  input  logic        out_pop,
  output logic        idle
);
  // K and Na conductance memories
  fp64_t gk_m  [N_SOMA];
  fp64_t gna_m [N_SOMA];

  logic [AW-1:0] g_addr;
  logic          v_valid;
  logic [31:0]   v_cni;
  fp64_t         v_new;

  svp #(.N_SOMA(N_SOMA), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_svp (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_addr(cfg_addr[AW-1:0]), .cfg_data,
    .req_valid, .req_cni(req.cni), .req_v1(req.volt),
    .g_addr, .g_k(gk_m[g_addr]), .g_na(gna_m[g_addr]),
    .out_valid(v_valid), .out_cni(v_cni), .out_v0(v_new));

  logic          c_valid;
  logic [AW-1:0] c_idx;
  fp64_t         c_gk, c_gna;
  scp #(.N_SOMA(N_SOMA), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_scp (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_gate, .cfg_addr, .cfg_data,
    .in_valid(v_valid), .in_idx(v_cni[AW-1:0]), .in_v0(v_new),
    .out_valid(c_valid), .out_idx(c_idx), .g_k(c_gk), .g_na(c_gna));

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_sel == SP_GK)  gk_m[cfg_addr[AW-1:0]] <= cfg_data;
    else if (c_valid)                gk_m[c_idx] <= c_gk;
    if (cfg_we && cfg_sel == SP_GNA) gna_m[cfg_addr[AW-1:0]] <= cfg_data;
    else if (c_valid)                gna_m[c_idx] <= c_gna;
  end

  // output buffer
  msg_t rsp_w;
  assign rsp_w = '{cni: v_cni, status: ST_OPEN, volt: v_new};
  logic ob_full;
  logic [$clog2(OUT_DEPTH+1)-1:0] ob_count;
  sync_fifo #(.W(MSG_W), .DEPTH(OUT_DEPTH)) u_out_buf (
    .clk, .rst_n, .push(v_valid), .wdata(rsp_w), .pop(out_pop), .rdata(out_data),
    .empty(out_empty), .full(ob_full), .count(ob_count));

  // SP monitor
  logic [15:0] mon_count;
  idle_monitor #(.CW(16), .INC(1), .DEC(1)) u_mon (
    .clk, .rst_n, .inc(req_valid), .dec(c_valid), .out_empty, .idle, .count(mon_count));
endmodule
