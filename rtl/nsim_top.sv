// nsim_top: base unit of the parallel neural simulator.
//
// A compartmental neuron model is split into three groups of similar
// entities, each handled by its own kind of processor, all working in
// parallel and talking through one switch:
//   - N_DSP dendrite segment processors (dsp) update dendritic compartments;
//   - one common node processor (cnp) updates the branching points;
//   - one soma processor (sp) updates the Hodgkin-Huxley somas;
//   - one common node switch (cns) carries requests (DSP -> CNP/SP) and
//     broadcasts responses (CNP/SP -> DSPs).
// A packet distributor loads Segment Definition Packets into the DSP FIFOs.
//
// Use: load SDPs through sdp_*, the DSPs' common node memories through
// cn_init_*, and the CNP and SP tables and states through cnp_cfg_* and
// sp_cfg_*. Pulse cycle_start for one simulation step. Each DSP walks its
// segments and sends the voltages next to common nodes and somas as requests;
// the CNP and SP answer with new voltages that land in the DSPs' common node
// memories. end_of_cycle (the AND of all DSP cycle_end, CNP idle, SP idle and
// switch idle) says the step is complete and the next cycle_start may follow.
// Updated compartment voltages appear on wb_valid/wb_row, responses on
// rsp_valid/rsp. The uplink of the switch (up_*) is brought out so that a
// unit can sit under a higher-level switch; tie up_in_valid low and leave
// up_out_pop low when the unit stands alone.
module nsim_top
  import nsim_pkg::*;
#(
  parameter int          N_DSP      = 3,
  parameter int          FIFO_DEPTH = 8192,
  parameter int          CN_NODES   = 2048,
  parameter int          N_SOMA     = 4096,
  parameter logic [31:0] SOMA_LIMIT = 32'h0000_1000,
  parameter logic [31:0] CND        = 32'h0000_2000,
  parameter int          ADD_LAT    = 11,
  parameter int          MUL_LAT    = 11,
  localparam int DW  = (N_DSP > 1) ? $clog2(N_DSP) : 1,
  localparam int CAW = $clog2(CN_NODES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // SDP loading
  input  logic             sdp_valid,
  output logic             sdp_ready,
  input  logic [DW-1:0]    sdp_dsp,
  input  sdp_row_t         sdp_row,
  // common node memory initialisation of the DSPs
  input  logic             cn_init_we,
  input  logic [DW-1:0]    cn_init_dsp,
  input  logic [7:0]       cn_init_idx,
  input  logic [31:0]      cn_init_cni,
  input  fp64_t            cn_init_volt,
  // CNP configuration
  input  logic             cnp_cfg_we,
  input  cn_cfg_e          cnp_cfg_sel,
  input  logic [CAW-1:0]   cnp_cfg_addr,
  input  fp64_t            cnp_cfg_data,
  // SP configuration
  input  logic             sp_cfg_we,
  input  sp_cfg_e          sp_cfg_sel,
  input  gate_e            sp_cfg_gate,
  input  logic [15:0]      sp_cfg_addr,
  input  fp64_t            sp_cfg_data,
  // stimulus: injection term per DSP
  input  fp64_t            d_inj [N_DSP],
  // simulation control
  input  logic             cycle_start,
  output logic             end_of_cycle,
  // observation
  output logic [N_DSP-1:0] wb_valid,
  output sdp_row_t         wb_row [N_DSP],
  output logic             rsp_valid,
  output msg_t             rsp,
  input  logic [CAW-1:0]   cnp_mon_addr,
  output fp64_t            cnp_mon_v0,
  // uplink to a higher-level switch
  output logic             up_out_empty,
  output msg_t             up_out_data,
  input  logic             up_out_pop,
  input  logic             up_in_valid,
  input  msg_t             up_in
);
  // ---------------- packet distributor ----------------
  logic [N_DSP-1:0] hdr_push, dat_push, hdr_full, dat_full;
  sdp_row_t         pd_wdata;
  logic             pd_done;
  packet_distributor #(.N_DSP(N_DSP)) u_pd (
    .clk, .rst_n, .in_valid(sdp_valid), .in_ready(sdp_ready), .in_dsp(sdp_dsp), .in_row(sdp_row),
    .hdr_push, .dat_push, .wdata(pd_wdata), .hdr_full, .dat_full, .packet_done(pd_done));

  // ---------------- dendrite segment processors ----------------
  logic [N_DSP-1:0] dsp_end, req_empty, req_pop;
  msg_t             req_data [N_DSP];

  for (genvar i = 0; i < N_DSP; i++) begin : g_dsp
    dsp #(.FIFO_DEPTH(FIFO_DEPTH), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_dsp (
      .clk, .rst_n, .cycle_start, .cycle_end(dsp_end[i]),
      .hdr_push(hdr_push[i]), .hdr_wdata(pd_wdata), .hdr_full(hdr_full[i]),
      .dat_push(dat_push[i]), .dat_wdata(pd_wdata), .dat_full(dat_full[i]),
      .cn_init_we(cn_init_we && cn_init_dsp == DW'(i)), .cn_init_idx, .cn_init_cni,
      .cn_init_volt, .d_inj(d_inj[i]),
      .rsp_valid, .rsp,
      .req_empty(req_empty[i]), .req_data(req_data[i]), .req_pop(req_pop[i]),
      .wb_valid(wb_valid[i]), .wb_row(wb_row[i]));
  end

  // ---------------- common node processor ----------------
  logic cnp_req_valid, cnp_out_empty, cnp_out_pop, cnp_idle;
  msg_t cnp_req, cnp_out_data;
  cnp #(.N_NODES(CN_NODES), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_cnp (
    .clk, .rst_n, .cfg_we(cnp_cfg_we), .cfg_sel(cnp_cfg_sel), .cfg_addr(cnp_cfg_addr),
    .cfg_data(cnp_cfg_data), .req_valid(cnp_req_valid), .req(cnp_req),
    .out_empty(cnp_out_empty), .out_data(cnp_out_data), .out_pop(cnp_out_pop), .idle(cnp_idle),
    .mon_addr(cnp_mon_addr), .mon_v0(cnp_mon_v0));

  // ---------------- soma processor ----------------
  logic sp_req_valid, sp_out_empty, sp_out_pop, sp_idle;
  msg_t sp_req, sp_out_data;
  sp #(.N_SOMA(N_SOMA), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_sp (
    .clk, .rst_n, .cfg_we(sp_cfg_we), .cfg_sel(sp_cfg_sel), .cfg_gate(sp_cfg_gate),
    .cfg_addr(sp_cfg_addr), .cfg_data(sp_cfg_data), .req_valid(sp_req_valid), .req(sp_req),
    .out_empty(sp_out_empty), .out_data(sp_out_data), .out_pop(sp_out_pop), .idle(sp_idle));

  // ---------------- common node switch ----------------
  logic cns_idle;
  cns #(.N_DSP(N_DSP), .SOMA_LIMIT(SOMA_LIMIT), .CND(CND), .HAS_CNP(1'b1), .HAS_SP(1'b1)) u_cns (
    .clk, .rst_n,
    .cl_req_empty(req_empty), .cl_req_data(req_data), .cl_req_pop(req_pop),
    .cl_rsp_valid(rsp_valid), .cl_rsp(rsp),
    .cnp_req_valid, .cnp_req, .cnp_out_empty, .cnp_out_data, .cnp_out_pop,
    .sp_req_valid, .sp_req, .sp_out_empty, .sp_out_data, .sp_out_pop,
    .up_out_empty, .up_out_data, .up_out_pop, .up_in_valid, .up_in, .idle(cns_idle));

  // ---------------- end of cycle ----------------
  assign end_of_cycle = (&dsp_end) && cnp_idle && sp_idle && cns_idle;

  logic unused;
  assign unused = pd_done;
endmodule
