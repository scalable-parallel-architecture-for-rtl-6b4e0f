// dsp: Dendrite Segment Processor.
//
// Updates the voltages of passive dendritic compartments by the forward
// Euler step  v_i(k+1) = A_d (v_{i-1}(k) + v_{i+1}(k)) + B_d v_i(k) + C_d [+ D_d].
// A segment is described by a Segment Definition Packet: five header rows
// (start node, end node, A_d, B_d, C_d) and one data row per compartment.
// Headers and data rows sit in two FIFOs; every simulation step reads each
// row once and writes it back, so no addressing is needed and any mix of
// segment lengths fits as long as the FIFOs hold it.
//
// Parts: Header FIFO and Data FIFO; header processor with the simulation
// cycle control; node processor made of the node controller, the common node
// voltage memory, the voltage processor and the injection current
// controller; output buffer (a FIFO of requests polled by the switch); and
// the end of cycle detector.
//
// Operation: load the FIFOs through hdr_push/dat_push and the common node
// memory through cn_init_*, then pulse cycle_start. Each segment takes
// 10 + N clocks of the segment controller; updated node voltages come out of
// the pipeline (3*ADD_LAT + MUL_LAT clocks after their node was read) and are
// written back to the Data FIFO, also shown on wb_valid/wb_row. cycle_end
// rises when all headers were handed out, as many data rows were written back
// as the Data FIFO held at cycle_start, and the output buffer is empty.
// Responses (rsp_*) broadcast by the switch update the common node memory.
// d_inj is the injection term applied to every node whose injection flag is
// set; it is this design's choice to supply it as an input.
module dsp
  import nsim_pkg::*;
#(
  parameter int FIFO_DEPTH = 8192,   // Header and Data FIFO depth in 66-bit rows
  parameter int OUT_DEPTH  = 16,     // output buffer depth in requests
  parameter int ADD_LAT    = 11,
  parameter int MUL_LAT    = 11,
  localparam int CW = $clog2(FIFO_DEPTH + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cycle_start,
  output logic       cycle_end,
  // loading
  input  logic       hdr_push,
  input  sdp_row_t   hdr_wdata,
  output logic       hdr_full,
  input  logic       dat_push,
  input  sdp_row_t   dat_wdata,
  output logic       dat_full,
  input  logic       cn_init_we,
  input  logic [7:0] cn_init_idx,
  input  logic [31:0] cn_init_cni,
  input  fp64_t      cn_init_volt,
  // injection current term D_d
  input  fp64_t      d_inj,
  // responses from the communication media
  input  logic       rsp_valid,
  input  msg_t       rsp,
  // requests to the communication media (output buffer)
  output logic       req_empty,
  output msg_t       req_data,
  input  logic       req_pop,
  // monitor of written-back node voltages
  output logic       wb_valid,
  output sdp_row_t   wb_row
);
  // ---------------- Header FIFO and header processor ----------------
  sdp_row_t hf_rdata, hp_wdata;
  logic     hf_empty, hp_pop, hp_push;
  logic [CW-1:0] hf_count;
  seg_hdr_t hdr;
  logic     seg_start, seg_end, hdr_done;

  sync_fifo #(.W(66), .DEPTH(FIFO_DEPTH)) u_hdr_fifo (
    .clk, .rst_n, .push(hdr_push | hp_push), .wdata(hp_push ? hp_wdata : hdr_wdata),
    .pop(hp_pop), .rdata(hf_rdata), .empty(hf_empty), .full(hdr_full), .count(hf_count));

  dsp_header_proc #(.FIFO_CW(CW)) u_hdr_proc (
    .clk, .rst_n, .cycle_start,
    .fifo_rdata(hf_rdata), .fifo_empty(hf_empty), .fifo_count(hf_count),
    .fifo_pop(hp_pop), .fifo_push(hp_push), .fifo_wdata(hp_wdata),
    .hdr, .seg_start, .seg_end, .hdr_done);

  // ---------------- Data FIFO ----------------
  sdp_row_t df_rdata;
  logic     df_empty, nc_pop;
  logic [CW-1:0] df_count;

  sync_fifo #(.W(66), .DEPTH(FIFO_DEPTH)) u_dat_fifo (
    .clk, .rst_n, .push(dat_push | wb_valid), .wdata(wb_valid ? wb_row : dat_wdata),
    .pop(nc_pop), .rdata(df_rdata), .empty(df_empty), .full(dat_full), .count(df_count));

  // ---------------- Node processor ----------------
  logic [7:0] ra_idx, rb_idx;
  fp64_t      ra_volt, rb_volt;

  dsp_cn_mem #(.DEPTH(256)) u_cn_mem (
    .clk, .init_we(cn_init_we), .init_idx(cn_init_idx), .init_cni(cn_init_cni),
    .init_volt(cn_init_volt), .rsp_valid, .rsp_cni(rsp.cni), .rsp_volt(rsp.volt),
    .ra_idx, .ra_volt, .rb_idx, .rb_volt);

  logic  vp_valid, vp_inj, req_push;
  fp64_t vp_m1, vp_0, vp_p1;
  msg_t  req_wdata;

  dsp_node_ctrl u_node_ctrl (
    .clk, .rst_n, .hdr, .seg_start, .seg_end,
    .dat_rdata(df_rdata), .dat_empty(df_empty), .dat_pop(nc_pop),
    .cn_ra_idx(ra_idx), .cn_ra_volt(ra_volt), .cn_rb_idx(rb_idx), .cn_rb_volt(rb_volt),
    .vp_valid, .vp_m1, .vp_0, .vp_p1, .vp_inj,
    .req_push, .req_data(req_wdata));

  logic  vo_valid, vo_inj;
  fp64_t vo_v;
  dsp_voltage_proc #(.ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT), .TAG_W(1)) u_vproc (
    .clk, .rst_n, .in_valid(vp_valid), .v_m1(vp_m1), .v_0(vp_0), .v_p1(vp_p1),
    .a_d(hdr.a_d), .b_d(hdr.b_d), .c_d(hdr.c_d), .in_tag(vp_inj),
    .out_valid(vo_valid), .v_new(vo_v), .out_tag(vo_inj));

  logic  ic_valid, ic_inj;
  fp64_t ic_v;
  dsp_inj_ctrl #(.ADD_LAT(ADD_LAT)) u_inj (
    .clk, .rst_n, .in_valid(vo_valid), .v_in(vo_v), .inj(vo_inj), .d_d(d_inj),
    .out_valid(ic_valid), .v_out(ic_v), .out_inj(ic_inj));

  assign wb_valid = ic_valid;
  assign wb_row   = {1'b0, ic_inj, ic_v};

  // ---------------- Output buffer ----------------
  logic ob_full;
  logic [$clog2(OUT_DEPTH+1)-1:0] ob_count;
  sync_fifo #(.W(MSG_W), .DEPTH(OUT_DEPTH)) u_out_buf (
    .clk, .rst_n, .push(req_push), .wdata(req_wdata), .pop(req_pop), .rdata(req_data),
    .empty(req_empty), .full(ob_full), .count(ob_count));

  // ---------------- End of cycle detector ----------------
  logic [CW-1:0] dat_total, wb_count;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dat_total <= '0;
      wb_count  <= '0;
    end else if (cycle_start) begin
      dat_total <= df_count;
      wb_count  <= '0;
    end else if (wb_valid) begin
      wb_count <= wb_count + 1'b1;
    end
  end
  assign cycle_end = hdr_done && (wb_count == dat_total) && req_empty;

  // Loading is only allowed while the processor is not stepping.
  assert property (@(posedge clk) disable iff (!rst_n) !(hp_push && hdr_push))
    else $error("dsp: header load during a simulation step");
  assert property (@(posedge clk) disable iff (!rst_n) !(wb_valid && dat_push))
    else $error("dsp: data load during a simulation step");
endmodule
