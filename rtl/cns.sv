// cns: Common Node Switch, the building block of the communication media.
//
// Connects N_DSP client ports (dendrite segment processors, or the uplinks of
// lower-level switches) with an optional common node processor and soma
// processor, and with a higher-level switch. Every processor has a FIFO
// output buffer; the switch core polls them.
//
// Request path: each clock the core picks one non-empty client buffer in
// round-robin order and routes its request by CNI:
//   CNI <  SOMA_LIMIT and HAS_SP             -> soma processor
//   (CND & CNI) == CND and HAS_CNP           -> common node processor
//   otherwise                                -> uplink output buffer (FIFO),
//                                               read by the higher-level switch
// The CNP and SP accept one request per clock with no handshake. A request for
// the uplink waits while the uplink buffer is full.
// Response path: each clock one response is taken, first from the higher
// level (up_in, which has no flow control and so always wins), else from the
// CNP or SP output buffer in alternation, and broadcast to all clients.
// Both paths move one message per clock on the rising edge. idle is high when
// the uplink buffer is empty and no client buffer holds a request.
// The routing follows the reference addressing scheme: somas own a range of
// CNIs starting at 0, and a CNP serves the CNIs of its domain by the test
// (CND & CNI) == CND. The values of SOMA_LIMIT and CND, the round-robin scan
// and the response priorities are this design's choices. The reference switch
// works on both clock edges; this one works on the rising edge only, with
// separate request and response paths.
module cns
  import nsim_pkg::*;
#(
  parameter int          N_DSP      = 3,
  parameter logic [31:0] SOMA_LIMIT = 32'h0000_1000,   // somas use CNI 0 .. SOMA_LIMIT-1
  parameter logic [31:0] CND        = 32'h0000_2000,   // domain of the attached CNP
  parameter bit          HAS_CNP    = 1'b1,
  parameter bit          HAS_SP     = 1'b1,
  parameter int          UP_DEPTH   = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // client ports
  input  logic [N_DSP-1:0] cl_req_empty,
  input  msg_t             cl_req_data [N_DSP],
  output logic [N_DSP-1:0] cl_req_pop,
  output logic             cl_rsp_valid,
  output msg_t             cl_rsp,
  // common node processor
  output logic             cnp_req_valid,
  output msg_t             cnp_req,
  input  logic             cnp_out_empty,
  input  msg_t             cnp_out_data,
  output logic             cnp_out_pop,
  // soma processor
  output logic             sp_req_valid,
  output msg_t             sp_req,
  input  logic             sp_out_empty,
  input  msg_t             sp_out_data,
  output logic             sp_out_pop,
  // higher level
  output logic             up_out_empty,
  output msg_t             up_out_data,
  input  logic             up_out_pop,
  input  logic             up_in_valid,
  input  msg_t             up_in,
  output logic             idle
);
  localparam int PW = (N_DSP > 1) ? $clog2(N_DSP) : 1;

  typedef enum logic [1:0] {D_SP, D_CNP, D_UP} dest_e;

  function automatic dest_e route(input logic [31:0] cni);
    if (HAS_SP && cni < SOMA_LIMIT)              return D_SP;
    if (HAS_CNP && ((CND & cni) == CND))         return D_CNP;
    return D_UP;
  endfunction

  // ---------------- request path ----------------
  logic [PW-1:0] rr;          // next client to look at first
  logic          sel_found;
  logic [PW-1:0] sel;
  msg_t          sel_msg;
  dest_e         sel_dest;
  logic          up_full, up_push;
  logic [$clog2(UP_DEPTH+1)-1:0] up_count;

  always_comb begin
    sel_found = 1'b0;
    sel       = rr;
    for (int k = 0; k < N_DSP; k++) begin
      int unsigned p;
      p = (int'(rr) + k) % N_DSP;
      if (!sel_found && !cl_req_empty[p]) begin
        sel_found = 1'b1;
        sel       = PW'(p);
      end
    end
    sel_msg  = cl_req_data[sel];
    sel_dest = route(sel_msg.cni);
  end

  logic go;
  assign go = sel_found && !(sel_dest == D_UP && up_full);

  always_comb begin
    cl_req_pop = '0;
    if (go) cl_req_pop[sel] = 1'b1;
  end
  assign cnp_req_valid = go && sel_dest == D_CNP;
  assign sp_req_valid  = go && sel_dest == D_SP;
  assign up_push       = go && sel_dest == D_UP;
  assign cnp_req       = sel_msg;
  assign sp_req        = sel_msg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         rr <= '0;
    else if (sel_found) rr <= (sel == PW'(N_DSP - 1)) ? '0 : sel + 1'b1;
  end

  sync_fifo #(.W(MSG_W), .DEPTH(UP_DEPTH)) u_up_buf (
    .clk, .rst_n, .push(up_push), .wdata(sel_msg), .pop(up_out_pop), .rdata(up_out_data),
    .empty(up_out_empty), .full(up_full), .count(up_count));

  // ---------------- response path ----------------
  logic turn_sp;   // alternation between CNP and SP output buffers
  logic take_cnp, take_sp;
  always_comb begin
    take_cnp = 1'b0;
    take_sp  = 1'b0;
    if (!up_in_valid) begin
      if (!cnp_out_empty && !sp_out_empty) begin
        take_sp  = turn_sp;
        take_cnp = !turn_sp;
      end else begin
        take_cnp = !cnp_out_empty;
        take_sp  = !sp_out_empty;
      end
    end
  end
  assign cnp_out_pop  = take_cnp;
  assign sp_out_pop   = take_sp;
  assign cl_rsp_valid = up_in_valid || take_cnp || take_sp;
  assign cl_rsp       = up_in_valid ? up_in : (take_sp ? sp_out_data : cnp_out_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  turn_sp <= 1'b0;
    else if (take_cnp | take_sp) turn_sp <= take_cnp;
  end

  assign idle = up_out_empty && (&cl_req_empty);

  assert property (@(posedge clk) disable iff (!rst_n) !(take_cnp && take_sp))
    else $error("cns: two responses in one clock");
endmodule
