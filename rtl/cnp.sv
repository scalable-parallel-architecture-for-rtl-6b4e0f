// cnp: Common Node Processor.
//
// Updates the voltage of each branching point (common node) of a dendritic
// tree by the forward Euler step
//   V0(k+1) = A_c V-1(k) + B_c V0(k) + C_c V1(k) + D_c V2(k) + E_c
// where V-1 is the neighbour on the parent segment and V1, V2 those on the two
// child segments. The three neighbour voltages arrive as separate requests,
// in any order and at most one per clock. Each request is turned at once into
// its share of the sum, selected by the request's status:
//   01 (parent):  A_c * V-1 + B_c * V0
//   10 (child 1): C_c * V1  + E_c
//   11 (child 2): D_c * V2
// using one multiplier for the group-1 product, one for B_c*V0 and an adder.
// Two per-node memories act as a two-deep shift register of finished terms,
// addressed by the node's local address (low ADDR_W bits of the CNI); a small
// per-node counter tells when the third term arrives. Then the two stored
// terms and the new one are summed, the shift register is cleared, and the new
// voltage is stored for the next step and written to the output FIFO as a
// response (CNI, new voltage). The CNP monitor counts +1 per request and -3
// per update; idle is high when nothing is outstanding and the FIFO is empty.
//
// Latency from the third request to the response in the FIFO:
// MUL_LAT + 3*ADD_LAT + 1 clocks. Coefficients and initial voltages are
// written through cfg_* before a simulation. The requests must belong to this
// processor's domain; the switch checks that.
module cnp
  import nsim_pkg::*;
#(
  parameter int N_NODES   = 2048,
  parameter int OUT_DEPTH = 64,
  parameter int ADD_LAT   = 11,
  parameter int MUL_LAT   = 11,
  localparam int AW = $clog2(N_NODES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration
  input  logic          cfg_we,
  input  cn_cfg_e       cfg_sel,
  input  logic [AW-1:0] cfg_addr,
  input  fp64_t         cfg_data,
  // requests from the communication media
  input  logic          req_valid,
  input  msg_t          req,
  // responses (output FIFO)
  output logic          out_empty,
  output msg_t          out_data,
  input  logic          out_pop,
  output logic          idle,
  // current voltage of a node, for observation
  input  logic [AW-1:0] mon_addr,
  output fp64_t         mon_v0
);
  fp64_t ac [N_NODES];
  fp64_t bc [N_NODES];
  fp64_t cc [N_NODES];
  fp64_t dc [N_NODES];
  fp64_t ec [N_NODES];
  fp64_t v0 [N_NODES];
  fp64_t sh1 [N_NODES];   // first memory of the shift register
  fp64_t sh2 [N_NODES];   // second memory
  logic [1:0] nterm [N_NODES];

  // ---------------- stage 0: select coefficients ----------------
  logic [AW-1:0] idx;
  fp64_t g1_coef, g2_const;
  logic  g2_is_mul;
  assign idx = req.cni[AW-1:0];
  always_comb begin
    unique case (req.status)
      ST_PARENT: g1_coef = ac[idx];
      ST_CHILD1: g1_coef = cc[idx];
      default:   g1_coef = dc[idx];
    endcase
    g2_is_mul = (req.status == ST_PARENT);
    g2_const  = (req.status == ST_CHILD1) ? ec[idx] : 64'd0;
  end

  fp64_t g1, g2m, g2c;
  logic  g1_v, g2m_v, g2_mul_q;
  fp_mul #(.LAT(MUL_LAT)) u_mul_g1 (.clk, .rst_n, .in_valid(req_valid), .a(g1_coef), .b(req.volt),
                                    .out_valid(g1_v), .y(g1));
  fp_mul #(.LAT(MUL_LAT)) u_mul_g2 (.clk, .rst_n, .in_valid(req_valid), .a(bc[idx]), .b(v0[idx]),
                                    .out_valid(g2m_v), .y(g2m));
  delay_line #(.W(65), .DEPTH(MUL_LAT)) u_dly_g2 (.clk, .d({g2_is_mul, g2_const}), .q({g2_mul_q, g2c}));

  logic [31:0] cni_q1;
  delay_line #(.W(32), .DEPTH(MUL_LAT)) u_dly_cni1 (.clk, .d(req.cni), .q(cni_q1));

  fp64_t term;
  logic  term_v, unused_g2v;
  assign unused_g2v = g2m_v;
  fp_add #(.LAT(ADD_LAT)) u_add_term (.clk, .rst_n, .in_valid(g1_v), .a(g1),
                                      .b(g2_mul_q ? g2m : g2c), .out_valid(term_v), .y(term));
  logic [31:0] cni_t;
  delay_line #(.W(32), .DEPTH(ADD_LAT)) u_dly_cni2 (.clk, .d(cni_q1), .q(cni_t));

  // ---------------- term stage: shift register and monitoring ----------------
  logic [AW-1:0] tidx;
  logic          third;
  assign tidx  = cni_t[AW-1:0];
  assign third = term_v && (nterm[tidx] == 2'd2);

  always_ff @(posedge clk) begin
    if (term_v) begin
      if (third) begin
        sh1[tidx] <= 64'd0;
        sh2[tidx] <= 64'd0;
      end else begin
        sh1[tidx] <= term;
        sh2[tidx] <= sh1[tidx];
      end
    end
    if (cfg_we) begin
      unique case (cfg_sel)
        CN_AC: ac[cfg_addr] <= cfg_data;
        CN_BC: bc[cfg_addr] <= cfg_data;
        CN_CC: cc[cfg_addr] <= cfg_data;
        CN_DC: dc[cfg_addr] <= cfg_data;
        CN_EC: ec[cfg_addr] <= cfg_data;
        default: ;
      endcase
    end
  end

  // the term counters are cleared by reset so a run always starts clean
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_NODES; i++) nterm[i] <= 2'd0;
    end else if (term_v) begin
      nterm[tidx] <= third ? 2'd0 : nterm[tidx] + 2'd1;
    end
  end

  // ---------------- final sum ----------------
  fp64_t s1, s2, sh2_q;
  logic  s1_v, s2_v;
  fp_add #(.LAT(ADD_LAT)) u_add_s1 (.clk, .rst_n, .in_valid(third), .a(term), .b(sh1[tidx]),
                                    .out_valid(s1_v), .y(s1));
  delay_line #(.W(64), .DEPTH(ADD_LAT)) u_dly_sh2 (.clk, .d(sh2[tidx]), .q(sh2_q));
  logic [31:0] cni_s1, cni_s2;
  delay_line #(.W(32), .DEPTH(ADD_LAT)) u_dly_cni3 (.clk, .d(cni_t), .q(cni_s1));
  fp_add #(.LAT(ADD_LAT)) u_add_s2 (.clk, .rst_n, .in_valid(s1_v), .a(s1), .b(sh2_q),
                                    .out_valid(s2_v), .y(s2));
  delay_line #(.W(32), .DEPTH(ADD_LAT)) u_dly_cni4 (.clk, .d(cni_s1), .q(cni_s2));

  // new voltage: stored for the next step (or loaded by configuration)
  logic [AW-1:0] v0_waddr;
  assign v0_waddr = cni_s2[AW-1:0];
  always_ff @(posedge clk) begin
    if (cfg_we && cfg_sel == CN_V0) v0[cfg_addr] <= cfg_data;
    else if (s2_v)                  v0[v0_waddr] <= s2;
  end

  msg_t  rsp_w;
  assign rsp_w = '{cni: cni_s2, status: ST_OPEN, volt: s2};
  logic of_full;
  logic [$clog2(OUT_DEPTH+1)-1:0] of_count;
  sync_fifo #(.W(MSG_W), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n, .push(s2_v), .wdata(rsp_w),
    .pop(out_pop), .rdata(out_data), .empty(out_empty), .full(of_full), .count(of_count));

  // ---------------- CNP monitor ----------------
  logic [15:0] mon_count;
  idle_monitor #(.CW(16), .INC(1), .DEC(3)) u_mon (
    .clk, .rst_n, .inc(req_valid), .dec(s2_v), .out_empty, .idle, .count(mon_count));

  assign mon_v0 = v0[mon_addr];

  // The status of a request must name one of the three neighbours.
  assert property (@(posedge clk) disable iff (!rst_n) req_valid |-> req.status != ST_OPEN)
    else $error("cnp: request with open-end status");
endmodule
