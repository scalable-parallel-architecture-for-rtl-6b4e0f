// dsp_node_ctrl: Node Controller of the dendrite segment processor.
//
// For the segment announced by seg_start it streams the segment's node
// voltages out of the Data FIFO, one per clock, and presents each node with
// its two neighbours (V^-1, V^0, V^1) to the voltage processor. The node
// beyond each end of the segment is
//   - the common node or soma voltage held in the common node voltage memory
//     at the header's INDEX when the end status is not 00 (connected), or
//   - a fake node, a copy of the end node itself, when the end is open, so the
//     axial current through that end is zero.
// After the last node it writes one request per connected end into the
// output buffer: the end's CNI, its status and the voltage the adjacent node
// had at the start of this step. It then pulses seg_end.
//
// Timing per segment of N nodes: 1 clock to read the common node memory, N
// clocks to read the nodes, 1 clock for the last node, 2 request slots and 1
// clock to end the segment; with the 5 header rows this gives 10 + N clocks.
module dsp_node_ctrl
  import nsim_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  seg_hdr_t    hdr,
  input  logic        seg_start,
  output logic        seg_end,
  // Data FIFO read side
  input  sdp_row_t    dat_rdata,
  input  logic        dat_empty,
  output logic        dat_pop,
  // common node voltage memory read ports
  output logic [7:0]  cn_ra_idx,
  input  fp64_t       cn_ra_volt,
  output logic [7:0]  cn_rb_idx,
  input  fp64_t       cn_rb_volt,
  // to the voltage processor
  output logic        vp_valid,
  output fp64_t       vp_m1,
  output fp64_t       vp_0,
  output fp64_t       vp_p1,
  output logic        vp_inj,
  // to the output buffer
  output logic        req_push,
  output msg_t        req_data
);
  typedef enum logic [2:0] {S_IDLE, S_NODES, S_LAST, S_REQ0, S_REQ1, S_END} state_e;
  state_e     state;
  logic [7:0] k;
  fp64_t      prev, cur, cn_start, cn_end, first_v, last_v;
  logic       cur_inj;

  logic start_conn, end_conn;
  assign start_conn = (hdr.start_status != ST_OPEN);
  assign end_conn   = (hdr.end_status   != ST_OPEN);

  assign cn_ra_idx = hdr.start_idx;
  assign cn_rb_idx = hdr.end_idx;

  assign dat_pop = (state == S_NODES) && !dat_empty;

  always_comb begin
    vp_valid = 1'b0;
    vp_m1    = prev;
    vp_0     = cur;
    vp_p1    = dat_rdata[63:0];
    vp_inj   = cur_inj;
    if (state == S_NODES && dat_pop && k != 0) vp_valid = 1'b1;
    if (state == S_LAST) begin
      vp_valid = 1'b1;
      vp_p1    = end_conn ? cn_end : cur;
    end
  end

  always_comb begin
    req_push = 1'b0;
    req_data = '0;
    if (state == S_REQ0 && start_conn) begin
      req_push = 1'b1;
      req_data = '{cni: hdr.start_cni, status: hdr.start_status, volt: first_v};
    end
    if (state == S_REQ1 && end_conn) begin
      req_push = 1'b1;
      req_data = '{cni: hdr.end_cni, status: hdr.end_status, volt: last_v};
    end
  end

  assign seg_end = (state == S_END);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      k       <= '0;
      prev    <= '0;
      cur     <= '0;
      cur_inj <= 1'b0;
      cn_start <= '0;
      cn_end  <= '0;
      first_v <= '0;
      last_v  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (seg_start) begin
          cn_start <= cn_ra_volt;
          cn_end   <= cn_rb_volt;
          k        <= '0;
          state    <= (hdr.num_nodes == 8'd0) ? S_REQ0 : S_NODES;
        end
        S_NODES: if (dat_pop) begin
          if (k == 0) begin
            prev    <= start_conn ? cn_start : dat_rdata[63:0];
            first_v <= dat_rdata[63:0];
          end else begin
            prev <= cur;
          end
          cur     <= dat_rdata[63:0];
          cur_inj <= dat_rdata[64];
          k       <= k + 1'b1;
          if (k + 8'd1 == hdr.num_nodes) state <= S_LAST;
        end
        S_LAST: begin
          last_v <= cur;
          state  <= S_REQ0;
        end
        S_REQ0: state <= S_REQ1;
        S_REQ1: state <= S_END;
        S_END:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
