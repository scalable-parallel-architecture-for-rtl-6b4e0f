// packet_distributor: loads Segment Definition Packets into the DSPs.
//
// Takes a stream of 66-bit SDP rows, one per clock when in_valid and
// in_ready are both high. The target DSP (in_dsp) is taken with the first row
// of each packet. The distributor reads the node count from bits [47:40] of
// that first header row, sends the five header rows to the target's Header
// FIFO and the following node-count data rows to its Data FIFO, then expects
// the first row of the next packet. in_ready is low while the FIFO the next
// row goes to is full. packet_done pulses after the last row of a packet.
module packet_distributor
  import nsim_pkg::*;
#(
  parameter int N_DSP = 3,
  localparam int DW = (N_DSP > 1) ? $clog2(N_DSP) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [DW-1:0]    in_dsp,
  input  sdp_row_t         in_row,
  output logic [N_DSP-1:0] hdr_push,
  output logic [N_DSP-1:0] dat_push,
  output sdp_row_t         wdata,
  input  logic [N_DSP-1:0] hdr_full,
  input  logic [N_DSP-1:0] dat_full,
  output logic             packet_done
);
  logic [8:0]    row;          // row number within the packet
  logic [7:0]    nodes;        // node count of the current packet
  logic [DW-1:0] tgt;
  logic [DW-1:0] cur_tgt;
  logic          is_hdr, last, fire;

  assign cur_tgt = (row == 0) ? in_dsp : tgt;
  assign is_hdr  = (row < 9'(SDP_HDR_ROWS));
  assign in_ready = is_hdr ? !hdr_full[cur_tgt] : !dat_full[cur_tgt];
  assign fire    = in_valid && in_ready;
  // last row: the 5th header row of a packet without nodes, or the last node
  assign last    = (row == 0) ? (in_row[47:40] == 8'd0 && SDP_HDR_ROWS == 1)
                              : (row == 9'(SDP_HDR_ROWS) + 9'(nodes) - 9'd1);
  assign wdata   = in_row;

  always_comb begin
    hdr_push = '0;
    dat_push = '0;
    if (fire) begin
      if (is_hdr) hdr_push[cur_tgt] = 1'b1;
      else        dat_push[cur_tgt] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row         <= '0;
      nodes       <= '0;
      tgt         <= '0;
      packet_done <= 1'b0;
    end else begin
      packet_done <= 1'b0;
      if (fire) begin
        if (row == 0) begin
          nodes <= in_row[47:40];
          tgt   <= in_dsp;
        end
        if (last) begin
          row         <= '0;
          packet_done <= 1'b1;
        end else begin
          row <= row + 1'b1;
        end
      end
    end
  end
endmodule
