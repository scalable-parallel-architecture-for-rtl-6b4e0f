// dsp_header_proc: header processor and Simulation Cycle Control of a
// dendrite segment processor.
//
// On cycle_start the block takes the number of rows in the Header FIFO as the
// size of one pass. It then reads the five header rows of a segment one per
// clock, writes each row back to the Header FIFO for the next simulation step,
// decodes the rows (start node CNI/INDEX/status and node count, end node
// CNI/INDEX/status, A_d, B_d, C_d) and pulses seg_start with the decoded header
// held on hdr. It waits for seg_end from the node processor before reading the
// next segment. When the number of rows written back equals the size taken at
// cycle_start, every segment has been handed out and hdr_done rises; it stays
// high until the next cycle_start. The FIFO is first-word fall-through.
module dsp_header_proc
  import nsim_pkg::*;
#(
  parameter int FIFO_CW = 14        // width of the FIFO's count output
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cycle_start,
  // Header FIFO
  input  sdp_row_t           fifo_rdata,
  input  logic               fifo_empty,
  input  logic [FIFO_CW-1:0] fifo_count,
  output logic               fifo_pop,
  output logic               fifo_push,
  output sdp_row_t           fifo_wdata,
  // to and from the node processor
  output seg_hdr_t           hdr,
  output logic               seg_start,
  input  logic               seg_end,
  output logic               hdr_done
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_WAIT, S_DONE} state_e;
  state_e             state;
  logic [2:0]         row;
  logic [FIFO_CW-1:0] total, written;

  assign fifo_pop   = (state == S_READ) && !fifo_empty;
  assign fifo_push  = fifo_pop;
  assign fifo_wdata = fifo_rdata;
  assign hdr_done   = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      row       <= '0;
      total     <= '0;
      written   <= '0;
      seg_start <= 1'b0;
      hdr       <= '0;
    end else begin
      seg_start <= 1'b0;
      unique case (state)
        S_IDLE, S_DONE: begin
          if (cycle_start) begin
            total   <= fifo_count;
            written <= '0;
            row     <= '0;
            state   <= (fifo_count == '0) ? S_DONE : S_READ;
          end
        end
        S_READ: begin
          if (fifo_pop) begin
            written <= written + 1'b1;
            unique case (row)
              3'd0: begin
                hdr.start_cni    <= fifo_rdata[31:0];
                hdr.start_idx    <= fifo_rdata[39:32];
                hdr.num_nodes    <= fifo_rdata[47:40];
                hdr.start_status <= fifo_rdata[65:64];
              end
              3'd1: begin
                hdr.end_cni      <= fifo_rdata[31:0];
                hdr.end_idx      <= fifo_rdata[39:32];
                hdr.end_status   <= fifo_rdata[65:64];
              end
              3'd2: hdr.a_d <= fifo_rdata[63:0];
              3'd3: hdr.b_d <= fifo_rdata[63:0];
              default: hdr.c_d <= fifo_rdata[63:0];
            endcase
            if (row == 3'(SDP_HDR_ROWS - 1)) begin
              row       <= '0;
              seg_start <= 1'b1;
              state     <= S_WAIT;
            end else begin
              row <= row + 1'b1;
            end
          end
        end
        S_WAIT: begin
          if (seg_end) state <= (written == total) ? S_DONE : S_READ;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
