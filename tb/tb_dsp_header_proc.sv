// tb_dsp_header_proc: header processor driving a 64-row first-word
// fall-through FIFO loaded with 7 random segment headers. For three
// simulation cycles it checks that each segment's five rows are decoded into
// the right header fields (start CNI/INDEX/status/node count, end
// CNI/INDEX/status, A_d, B_d, C_d) when seg_start pulses, that the next
// segment is not read before seg_end (given after a random delay), that the
// rows are written back so the FIFO holds the same headers in the same order
// for the next cycle, and that hdr_done rises after the last segment. A cycle
// with an empty FIFO must give hdr_done at once.
module tb_dsp_header_proc;
  import nsim_pkg::*;
  import tb_util_pkg::*;
  localparam int NSEG = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cycle_start, fifo_empty, fifo_pop, fifo_push, seg_start, seg_end, hdr_done, full, ld_push;
  sdp_row_t fifo_rdata, fifo_wdata, ld_data;
  logic [6:0] fifo_count;
  seg_hdr_t hdr;
  dsp_header_proc #(.FIFO_CW(7)) dut (.*);
  sync_fifo #(.W(66), .DEPTH(64)) u_fifo (
    .clk, .rst_n, .push(fifo_push | ld_push), .wdata(ld_push ? ld_data : fifo_wdata),
    .pop(fifo_pop), .rdata(fifo_rdata), .empty(fifo_empty), .full, .count(fifo_count));

  sdp_row_t rows[NSEG][5];
  int checks = 0, failures = 0, seg = 0, busy = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // node-processor model: seg_end a random time after seg_start
  always @(posedge clk) if (rst_n) begin
    if (seg_start) begin
      sdp_row_t r[5];
      r = rows[seg % NSEG];
      chk(hdr.start_cni == r[0][31:0] && hdr.start_idx == r[0][39:32] &&
          hdr.num_nodes == r[0][47:40] && hdr.start_status == r[0][65:64], "start node fields");
      chk(hdr.end_cni == r[1][31:0] && hdr.end_idx == r[1][39:32] &&
          hdr.end_status == r[1][65:64], "end node fields");
      chk(hdr.a_d == r[2][63:0] && hdr.b_d == r[3][63:0] && hdr.c_d == r[4][63:0], "coefficients");
      chk(busy == 0, "seg_start while a segment is active");
      busy = 2 + $urandom_range(15);
      seg++;
    end else if (busy > 0) begin
      chk(!fifo_pop, "no header read while the segment runs");
      busy--;
    end
  end
  always @(negedge clk) seg_end = (busy == 1);

  initial begin
    cycle_start = 0; ld_push = 0; ld_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) cycle_start = 1;
    @(negedge clk) cycle_start = 0;
    repeat (2) @(negedge clk);
    chk(hdr_done, "empty FIFO: hdr_done at once");
    for (int s = 0; s < NSEG; s++)
      for (int i = 0; i < 5; i++) begin
        rows[s][i] = {$urandom, $urandom, $urandom};
        @(negedge clk) ld_push = 1; ld_data = rows[s][i];
      end
    @(negedge clk) ld_push = 0;
    for (int c = 0; c < 3; c++) begin
      @(negedge clk) cycle_start = 1;
      @(negedge clk) cycle_start = 0;
      chk(!hdr_done, "hdr_done low while segments remain");
      while (!hdr_done) @(negedge clk);
      chk(seg == NSEG * (c + 1), $sformatf("segments handed out %0d", seg));
      chk(fifo_count == 7'(NSEG * 5), "headers written back");
      repeat (20) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
