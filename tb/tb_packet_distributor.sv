// tb_packet_distributor: loads 200 random Segment Definition Packets (0 to
// 12 nodes) into 3 DSP FIFO models with random full flags and random input
// gaps. Checks that the five header rows of each packet reach only the
// target's Header FIFO and its node rows only the target's Data FIFO, in
// order; that no row is accepted while its destination is full; and that
// packet_done pulses once per packet, after its last row.
module tb_packet_distributor;
  import nsim_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, packet_done;
  logic [1:0] in_dsp;
  sdp_row_t in_row, wdata;
  logic [N-1:0] hdr_push, dat_push, hdr_full, dat_full;
  packet_distributor #(.N_DSP(N)) dut (.*);

  sdp_row_t exp_h[N][$], exp_d[N][$];
  int checks = 0, failures = 0, done_cnt = 0, pkts = 0, stalls = 0, empty_pkts = 0;
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

  always @(negedge clk) begin
    hdr_full = 3'($urandom_range(7)) & 3'($urandom_range(7));
    dat_full = 3'($urandom_range(7)) & 3'($urandom_range(7));
  end
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < N; d++) begin
      if (hdr_push[d]) begin
        chk(!hdr_full[d], "push into full header FIFO");
        chk(exp_h[d].size() > 0 && wdata == exp_h[d].pop_front(), $sformatf("header row to DSP %0d", d));
      end
      if (dat_push[d]) begin
        chk(!dat_full[d], "push into full data FIFO");
        chk(exp_d[d].size() > 0 && wdata == exp_d[d].pop_front(), $sformatf("data row to DSP %0d", d));
      end
    end
    chk($countones({hdr_push, dat_push}) == int'(in_valid && in_ready), "one push per accepted row");
    if (in_valid && !in_ready) stalls++;
    if (packet_done) done_cnt++;
  end

  task automatic send(input sdp_row_t r, input int d);
    @(negedge clk);
    while ($urandom_range(3) == 0) begin in_valid = 0; in_dsp = 2'($urandom_range(2)); @(negedge clk); end
    in_valid = 1; in_row = r; in_dsp = 2'(d);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
  endtask

  initial begin
    in_valid = 0; in_row = '0; in_dsp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 200; p++) begin
      int d, nn;
      sdp_row_t r;
      d = $urandom_range(N - 1);
      nn = (p % 10 == 0) ? 0 : $urandom_range(12);
      if (nn == 0) empty_pkts++;
      for (int i = 0; i < SDP_HDR_ROWS + nn; i++) begin
        r = {$urandom, $urandom, $urandom};
        if (i == 0) r[47:40] = 8'(nn);
        if (i < SDP_HDR_ROWS) exp_h[d].push_back(r); else exp_d[d].push_back(r);
        send(r, d);
      end
      pkts++;
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(negedge clk);
    for (int d = 0; d < N; d++) chk(exp_h[d].size() == 0 && exp_d[d].size() == 0, "all rows delivered");
    chk(done_cnt == pkts, $sformatf("packet_done %0d of %0d", done_cnt, pkts));
    chk(stalls > 0 && empty_pkts > 0, "back-pressure and empty packets exercised");
    $display("packets %0d (without nodes %0d), stalled clocks %0d", pkts, empty_pkts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
