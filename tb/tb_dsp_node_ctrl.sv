// tb_dsp_node_ctrl: node controller with a 64-row Data FIFO and a common node
// memory model. 300 random segments of 1 to 12 nodes with every combination
// of open and connected ends are run. For each node the test checks the
// triple (V^-1, V^0, V^1) and inject flag given to the voltage processor:
// neighbours inside the segment, the common node voltage at the header's
// INDEX for a connected end, and the node itself (fake node) for an open
// end. It checks one request per connected end carrying the end's CNI and
// status and the adjacent node's voltage, none for an open end, and that
// seg_end comes N + 4 clocks after seg_start.
module tb_dsp_node_ctrl;
  import nsim_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  seg_hdr_t hdr;
  logic seg_start, seg_end, dat_empty, dat_pop, vp_valid, vp_inj, req_push, ld_push, full;
  sdp_row_t dat_rdata, ld_data;
  logic [7:0] cn_ra_idx, cn_rb_idx;
  fp64_t cn_ra_volt, cn_rb_volt, vp_m1, vp_0, vp_p1;
  msg_t req_data;
  logic [6:0] count;
  dsp_node_ctrl dut (.*);
  sync_fifo #(.W(66), .DEPTH(64)) u_fifo (
    .clk, .rst_n, .push(ld_push), .wdata(ld_data), .pop(dat_pop), .rdata(dat_rdata),
    .empty(dat_empty), .full, .count);

  fp64_t cnm[256];
  assign cn_ra_volt = cnm[cn_ra_idx];
  assign cn_rb_volt = cnm[cn_rb_idx];

  typedef struct { fp64_t m1, v0, p1; logic inj; } trip_t;
  trip_t exp_v[$];
  msg_t exp_r[$];
  int checks = 0, failures = 0, cyc = 0, t_start, n_cur, open_ends = 0, conn_ends = 0;
  always @(posedge clk) cyc <= cyc + 1;
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

  always @(posedge clk) if (rst_n) begin
    if (vp_valid) begin
      trip_t e;
      e = exp_v.pop_front();
      chk(vp_m1 == e.m1 && vp_0 == e.v0 && vp_p1 == e.p1 && vp_inj == e.inj, "node triple");
    end
    if (req_push) chk(exp_r.size() > 0 && req_data == exp_r.pop_front(), "request");
    if (seg_start) t_start = cyc;
    if (seg_end) chk(cyc - t_start == n_cur + 4, $sformatf("segment time %0d for %0d nodes", cyc - t_start, n_cur));
  end

  initial begin
    hdr = '0; seg_start = 0; ld_push = 0; ld_data = '0;
    for (int i = 0; i < 256; i++) cnm[i] = rand_fp(4);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 300; s++) begin
      int n;
      fp64_t v[];
      logic inj[];
      fp64_t left, right;
      n = $urandom_range(1, 12);
      n_cur = n;
      v = new[n]; inj = new[n];
      hdr.start_cni = $urandom; hdr.end_cni = $urandom;
      hdr.start_idx = 8'($urandom); hdr.end_idx = 8'($urandom);
      hdr.start_status = 2'(s % 4); hdr.end_status = 2'((s / 4) % 4);
      hdr.num_nodes = 8'(n);
      for (int i = 0; i < n; i++) begin
        v[i] = rand_fp(4); inj[i] = 1'($urandom);
        @(negedge clk) ld_push = 1; ld_data = {1'b0, inj[i], v[i]};
      end
      @(negedge clk) ld_push = 0;
      left  = (hdr.start_status != ST_OPEN) ? cnm[hdr.start_idx] : v[0];
      right = (hdr.end_status != ST_OPEN) ? cnm[hdr.end_idx] : v[n - 1];
      for (int i = 0; i < n; i++)
        exp_v.push_back('{m1: (i == 0) ? left : v[i - 1], v0: v[i],
                          p1: (i == n - 1) ? right : v[i + 1], inj: inj[i]});
      if (hdr.start_status != ST_OPEN) begin
        exp_r.push_back('{cni: hdr.start_cni, status: hdr.start_status, volt: v[0]}); conn_ends++;
      end else open_ends++;
      if (hdr.end_status != ST_OPEN) begin
        exp_r.push_back('{cni: hdr.end_cni, status: hdr.end_status, volt: v[n - 1]}); conn_ends++;
      end else open_ends++;
      @(negedge clk) seg_start = 1;
      @(negedge clk) seg_start = 0;
      while (!seg_end) @(negedge clk);
      @(negedge clk);
      chk(exp_v.size() == 0 && exp_r.size() == 0, "segment complete");
    end
    $display("open ends %0d, connected ends %0d", open_ends, conn_ends);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
