// tb_dsp_workload: one dendrite segment processor with every parameter at its
// default, loaded as full as its FIFOs allow with ten-node segments: 819
// segments give 8190 node rows in the 8192-row Data FIFO and 4095 rows in the
// Header FIFO. One segment in three is open at both ends; the others end at
// common nodes or somas whose voltages sit in the 256-entry common node
// memory, each entry shared by several segments. Two simulation steps are run.
// Every written-back row is compared bit for bit with a model using the same
// operation order, every request with its expected CNI, status and adjacent
// voltage, and the step time with sum(10 + N) = 819 * 20 = 16380 clocks plus
// the drain of the node pipeline, which must be the same in both steps and
// shorter than 64 clocks.
module tb_dsp_workload;
  import nsim_pkg::*;
  import tb_util_pkg::*;
  localparam int NSEG = 819, NN = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cycle_start, cycle_end, hdr_push, dat_push, hdr_full, dat_full, cn_init_we;
  sdp_row_t hdr_wdata, dat_wdata, wb_row;
  logic [7:0] cn_init_idx;
  logic [31:0] cn_init_cni;
  fp64_t cn_init_volt, d_inj;
  logic rsp_valid, req_empty, req_pop, wb_valid;
  msg_t rsp, req_data;

  dsp dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [1:0] st_s, st_e;
    logic [7:0] idx_s, idx_e;
    fp64_t a, b, c;
    fp64_t v[NN];
    bit inj[NN];
  } seg_t;
  seg_t segs[NSEG];
  fp64_t cnv [256];

  sdp_row_t exp_wb[$];
  msg_t exp_req[$];
  int n_req = 0;

  always @(posedge clk) if (rst_n && wb_valid) begin
    sdp_row_t e;
    e = exp_wb.pop_front();
    chk(wb_row == e, $sformatf("wb row got %h exp %h", wb_row, e));
  end
  always @(posedge clk) if (rst_n && req_pop) begin
    msg_t e;
    e = exp_req.pop_front();
    n_req++;
    chk(req_data == e, $sformatf("request got %h exp %h", req_data, e));
  end
  assign req_pop = !req_empty;

  function automatic logic [31:0] cni_of(input logic [7:0] idx);
    return (idx < 8'd64) ? 32'(idx) : 32'h2000 + 32'(idx);  // somas, then common nodes
  endfunction

  task automatic build_and_load();
    for (int j = 0; j < 256; j++) begin
      @(negedge clk); cn_init_we = 1; cn_init_idx = 8'(j); cn_init_cni = cni_of(8'(j));
      cn_init_volt = r2b(real'($urandom_range(100)) - 20.0);
      cnv[j] = cn_init_volt;
    end
    @(negedge clk) cn_init_we = 0;
    for (int s = 0; s < NSEG; s++) begin
      sdp_row_t r[5];
      segs[s].st_s = (s % 3 == 0) ? 2'b00 : 2'($urandom_range(1, 3));
      segs[s].st_e = (s % 3 == 0) ? 2'b00 : 2'($urandom_range(1, 3));
      segs[s].idx_s = 8'($urandom_range(255));
      segs[s].idx_e = 8'($urandom_range(255));
      segs[s].a = r2b(0.05 + 0.01 * real'($urandom_range(10)));
      segs[s].b = r2b(0.85 + 0.01 * real'($urandom_range(5)));
      segs[s].c = r2b(0.001 * real'($urandom_range(10)));
      for (int k = 0; k < NN; k++) begin
        segs[s].v[k] = r2b(-10.0 + real'($urandom_range(300)) / 3.0);
        segs[s].inj[k] = ($urandom_range(7) == 0);
      end
      r[0] = {segs[s].st_s, 16'd0, 8'(NN), segs[s].idx_s, cni_of(segs[s].idx_s)};
      r[1] = {segs[s].st_e, 16'd0, 8'd0, segs[s].idx_e, cni_of(segs[s].idx_e)};
      r[2] = {2'b00, segs[s].a};
      r[3] = {2'b00, segs[s].b};
      r[4] = {2'b00, segs[s].c};
      for (int i = 0; i < 5; i++) begin
        @(negedge clk); hdr_push = 1; hdr_wdata = r[i];
      end
      for (int k = 0; k < NN; k++) begin
        @(negedge clk); hdr_push = 0; dat_push = 1; dat_wdata = {1'b0, segs[s].inj[k], segs[s].v[k]};
      end
      @(negedge clk) dat_push = 0;
    end
    chk(!hdr_full && !dat_full, "model fits the FIFOs");
  endtask

  task automatic predict();
    for (int s = 0; s < NSEG; s++) begin
      fp64_t nv[NN];
      for (int k = 0; k < NN; k++) begin
        fp64_t vm, vp, r;
        vm = (k == 0) ? ((segs[s].st_s != 0) ? cnv[segs[s].idx_s] : segs[s].v[0]) : segs[s].v[k-1];
        vp = (k == NN - 1) ? ((segs[s].st_e != 0) ? cnv[segs[s].idx_e] : segs[s].v[k]) : segs[s].v[k+1];
        r = ref_add(ref_mul(ref_add(vm, vp), segs[s].a), ref_add(ref_mul(segs[s].v[k], segs[s].b), segs[s].c));
        if (segs[s].inj[k]) r = ref_add(r, d_inj);
        nv[k] = r;
        exp_wb.push_back({1'b0, segs[s].inj[k], r});
      end
      if (segs[s].st_s != 0)
        exp_req.push_back('{cni: cni_of(segs[s].idx_s), status: segs[s].st_s, volt: segs[s].v[0]});
      if (segs[s].st_e != 0)
        exp_req.push_back('{cni: cni_of(segs[s].idx_e), status: segs[s].st_e, volt: segs[s].v[NN-1]});
      segs[s].v = nv;
    end
  endtask

  int t[2], t0;
  initial begin
    cycle_start = 0; hdr_push = 0; dat_push = 0; cn_init_we = 0; rsp_valid = 0;
    rsp = '0; hdr_wdata = '0; dat_wdata = '0; cn_init_idx = 0; cn_init_cni = 0; cn_init_volt = 0;
    d_inj = r2b(1.25);
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_and_load();
    for (int k = 0; k < 2; k++) begin
      predict();
      @(negedge clk) cycle_start = 1;
      t0 = $time / 10;
      @(negedge clk) cycle_start = 0;
      while (!cycle_end) @(negedge clk);
      t[k] = $time / 10 - t0;
      $display("step %0d: %0d clocks, sum(10+N) = %0d, requests so far %0d", k, t[k], NSEG * (10 + NN), n_req);
      chk(exp_wb.size() == 0, "all rows written back");
      chk(exp_req.size() == 0, "all requests sent");
    end
    chk(t[0] == t[1], "same step time in both steps");
    chk(t[0] >= NSEG * (10 + NN) && t[0] < NSEG * (10 + NN) + 64, "step time sum(10+N) plus drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
