// tb_dsp: end-to-end test of one dendrite segment processor.
//
// Loads random segments (1..7 nodes, open or connected ends with all four
// statuses, random injection flags), initialises the common node memory, and
// runs three simulation steps. A reference model computes each compartment's
// new voltage with the same floating point operation order, using the end
// node rule (common node voltage when connected, copy of the end node when
// open) and the injection term; the written-back rows must match bit for bit
// and in order. The requests in the output buffer must name the right CNI
// and status and carry the adjacent node's voltage of the step start. Between
// steps the testbench answers every request through the response port and
// the model follows. Timing: the step time minus sum(10 + N_i) must be the
// same for two different segment sets (10 + N clocks per segment).
module tb_dsp;
  import nsim_pkg::*;
  import tb_util_pkg::*;
  localparam int AL = 2, ML = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cycle_start, cycle_end, hdr_push, dat_push, hdr_full, dat_full, cn_init_we;
  sdp_row_t hdr_wdata, dat_wdata, wb_row;
  logic [7:0] cn_init_idx;
  logic [31:0] cn_init_cni;
  fp64_t cn_init_volt, d_inj;
  logic rsp_valid, req_empty, req_pop, wb_valid;
  msg_t rsp, req_data;

  dsp #(.FIFO_DEPTH(256), .OUT_DEPTH(16), .ADD_LAT(AL), .MUL_LAT(ML)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- model ----------------
  typedef struct {
    int n;
    logic [1:0] st_s, st_e;
    logic [31:0] cni_s, cni_e;
    logic [7:0] idx_s, idx_e;
    fp64_t a, b, c;
    fp64_t v[$];
    bit inj[$];
  } seg_t;
  seg_t segs[$];
  fp64_t cnv [256];     // model of the common node memory by index
  logic [31:0] cntag [256];

  sdp_row_t exp_wb[$];
  msg_t exp_req[$];
  msg_t got_req[$];

  always @(posedge clk) if (rst_n && wb_valid) begin
    sdp_row_t e;
    e = exp_wb.pop_front();
    chk(wb_row == e, $sformatf("wb row got %h exp %h", wb_row, e));
  end
  always @(posedge clk) if (rst_n && req_pop) got_req.push_back(req_data);
  assign req_pop = !req_empty;

  task automatic build(input int nseg, input int seed_base);
    segs.delete();
    for (int s = 0; s < nseg; s++) begin
      seg_t g;
      g.n = 1 + $urandom_range(6);
      g.st_s = (s % 3 == 0) ? 2'b00 : 2'($urandom_range(1, 3));
      g.st_e = (s % 4 == 1) ? 2'b00 : 2'($urandom_range(1, 3));
      g.idx_s = 8'(2 * s);      g.cni_s = 32'h2000 + 32'(seed_base + 2 * s);
      g.idx_e = 8'(2 * s + 1);  g.cni_e = 32'h2000 + 32'(seed_base + 2 * s + 1);
      g.a = r2b(0.05 + 0.01 * real'($urandom_range(10)));
      g.b = r2b(0.85 + 0.01 * real'($urandom_range(5)));
      g.c = r2b(0.001 * real'($urandom_range(10)));
      for (int k = 0; k < g.n; k++) begin
        g.v.push_back(r2b(-10.0 + real'($urandom_range(300)) / 3.0));
        g.inj.push_back(($urandom_range(3) == 0));
      end
      segs.push_back(g);
    end
  endtask

  task automatic load();
    for (int s = 0; s < segs.size(); s++) begin
      sdp_row_t r[5];
      r[0] = {segs[s].st_s, 16'd0, 8'(segs[s].n), segs[s].idx_s, segs[s].cni_s};
      r[1] = {segs[s].st_e, 16'd0, 8'd0, segs[s].idx_e, segs[s].cni_e};
      r[2] = {2'b00, segs[s].a};
      r[3] = {2'b00, segs[s].b};
      r[4] = {2'b00, segs[s].c};
      for (int i = 0; i < 5; i++) begin
        @(negedge clk); hdr_push = 1; hdr_wdata = r[i];
      end
      @(negedge clk) hdr_push = 0;
      for (int k = 0; k < segs[s].n; k++) begin
        @(negedge clk); dat_push = 1; dat_wdata = {1'b0, segs[s].inj[k], segs[s].v[k]};
      end
      @(negedge clk) dat_push = 0;
      // common node memory entries of the two ends
      @(negedge clk); cn_init_we = 1; cn_init_idx = segs[s].idx_s; cn_init_cni = segs[s].cni_s;
      cn_init_volt = r2b(real'($urandom_range(100)) - 20.0);
      cnv[segs[s].idx_s] = cn_init_volt; cntag[segs[s].idx_s] = segs[s].cni_s;
      @(negedge clk); cn_init_idx = segs[s].idx_e; cn_init_cni = segs[s].cni_e;
      cn_init_volt = r2b(real'($urandom_range(100)) - 20.0);
      cnv[segs[s].idx_e] = cn_init_volt; cntag[segs[s].idx_e] = segs[s].cni_e;
      @(negedge clk) cn_init_we = 0;
    end
  endtask

  // expected results of one step; updates the model's node voltages
  task automatic predict();
    for (int s = 0; s < segs.size(); s++) begin
      fp64_t nv[$];
      for (int k = 0; k < segs[s].n; k++) begin
        fp64_t vm, vp, r;
        vm = (k == 0) ? ((segs[s].st_s != 0) ? cnv[segs[s].idx_s] : segs[s].v[0]) : segs[s].v[k-1];
        vp = (k == segs[s].n - 1) ? ((segs[s].st_e != 0) ? cnv[segs[s].idx_e] : segs[s].v[k])
                                  : segs[s].v[k+1];
        r = ref_add(ref_mul(ref_add(vm, vp), segs[s].a), ref_add(ref_mul(segs[s].v[k], segs[s].b), segs[s].c));
        if (segs[s].inj[k]) r = ref_add(r, d_inj);
        nv.push_back(r);
        exp_wb.push_back({1'b0, segs[s].inj[k], r});
      end
      if (segs[s].st_s != 0) exp_req.push_back('{cni: segs[s].cni_s, status: segs[s].st_s, volt: segs[s].v[0]});
      if (segs[s].st_e != 0) exp_req.push_back('{cni: segs[s].cni_e, status: segs[s].st_e, volt: segs[s].v[segs[s].n-1]});
      segs[s].v = nv;
    end
  endtask

  task automatic step(output int t);
    int t0;
    predict();
    @(negedge clk) cycle_start = 1;
    t0 = $time / 10;
    @(negedge clk) cycle_start = 0;
    chk(!cycle_end, "cycle_end low after start");
    while (!cycle_end) @(negedge clk);
    t = $time / 10 - t0;
    chk(exp_wb.size() == 0, "all rows written back");
    chk(got_req.size() == exp_req.size(), $sformatf("request count %0d vs %0d", got_req.size(), exp_req.size()));
    while (exp_req.size() > 0 && got_req.size() > 0) begin
      msg_t g, e;
      g = got_req.pop_front(); e = exp_req.pop_front();
      chk(g == e, $sformatf("request got %h exp %h", g, e));
    end
    exp_req.delete(); got_req.delete();
    // answer: new voltage for every CNI, broadcast one per clock
    for (int i = 0; i < 2 * segs.size(); i++) begin
      @(negedge clk);
      rsp_valid = 1;
      rsp = '{cni: cntag[i], status: 2'b00, volt: r2b(real'($urandom_range(1000)) / 9.0)};
      for (int j = 0; j < 256; j++) if (cntag[j] == rsp.cni) cnv[j] = rsp.volt;
    end
    @(negedge clk) rsp_valid = 0;
  endtask

  int sum_a, sum_b, ta, tb;
  initial begin
    cycle_start = 0; hdr_push = 0; dat_push = 0; cn_init_we = 0; rsp_valid = 0;
    rsp = '0; hdr_wdata = '0; dat_wdata = '0; cn_init_idx = 0; cn_init_cni = 0; cn_init_volt = 0;
    d_inj = r2b(1.25);
    for (int j = 0; j < 256; j++) cntag[j] = 32'hFFFF_FFFF;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // set A
    build(5, 0); load();
    sum_a = 0; foreach (segs[s]) sum_a += 10 + segs[s].n;
    for (int k = 0; k < 3; k++) begin
      step(ta);
      $display("step %0d: %0d clocks, sum(10+N) = %0d", k, ta, sum_a);
    end
    // set B after reset
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    for (int j = 0; j < 256; j++) cntag[j] = 32'hFFFF_FFFF;
    build(9, 40); load();
    sum_b = 0; foreach (segs[s]) sum_b += 10 + segs[s].n;
    step(tb);
    $display("set B: %0d clocks, sum(10+N) = %0d", tb, sum_b);
    chk(ta - sum_a == tb - sum_b, "10 + N clocks per segment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
