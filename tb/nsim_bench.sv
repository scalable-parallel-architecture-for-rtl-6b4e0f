// nsim_bench: end-to-end bench of the base unit (nsim_top), used by
// tb_nsim_top (reduced sizes) and tb_nsim_full (all defaults).
//
// It builds NCELL neurons of seven dendritic segments each: segment 0 joins
// the soma to common node CN1; segments 1 and 2 are the children of CN1 and
// end in CN2 and CN3 (as their parent); segments 3 to 6 are the children of
// CN2 and CN3 and have open distal ends, except that in every fifth cell the
// last segment ends in a common node of another unit, reached through the
// switch's uplink. The segments of a cell are spread over the three DSPs, so
// every common node collects requests from several DSPs. Somas are
// Hodgkin-Huxley somas; some distal compartments carry an injection term.
//
// The testbench loads the Segment Definition Packets, the DSPs' common node
// memories and the CNP and SP tables, then runs STEPS simulation steps. It
// plays the higher-level switch: every request leaving through the uplink is
// answered on up_in a few clocks later. A reference model computes every
// compartment, common node and soma each step; written-back compartments
// and broadcast responses are compared with it (relative tolerance 1e-9,
// because the CNP sums the three terms of a common node in their arrival
// order). Each step's length must lie between the busiest DSP's
// sum(10 + N) and that plus 130 clocks of pipeline drain (with the default
// 11-clock arithmetic the soma path alone adds 55 + 56 clocks). Each mechanism is counted,
// and one that never happened counts as a failure.
module nsim_bench
  import nsim_pkg::*;
  import tb_util_pkg::*;
#(
  parameter bit FULL  = 1'b0,   // instantiate the top with its defaults
  parameter int NCELL = 12,
  parameter int NMIN  = 2,
  parameter int NMAX  = 6,
  parameter int STEPS = 6
) ();
  localparam int N_DSP = 3;
  localparam logic [31:0] CND = 32'h2000, UPB = 32'h4000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sdp_valid, sdp_ready, cn_init_we, cnp_cfg_we, sp_cfg_we, cycle_start, end_of_cycle;
  logic rsp_valid, up_out_empty, up_out_pop, up_in_valid;
  logic [1:0] sdp_dsp, cn_init_dsp;
  sdp_row_t sdp_row, wb_row[N_DSP];
  logic [7:0] cn_init_idx;
  logic [31:0] cn_init_cni;
  fp64_t cn_init_volt, cnp_cfg_data, sp_cfg_data, cnp_mon_v0, d_inj[N_DSP];
  cn_cfg_e cnp_cfg_sel;
  logic [10:0] cnp_cfg_addr, cnp_mon_addr;
  sp_cfg_e sp_cfg_sel;
  gate_e sp_cfg_gate;
  logic [15:0] sp_cfg_addr;
  logic [N_DSP-1:0] wb_valid;
  msg_t rsp, up_out_data, up_in;

  if (FULL) begin : g_full
    nsim_top dut (.*);
  end else begin : g_small
    nsim_top #(.FIFO_DEPTH(512), .CN_NODES(64), .N_SOMA(16)) dut (
      .clk, .rst_n, .sdp_valid, .sdp_ready, .sdp_dsp, .sdp_row, .cn_init_we, .cn_init_dsp,
      .cn_init_idx, .cn_init_cni, .cn_init_volt, .cnp_cfg_we, .cnp_cfg_sel,
      .cnp_cfg_addr(cnp_cfg_addr[5:0]), .cnp_cfg_data, .sp_cfg_we, .sp_cfg_sel, .sp_cfg_gate,
      .sp_cfg_addr, .sp_cfg_data, .d_inj, .cycle_start, .end_of_cycle, .wb_valid, .wb_row,
      .rsp_valid, .rsp, .cnp_mon_addr(cnp_mon_addr[5:0]), .cnp_mon_v0, .up_out_empty,
      .up_out_data, .up_out_pop, .up_in_valid, .up_in);
  end

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic bit near(input fp64_t a, input fp64_t b);
    real x, y, d;
    x = b2r(a); y = b2r(b); d = x - y;
    if (d < 0.0) d = -d;
    return d <= 1.0e-9 * ((x < 0.0 ? -x : x) + (y < 0.0 ? -y : y) + 1.0e-6);
  endfunction

  // ---------------- model ----------------
  typedef struct {
    int dsp, n;
    logic [1:0] st_s, st_e;
    logic [31:0] cni_s, cni_e;
    fp64_t a, b, c;
    fp64_t v[$];
    bit inj[$];
  } seg_t;
  seg_t segs[$];
  fp64_t cnv[logic [31:0]];                 // model voltage of every common node / soma
  int cam[N_DSP][logic [31:0]];             // per-DSP index of each CNI
  int cam_n[N_DSP];
  typedef struct { fp64_t ac, bc, cc, dc, ec; } cn_t;
  cn_t cnc[logic [31:0]];
  soma_t sm[NCELL];

  int n_open = 0, n_conn = 0, n_inj = 0, n_par = 0, n_c1 = 0, n_c2 = 0, n_soma_req = 0,
      n_up_req = 0, n_up_rsp = 0, n_cn_rsp = 0, n_sp_rsp = 0, n_contend = 0, n_both = 0,
      n_eoc = 0, n_sdp_rows = 0;

  function automatic int idx_of(input int d, input logic [31:0] cni);
    if (!cam[d].exists(cni)) begin cam[d][cni] = cam_n[d]; cam_n[d]++; end
    return cam[d][cni];
  endfunction

  function automatic fp64_t rnd(input real lo, input real hi);
    return r2b(lo + (hi - lo) * real'($urandom_range(1000)) / 1000.0);
  endfunction

  task automatic add_seg(input int d, input logic [1:0] ss, input logic [31:0] cs,
                         input logic [1:0] se, input logic [31:0] ce, input bit stim);
    seg_t g;
    g.dsp = d; g.n = $urandom_range(NMIN, NMAX);
    g.st_s = ss; g.cni_s = cs; g.st_e = se; g.cni_e = ce;
    g.a = rnd(0.05, 0.15);
    g.b = rnd(0.6, 0.85);
    g.c = rnd(0.0, 0.01);
    for (int k = 0; k < g.n; k++) begin
      g.v.push_back(rnd(-5.0, 20.0));
      g.inj.push_back(stim && k == g.n - 1);
    end
    segs.push_back(g);
  endtask

  task automatic build();
    for (int c = 0; c < NCELL; c++) begin
      logic [31:0] cn1, cn2, cn3, far;
      cn1 = CND | 32'(3 * c); cn2 = CND | 32'(3 * c + 1); cn3 = CND | 32'(3 * c + 2);
      far = UPB | 32'(c);
      add_seg((c + 0) % 3, ST_PARENT, 32'(c), ST_PARENT, cn1, 0);
      add_seg((c + 1) % 3, ST_CHILD1, cn1, ST_PARENT, cn2, 0);
      add_seg((c + 2) % 3, ST_CHILD2, cn1, ST_PARENT, cn3, 0);
      add_seg((c + 0) % 3, ST_CHILD1, cn2, ST_OPEN, 32'hFFFF_FFFF, c % 2 == 0);
      add_seg((c + 1) % 3, ST_CHILD2, cn2, ST_OPEN, 32'hFFFF_FFFF, 0);
      add_seg((c + 2) % 3, ST_CHILD1, cn3, ST_OPEN, 32'hFFFF_FFFF, c % 3 == 0);
      if (c % 5 == 4) add_seg((c + 1) % 3, ST_CHILD2, cn3, ST_PARENT, far, 0);
      else            add_seg((c + 1) % 3, ST_CHILD2, cn3, ST_OPEN, 32'hFFFF_FFFF, 0);
      for (int j = 0; j < 3; j++) begin
        logic [31:0] cn;
        cn = CND | 32'(3 * c + j);
        cnc[cn] = '{ac: rnd(0.1, 0.2), bc: rnd(0.3, 0.5), cc: rnd(0.1, 0.2), dc: rnd(0.1, 0.2),
                    ec: rnd(0.0, 0.01)};
        cnv[cn] = rnd(-5.0, 20.0);
      end
      sm[c] = soma_init(0.01, 1.0, 0.3, 0.5);
      cnv[32'(c)] = sm[c].v0;
      if (c % 5 == 4) cnv[far] = rnd(-5.0, 20.0);
    end
  endtask

  task automatic send_row(input int d, input sdp_row_t r);
    @(negedge clk);
    sdp_valid = 1; sdp_dsp = 2'(d); sdp_row = r;
    @(posedge clk);
    while (!sdp_ready) @(posedge clk);
    n_sdp_rows++;
  endtask

  task automatic load();
    foreach (segs[s]) begin
      int is, ie;
      is = (segs[s].st_s != ST_OPEN) ? idx_of(segs[s].dsp, segs[s].cni_s) : 0;
      ie = (segs[s].st_e != ST_OPEN) ? idx_of(segs[s].dsp, segs[s].cni_e) : 0;
      send_row(segs[s].dsp, {segs[s].st_s, 16'd0, 8'(segs[s].n), 8'(is), segs[s].cni_s});
      send_row(segs[s].dsp, {segs[s].st_e, 16'd0, 8'd0, 8'(ie), segs[s].cni_e});
      send_row(segs[s].dsp, {2'b00, segs[s].a});
      send_row(segs[s].dsp, {2'b00, segs[s].b});
      send_row(segs[s].dsp, {2'b00, segs[s].c});
      for (int k = 0; k < segs[s].n; k++)
        send_row(segs[s].dsp, {1'b0, segs[s].inj[k], segs[s].v[k]});
    end
    @(negedge clk) sdp_valid = 0;
    for (int d = 0; d < N_DSP; d++) begin
      chk(cam_n[d] <= 256, "common node memory size");
      foreach (cam[d][cni]) begin
        @(negedge clk);
        cn_init_we = 1; cn_init_dsp = 2'(d); cn_init_idx = 8'(cam[d][cni]); cn_init_cni = cni;
        cn_init_volt = cnv[cni];
      end
    end
    @(negedge clk) cn_init_we = 0;
    foreach (cnc[cn]) begin
      fp64_t vals[6];
      vals = '{cnc[cn].ac, cnc[cn].bc, cnc[cn].cc, cnc[cn].dc, cnc[cn].ec, cnv[cn]};
      for (int i = 0; i < 6; i++) begin
        @(negedge clk);
        cnp_cfg_we = 1; cnp_cfg_sel = cn_cfg_e'(i); cnp_cfg_addr = cn[10:0]; cnp_cfg_data = vals[i];
      end
    end
    @(negedge clk) cnp_cfg_we = 0;
    hh_init(0.01);
    for (int i = 0; i < 2048; i++)
      for (int g = 0; g < 3; g++) begin
        sp_cfg(SP_LUT_A, gate_e'(g), i, hh_a[g][i]);
        sp_cfg(SP_LUT_B, gate_e'(g), i, hh_b[g][i]);
      end
    sp_cfg(SP_GBAR_K, GATE_N, 0, sm[0].gbar_k);
    sp_cfg(SP_GBAR_NA, GATE_N, 0, sm[0].gbar_na);
    for (int c = 0; c < NCELL; c++) begin
      sp_cfg(SP_AS, GATE_N, c, sm[c].as_); sp_cfg(SP_BS, GATE_N, c, sm[c].bs_);
      sp_cfg(SP_CS, GATE_N, c, sm[c].cs_); sp_cfg(SP_DS, GATE_N, c, sm[c].ds_);
      sp_cfg(SP_ES, GATE_N, c, sm[c].es_); sp_cfg(SP_FS, GATE_N, c, sm[c].fs_);
      sp_cfg(SP_V0, GATE_N, c, sm[c].v0);  sp_cfg(SP_GK, GATE_N, c, sm[c].gk);
      sp_cfg(SP_GNA, GATE_N, c, sm[c].gna);
      sp_cfg(SP_N, GATE_N, c, sm[c].n); sp_cfg(SP_M, GATE_N, c, sm[c].m);
      sp_cfg(SP_H, GATE_N, c, sm[c].h);
    end
    @(negedge clk) sp_cfg_we = 0;
  endtask

  task automatic sp_cfg(input sp_cfg_e s, input gate_e g, input int a, input fp64_t d);
    @(negedge clk);
    sp_cfg_we = 1; sp_cfg_sel = s; sp_cfg_gate = g; sp_cfg_addr = 16'(a); sp_cfg_data = d;
  endtask

  // expected outputs of one step
  sdp_row_t exp_wb[N_DSP][$];
  fp64_t exp_rsp[logic [31:0]];
  int busy[N_DSP];

  task automatic predict();
    fp64_t par[logic [31:0]], ch1[logic [31:0]], ch2[logic [31:0]];
    for (int d = 0; d < N_DSP; d++) busy[d] = 0;
    exp_rsp.delete();
    foreach (segs[s]) begin
      fp64_t nv[$];
      busy[segs[s].dsp] += 10 + segs[s].n;
      for (int k = 0; k < segs[s].n; k++) begin
        fp64_t vm, vp, r;
        vm = (k == 0) ? ((segs[s].st_s != ST_OPEN) ? cnv[segs[s].cni_s] : segs[s].v[0]) : segs[s].v[k-1];
        vp = (k == segs[s].n - 1) ? ((segs[s].st_e != ST_OPEN) ? cnv[segs[s].cni_e] : segs[s].v[k])
                                  : segs[s].v[k+1];
        r = ref_add(ref_mul(ref_add(vm, vp), segs[s].a), ref_add(ref_mul(segs[s].v[k], segs[s].b), segs[s].c));
        if (segs[s].inj[k]) begin r = ref_add(r, d_inj[segs[s].dsp]); n_inj++; end
        nv.push_back(r);
        exp_wb[segs[s].dsp].push_back({1'b0, segs[s].inj[k], r});
      end
      for (int e = 0; e < 2; e++) begin
        logic [1:0] st;
        logic [31:0] cni;
        fp64_t v;
        st  = e ? segs[s].st_e : segs[s].st_s;
        cni = e ? segs[s].cni_e : segs[s].cni_s;
        v   = e ? segs[s].v[segs[s].n - 1] : segs[s].v[0];
        if (st == ST_OPEN) begin n_open++; continue; end
        n_conn++;
        if (cni < 32'(NCELL)) exp_rsp[cni] = soma_step(sm[cni], v);
        else if ((cni & UPB) == UPB) exp_rsp[cni] = ref_add(ref_mul(v, r2b(0.5)), r2b(1.0));
        else if (st == ST_PARENT) par[cni] = v;
        else if (st == ST_CHILD1) ch1[cni] = v;
        else ch2[cni] = v;
      end
      segs[s].v = nv;
    end
    foreach (cnc[cn]) begin
      fp64_t t1, t2, t3;
      t1 = ref_add(ref_mul(cnc[cn].ac, par[cn]), ref_mul(cnc[cn].bc, cnv[cn]));
      t2 = ref_add(ref_mul(cnc[cn].cc, ch1[cn]), cnc[cn].ec);
      t3 = ref_mul(cnc[cn].dc, ch2[cn]);
      exp_rsp[cn] = ref_add(ref_add(t3, t2), t1);
    end
  endtask

  // write-backs and responses
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < N_DSP; d++) if (wb_valid[d]) begin
      sdp_row_t e;
      e = exp_wb[d].pop_front();
      chk(wb_row[d][65:64] == e[65:64] && near(wb_row[d][63:0], e[63:0]),
          $sformatf("DSP %0d write-back %h exp %h", d, wb_row[d], e));
    end
    if (rsp_valid) begin
      chk(exp_rsp.exists(rsp.cni), $sformatf("unexpected response for %h", rsp.cni));
      if (exp_rsp.exists(rsp.cni)) begin
        chk(near(rsp.volt, exp_rsp[rsp.cni]), $sformatf("response %h: %f exp %f", rsp.cni,
            b2r(rsp.volt), b2r(exp_rsp[rsp.cni])));
        cnv[rsp.cni] = exp_rsp[rsp.cni];
        exp_rsp.delete(rsp.cni);
      end
      if (rsp.cni < 32'(NCELL)) n_sp_rsp++;
      else if ((rsp.cni & UPB) == UPB) n_up_rsp++;
      else n_cn_rsp++;
    end
  end

  // mechanism counters inside the unit
  always @(posedge clk) if (rst_n) begin
    int ne;
    ne = 0;
    for (int d = 0; d < N_DSP; d++) ne += int'(!dut_req_empty[d]);
    if (ne > 1) n_contend++;
    if (!dut_cnp_out_empty && !dut_sp_out_empty) n_both++;
    if (dut_cnp_req_valid) case (dut_cnp_req_status)
      ST_PARENT: n_par++;
      ST_CHILD1: n_c1++;
      default:   n_c2++;
    endcase
    if (dut_sp_req_valid) n_soma_req++;
  end
  // rising edges of end_of_cycle, sampled between clock edges
  always @(negedge clk) if (rst_n) begin
    if (end_of_cycle && !eoc_q) n_eoc++;
    eoc_q = end_of_cycle;
  end
  logic [N_DSP-1:0] dut_req_empty;
  logic dut_cnp_out_empty, dut_sp_out_empty, dut_cnp_req_valid, dut_sp_req_valid, eoc_armed, eoc_q = 1'b1;
  logic [1:0] dut_cnp_req_status;
  if (FULL) begin : g_probe_full
    assign dut_req_empty      = g_full.dut.req_empty;
    assign dut_cnp_out_empty  = g_full.dut.cnp_out_empty;
    assign dut_sp_out_empty   = g_full.dut.sp_out_empty;
    assign dut_cnp_req_valid  = g_full.dut.cnp_req_valid;
    assign dut_cnp_req_status = g_full.dut.cnp_req.status;
    assign dut_sp_req_valid   = g_full.dut.sp_req_valid;
  end else begin : g_probe_small
    assign dut_req_empty      = g_small.dut.req_empty;
    assign dut_cnp_out_empty  = g_small.dut.cnp_out_empty;
    assign dut_sp_out_empty   = g_small.dut.sp_out_empty;
    assign dut_cnp_req_valid  = g_small.dut.cnp_req_valid;
    assign dut_cnp_req_status = g_small.dut.cnp_req.status;
    assign dut_sp_req_valid   = g_small.dut.sp_req_valid;
  end

  // the higher-level switch: answer each uplink request 3 clocks later
  msg_t up_q[$];
  int up_t[$];
  assign up_out_pop = !up_out_empty;
  always @(posedge clk) if (rst_n && up_out_pop) begin
    msg_t m;
    m = up_out_data;
    m.volt = ref_add(ref_mul(m.volt, r2b(0.5)), r2b(1.0));
    up_q.push_back(m); up_t.push_back(cyc + 3);
    n_up_req++;
  end
  always @(negedge clk) begin
    up_in_valid = 0;
    if (up_q.size() > 0 && cyc >= up_t[0]) begin
      up_in_valid = 1; up_in = up_q.pop_front(); void'(up_t.pop_front());
    end
  end

  initial begin
    sdp_valid = 0; sdp_dsp = 0; sdp_row = '0; cn_init_we = 0; cn_init_dsp = 0; cn_init_idx = 0;
    cn_init_cni = 0; cn_init_volt = 0; cnp_cfg_we = 0; cnp_cfg_sel = CN_AC; cnp_cfg_addr = 0;
    cnp_cfg_data = 0; sp_cfg_we = 0; sp_cfg_sel = SP_AS; sp_cfg_gate = GATE_N; sp_cfg_addr = 0;
    sp_cfg_data = 0; cycle_start = 0; cnp_mon_addr = 0; up_in = '0; eoc_armed = 0;
    d_inj = '{r2b(2.0), r2b(1.5), r2b(-0.5)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    build();
    load();
    $display("%0d cells, %0d segments, %0d SDP rows, common node memory entries %0d/%0d/%0d",
             NCELL, segs.size(), n_sdp_rows, cam_n[0], cam_n[1], cam_n[2]);
    repeat (5) @(negedge clk);
    for (int st = 0; st < STEPS; st++) begin
      int t0, t, bmax;
      predict();
      bmax = 0;
      for (int d = 0; d < N_DSP; d++) if (busy[d] > bmax) bmax = busy[d];
      @(negedge clk) cycle_start = 1; t0 = cyc;
      @(negedge clk) cycle_start = 0;
      chk(!end_of_cycle, "end_of_cycle low after cycle_start");
      eoc_armed = 1;
      while (!(end_of_cycle && up_q.size() == 0)) @(negedge clk);
      eoc_armed = 0;
      t = cyc - t0;
      chk(exp_rsp.size() == 0, $sformatf("%0d responses missing", exp_rsp.size()));
      for (int d = 0; d < N_DSP; d++) chk(exp_wb[d].size() == 0, "all compartments written back");
      chk(t >= bmax && t <= bmax + 130, $sformatf("step time %0d vs busiest DSP %0d", t, bmax));
      $display("step %0d: %0d clocks, busiest DSP sum(10+N) = %0d, soma 0 at %f mV", st, t, bmax,
               b2r(cnv[32'd0]));
    end
    repeat (2) @(negedge clk);
    $display("mechanisms: open ends %0d, connected ends %0d, injections %0d, parent/child1/child2 requests %0d/%0d/%0d,",
             n_open, n_conn, n_inj, n_par, n_c1, n_c2);
    $display("  soma requests %0d, uplink requests %0d, uplink responses %0d, CNP responses %0d, SP responses %0d,",
             n_soma_req, n_up_req, n_up_rsp, n_cn_rsp, n_sp_rsp);
    $display("  clocks with competing DSP requests %0d, clocks with CNP and SP responses pending %0d, end of cycle %0d",
             n_contend, n_both, n_eoc);
    chk(n_open > 0, "open ends");
    chk(n_conn > 0, "connected ends");
    chk(n_inj > 0, "injection");
    chk(n_par > 0 && n_c1 > 0 && n_c2 > 0, "requests of every status");
    chk(n_soma_req == NCELL * STEPS && n_sp_rsp == NCELL * STEPS, "soma requests and responses");
    chk(n_up_req > 0 && n_up_req == n_up_rsp, "uplink requests and responses");
    chk(n_cn_rsp == 3 * NCELL * STEPS, "common node responses");
    chk(n_contend > 0, "switch contention");
    chk(n_both > 0, "CNP/SP response arbitration");
    chk(n_eoc == STEPS, "end of cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
