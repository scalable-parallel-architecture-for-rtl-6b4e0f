// tb_sp: soma processor with 4 Hodgkin-Huxley somas (time step 0.01 ms).
// Somas 0 and 2 receive a depolarised dendritic voltage (40 mV on the
// command scale) through their requests, somas 1 and 3 receive 0 mV. Each
// simulation step sends one request per soma back to back, pops the
// responses with random stalls and waits for idle, as the end-of-cycle logic
// would. Every response (CNI and new voltage) is compared bit-exact with a
// model of the soma voltage and conductance processors; the conductance
// feedback from one step to the next is therefore checked as well. The test
// also checks that the stimulated somas fire action potentials, that the
// others stay near rest, and that idle is low while work is pending. With
// the default 11-clock adders and multipliers the unit must go idle 111
// clocks after the last request is taken (55 for the SVP, 56 for the SCP).
module tb_sp;
  import nsim_pkg::*;
  import tb_util_pkg::*;
  localparam int NS = 4, STEPS = 1200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, req_valid, out_empty, out_pop, idle;
  sp_cfg_e cfg_sel;
  gate_e cfg_gate;
  logic [15:0] cfg_addr;
  fp64_t cfg_data;
  msg_t req, out_data;
  sp #(.N_SOMA(NS), .OUT_DEPTH(8)) dut (.*);

  soma_t sm[NS];
  fp64_t v1[NS];
  int checks = 0, failures = 0, spikes[NS], cyc = 0, t_last;
  always @(posedge clk) cyc <= cyc + 1;
  real vmax[NS];
  bit above[NS];
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic cfg(input sp_cfg_e s, input gate_e g, input int a, input fp64_t d);
    @(negedge clk);
    cfg_we = 1; cfg_sel = s; cfg_gate = g; cfg_addr = 16'(a); cfg_data = d;
    @(negedge clk) cfg_we = 0;
  endtask

  msg_t exp_q[$];
  always @(posedge clk) if (rst_n && out_pop) begin
    msg_t e;
    e = exp_q.pop_front();
    chk(out_data.cni == e.cni && out_data.volt == e.volt,
        $sformatf("rsp %0d %h exp %0d %h", out_data.cni, out_data.volt, e.cni, e.volt));
  end
  always @(negedge clk) out_pop = !out_empty && ($urandom_range(3) != 0);

  initial begin
    cfg_we = 0; req_valid = 0; req = '0; cfg_sel = SP_AS; cfg_gate = GATE_N; cfg_addr = 0;
    cfg_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    hh_init(0.01);
    for (int i = 0; i < 2048; i++)
      for (int g = 0; g < 3; g++) begin
        cfg(SP_LUT_A, gate_e'(g), i, hh_a[g][i]);
        cfg(SP_LUT_B, gate_e'(g), i, hh_b[g][i]);
      end
    for (int s = 0; s < NS; s++) begin
      sm[s] = soma_init(0.01, 1.0, 0.3, 0.5);
      v1[s] = r2b((s % 2 == 0) ? 40.0 : 0.0);
      cfg(SP_AS, GATE_N, s, sm[s].as_); cfg(SP_BS, GATE_N, s, sm[s].bs_);
      cfg(SP_CS, GATE_N, s, sm[s].cs_); cfg(SP_DS, GATE_N, s, sm[s].ds_);
      cfg(SP_ES, GATE_N, s, sm[s].es_); cfg(SP_FS, GATE_N, s, sm[s].fs_);
      cfg(SP_V0, GATE_N, s, sm[s].v0);  cfg(SP_GK, GATE_N, s, sm[s].gk);
      cfg(SP_GNA, GATE_N, s, sm[s].gna);
      cfg(SP_N, GATE_N, s, sm[s].n); cfg(SP_M, GATE_N, s, sm[s].m); cfg(SP_H, GATE_N, s, sm[s].h);
      vmax[s] = -100.0; spikes[s] = 0; above[s] = 0;
    end
    cfg(SP_GBAR_K, GATE_N, 0, sm[0].gbar_k);
    cfg(SP_GBAR_NA, GATE_N, 0, sm[0].gbar_na);
    chk(idle, "idle after configuration");
    for (int st = 0; st < STEPS; st++) begin
      for (int s = 0; s < NS; s++) begin
        fp64_t v;
        @(negedge clk);
        req_valid = 1; req = '{cni: 32'(s), status: ST_OPEN, volt: v1[s]};
        v = soma_step(sm[s], v1[s]);
        exp_q.push_back('{cni: 32'(s), status: ST_OPEN, volt: v});
        if (b2r(v) > vmax[s]) vmax[s] = b2r(v);
        if (b2r(v) > 50.0 && !above[s]) spikes[s]++;
        above[s] = b2r(v) > 50.0;
      end
      @(negedge clk) req_valid = 0;
      t_last = cyc - 1;
      chk(!idle, "busy after requests");
      while (!idle) @(negedge clk);
      // idle once both sub-processors have finished the last request:
      // SVP depth 3*ADD_LAT + 2*MUL_LAT plus SCP depth 1 + ADD_LAT + 4*MUL_LAT
      chk(cyc - t_last == 111 + 1, $sformatf("idle %0d clocks after the last request", cyc - t_last));
      chk(exp_q.size() == 0, "all responses before idle");
    end
    for (int s = 0; s < NS; s++)
      $display("soma %0d: spikes %0d, peak %f mV", s, spikes[s], vmax[s]);
    chk(spikes[0] >= 1 && spikes[2] >= 1, "stimulated somas fire");
    chk(spikes[1] == 0 && spikes[3] == 0 && vmax[1] < 5.0, "unstimulated somas rest");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
