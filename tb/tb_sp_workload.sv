// tb_sp_workload: the soma-only workload, 4000 Hodgkin-Huxley somas on one
// soma processor with every parameter at its default (4096 somas, 11-clock
// adders and multipliers). Each simulation step sends one request per soma
// on consecutive clocks, as a switch would deliver them, and reads every
// response as soon as it appears. The step time, from the first request to
// SP idle, must be 4000 + 55 + 56 = 4111 clocks: one soma per clock plus the
// depths of the voltage and conductance pipelines. Every response is
// compared bit-exact with the soma model of tb_util_pkg, so the conductances
// carried from one step to the next are checked too. A third of the somas
// see a depolarised dendritic voltage (40 mV on the command scale); the rest
// see a voltage between 0 and 10 mV.
module tb_sp_workload;
  import nsim_pkg::*;
  import tb_util_pkg::*;
  localparam int NS = 4000, STEPS = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, req_valid, out_empty, out_pop, idle;
  sp_cfg_e cfg_sel;
  gate_e cfg_gate;
  logic [15:0] cfg_addr;
  fp64_t cfg_data;
  msg_t req, out_data;
  sp dut (.*);

  soma_t sm[NS];
  fp64_t v1[NS];
  int checks = 0, failures = 0, cyc = 0, t_first, n_rsp = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (1000000) @(posedge clk);
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
    n_rsp++;
    chk(out_data.cni == e.cni && out_data.volt == e.volt,
        $sformatf("rsp %0d %h exp %0d %h", out_data.cni, out_data.volt, e.cni, e.volt));
  end
  always @(negedge clk) out_pop = !out_empty;

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
      v1[s] = r2b((s % 3 == 0) ? 40.0 : $urandom_range(100) / 10.0);
      cfg(SP_AS, GATE_N, s, sm[s].as_); cfg(SP_BS, GATE_N, s, sm[s].bs_);
      cfg(SP_CS, GATE_N, s, sm[s].cs_); cfg(SP_DS, GATE_N, s, sm[s].ds_);
      cfg(SP_ES, GATE_N, s, sm[s].es_); cfg(SP_FS, GATE_N, s, sm[s].fs_);
      cfg(SP_V0, GATE_N, s, sm[s].v0);  cfg(SP_GK, GATE_N, s, sm[s].gk);
      cfg(SP_GNA, GATE_N, s, sm[s].gna);
      cfg(SP_N, GATE_N, s, sm[s].n); cfg(SP_M, GATE_N, s, sm[s].m); cfg(SP_H, GATE_N, s, sm[s].h);
    end
    cfg(SP_GBAR_K, GATE_N, 0, sm[0].gbar_k);
    cfg(SP_GBAR_NA, GATE_N, 0, sm[0].gbar_na);
    chk(idle, "idle after configuration");
    for (int st = 0; st < STEPS; st++) begin
      for (int s = 0; s < NS; s++) begin
        @(negedge clk);
        if (s == 0) t_first = cyc;
        req_valid = 1; req = '{cni: 32'(s), status: ST_OPEN, volt: v1[s]};
        exp_q.push_back('{cni: 32'(s), status: ST_OPEN, volt: soma_step(sm[s], v1[s])});
      end
      @(negedge clk) req_valid = 0;
      chk(!idle, "busy after requests");
      while (!idle) @(negedge clk);
      $display("step %0d: %0d clocks from first request to idle", st, cyc - t_first);
      chk(cyc - t_first == NS + 111, $sformatf("step time %0d, expected %0d", cyc - t_first, NS + 111));
      chk(exp_q.size() == 0, "all responses before idle");
    end
    chk(n_rsp == NS * STEPS, $sformatf("responses %0d", n_rsp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
