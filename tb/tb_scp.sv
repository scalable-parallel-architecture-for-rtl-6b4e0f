// tb_scp: soma conductance processor with 8 somas and the Hodgkin-Huxley
// tables of all three gates (time step 0.01 ms). Random new soma voltages
// from -80 to +200 mV (covering both clamped ends of the table range) are
// applied one per clock; the reference quantises them as floor((v+64)*8),
// updates n, m and h, and forms G_K and G_Na with the hardware's rounding.
// Both conductances, the soma index and the latency 1 + ADD_LAT + 4*MUL_LAT
// are checked.
module tb_scp;
  import nsim_pkg::*;
  import tb_util_pkg::*;
  localparam int NS = 8, AL = 2, ML = 3, LAT = 1 + AL + 4 * ML;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, in_valid, out_valid;
  sp_cfg_e cfg_sel;
  gate_e cfg_gate;
  logic [15:0] cfg_addr;
  fp64_t cfg_data, in_v0, g_k, g_na;
  logic [2:0] in_idx, out_idx;
  scp #(.N_SOMA(NS), .ADD_LAT(AL), .MUL_LAT(ML)) dut (.*);

  soma_t sm[NS];
  int checks = 0, failures = 0, cyc = 0, clamped = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic cfg(input sp_cfg_e s, input gate_e g, input int a, input fp64_t d);
    @(negedge clk);
    cfg_we = 1; cfg_sel = s; cfg_gate = g; cfg_addr = 16'(a); cfg_data = d;
    @(negedge clk) cfg_we = 0;
  endtask

  fp64_t exk_q[$], exn_q[$];
  int idx_q[$], t_q[$];
  always @(posedge clk) if (rst_n && out_valid) begin
    fp64_t ek, en;
    ek = exk_q.pop_front(); en = exn_q.pop_front();
    chk(g_k == ek, $sformatf("g_k %h exp %h", g_k, ek));
    chk(g_na == en, $sformatf("g_na %h exp %h", g_na, en));
    chk(out_idx == 3'(idx_q.pop_front()), "index");
    chk(cyc - t_q.pop_front() == LAT, "latency");
  end

  initial begin
    cfg_we = 0; in_valid = 0; in_idx = 0; in_v0 = 0; cfg_sel = SP_AS; cfg_gate = GATE_N;
    cfg_addr = 0; cfg_data = 0;
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
      sm[s].n = r2b(0.30 + 0.01 * real'(s));
      cfg(SP_N, GATE_N, s, sm[s].n); cfg(SP_M, GATE_N, s, sm[s].m); cfg(SP_H, GATE_N, s, sm[s].h);
    end
    cfg(SP_GBAR_K, GATE_N, 0, sm[0].gbar_k);
    cfg(SP_GBAR_NA, GATE_N, 0, sm[0].gbar_na);
    for (int r = 0; r < 40; r++) begin
      for (int s = 0; s < NS; s++) begin
        fp64_t v, n2;
        int a;
        v = r2b(real'($urandom_range(28000)) / 100.0 - 80.0);
        @(negedge clk);
        in_valid = 1; in_idx = 3'(s); in_v0 = v;
        a = vaddr(v);
        if (a == 0 || a == 2047) clamped++;
        sm[s].n = ref_add(ref_mul(hh_b[0][a], sm[s].n), hh_a[0][a]);
        sm[s].m = ref_add(ref_mul(hh_b[1][a], sm[s].m), hh_a[1][a]);
        sm[s].h = ref_add(ref_mul(hh_b[2][a], sm[s].h), hh_a[2][a]);
        n2 = ref_mul(sm[s].n, sm[s].n);
        exk_q.push_back(ref_mul(ref_mul(n2, n2), sm[s].gbar_k));
        exn_q.push_back(ref_mul(ref_mul(ref_mul(sm[s].m, sm[s].m), ref_mul(sm[s].m, sm[s].h)),
                                sm[s].gbar_na));
        idx_q.push_back(s);
        t_q.push_back(cyc);
      end
      @(negedge clk) in_valid = 0;
      repeat (LAT) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    chk(exk_q.size() == 0, "all results");
    chk(clamped > 0, "clamped addresses exercised");
    $display("clamped table addresses: %0d", clamped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
