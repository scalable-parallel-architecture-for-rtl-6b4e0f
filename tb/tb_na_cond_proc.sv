// tb_na_cond_proc: sodium conductance processor with 8 somas and full
// 2048-entry Hodgkin-Huxley tables for the m and h gates (time step 0.01 ms).
// Each soma is stepped 40 times at random table addresses, one soma per
// clock. The reference applies m' = B_m m + A_m, h' = B_h h + A_h and
// G_Na = ((m'm')(m'h')) gbar_Na with the same rounding; the result, the soma
// index and the latency ADD_LAT + 4*MUL_LAT are checked.
module tb_na_cond_proc;
  import nsim_pkg::*;
  import tb_util_pkg::*;
  localparam int NS = 8, AL = 3, ML = 2, LAT = AL + 4 * ML;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, in_valid, out_valid;
  sp_cfg_e cfg_sel;
  gate_e cfg_gate;
  logic [15:0] cfg_addr;
  fp64_t cfg_data, g_na;
  logic [2:0] in_idx, out_idx;
  logic [10:0] lut_addr;
  na_cond_proc #(.N_SOMA(NS), .ADD_LAT(AL), .MUL_LAT(ML)) dut (.*);

  fp64_t lam[2048], lbm[2048], lah[2048], lbh[2048], m[NS], h[NS], gbar;
  int checks = 0, failures = 0, cyc = 0;
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

  fp64_t exp_q[$];
  int idx_q[$], t_q[$];
  always @(posedge clk) if (rst_n && out_valid) begin
    fp64_t e;
    e = exp_q.pop_front();
    chk(g_na == e, $sformatf("g_na %h exp %h", g_na, e));
    chk(out_idx == 3'(idx_q.pop_front()), "index");
    chk(cyc - t_q.pop_front() == LAT, "latency");
  end

  initial begin
    cfg_we = 0; in_valid = 0; in_idx = 0; lut_addr = 0; cfg_sel = SP_AS; cfg_gate = GATE_N;
    cfg_addr = 0; cfg_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2048; i++) begin
      lam[i] = r2b(lut_a(1, i, 0.01)); lbm[i] = r2b(lut_b(1, i, 0.01));
      lah[i] = r2b(lut_a(2, i, 0.01)); lbh[i] = r2b(lut_b(2, i, 0.01));
      cfg(SP_LUT_A, GATE_M, i, lam[i]); cfg(SP_LUT_B, GATE_M, i, lbm[i]);
      cfg(SP_LUT_A, GATE_H, i, lah[i]); cfg(SP_LUT_B, GATE_H, i, lbh[i]);
      cfg(SP_LUT_B, GATE_N, i, 64'h0); // other gate's tables must not be touched
    end
    gbar = r2b(120.0);
    cfg(SP_GBAR_NA, GATE_N, 0, gbar);
    for (int s = 0; s < NS; s++) begin
      m[s] = r2b(0.0529 + 0.01 * real'(s));
      h[s] = r2b(0.5961 - 0.01 * real'(s));
      cfg(SP_M, GATE_N, s, m[s]);
      cfg(SP_H, GATE_N, s, h[s]);
    end
    for (int r = 0; r < 40; r++) begin
      for (int s = 0; s < NS; s++) begin
        int a;
        fp64_t m1, h1;
        a = (r < 2) ? ((r == 0) ? 0 : 2047) : $urandom_range(2047);
        @(negedge clk);
        in_valid = 1; in_idx = 3'(s); lut_addr = 11'(a);
        m1 = ref_add(ref_mul(lbm[a], m[s]), lam[a]);
        h1 = ref_add(ref_mul(lbh[a], h[s]), lah[a]);
        m[s] = m1; h[s] = h1;
        exp_q.push_back(ref_mul(ref_mul(ref_mul(m1, m1), ref_mul(m1, h1)), gbar));
        idx_q.push_back(s);
        t_q.push_back(cyc);
      end
      @(negedge clk) in_valid = 0;
      repeat (LAT) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    chk(exp_q.size() == 0, "all results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
