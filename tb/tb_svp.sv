// tb_svp: soma voltage processor with 16 somas and random coefficients and
// conductances. Requests arrive one per clock with gaps; each soma is
// requested several times so the stored voltage written back by the previous
// request is used by the next. The reference evaluates the diagram's
// grouping, (E_s V1 + F_s) + (D_s G_K + C_s G_Na) + ((G_K + G_Na) B_s + A_s) V0,
// in the same order; results, CNIs and the latency 3*ADD_LAT + 2*MUL_LAT are
// checked.
module tb_svp;
  import nsim_pkg::*;
  import tb_util_pkg::*;
  localparam int NS = 16, AL = 2, ML = 3, LAT = 3 * AL + 2 * ML;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, req_valid, out_valid;
  sp_cfg_e cfg_sel;
  logic [3:0] cfg_addr, g_addr;
  fp64_t cfg_data, req_v1, g_k, g_na, out_v0;
  logic [31:0] req_cni, out_cni;
  svp #(.N_SOMA(NS), .ADD_LAT(AL), .MUL_LAT(ML)) dut (.*);

  fp64_t as_[NS], bs_[NS], cs_[NS], ds_[NS], es_[NS], fs_[NS], v0[NS], gk[NS], gna[NS];
  assign g_k  = gk[g_addr];
  assign g_na = gna[g_addr];

  int checks = 0, failures = 0, cyc = 0;
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
  task automatic cfg(input sp_cfg_e s, input int a, input fp64_t d);
    @(negedge clk);
    cfg_we = 1; cfg_sel = s; cfg_addr = 4'(a); cfg_data = d;
    @(negedge clk) cfg_we = 0;
  endtask

  msg_t exp_q[$];
  int t_q[$];
  always @(posedge clk) if (rst_n && out_valid) begin
    msg_t e;
    e = exp_q.pop_front();
    chk(out_cni == e.cni && out_v0 == e.volt, $sformatf("got %h/%h exp %h/%h", out_cni, out_v0, e.cni, e.volt));
    chk(cyc - t_q.pop_front() == LAT, "latency");
  end

  initial begin
    cfg_we = 0; req_valid = 0; req_cni = 0; req_v1 = 0; cfg_sel = SP_AS; cfg_addr = 0; cfg_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      as_[n] = r2b(0.99 - 0.001 * real'($urandom_range(9)));
      bs_[n] = r2b(-0.001 * real'($urandom_range(1, 9)));
      cs_[n] = r2b(0.5 + 0.01 * real'($urandom_range(9)));
      ds_[n] = r2b(-0.1 - 0.01 * real'($urandom_range(9)));
      es_[n] = r2b(0.001 * real'($urandom_range(1, 9)));
      fs_[n] = r2b(0.0001 * real'($urandom_range(9)));
      v0[n]  = r2b(real'($urandom_range(100)) - 5.0);
      gk[n]  = r2b(0.01 * real'($urandom_range(100)));
      gna[n] = r2b(0.01 * real'($urandom_range(100)));
      cfg(SP_AS, n, as_[n]); cfg(SP_BS, n, bs_[n]); cfg(SP_CS, n, cs_[n]);
      cfg(SP_DS, n, ds_[n]); cfg(SP_ES, n, es_[n]); cfg(SP_FS, n, fs_[n]); cfg(SP_V0, n, v0[n]);
    end
    for (int r = 0; r < 4; r++) begin
      for (int n = 0; n < NS; n++) begin
        fp64_t a1, a2, a5, m5, res;
        @(negedge clk);
        req_valid = 1; req_cni = 32'(n); req_v1 = r2b(real'($urandom_range(500)) / 3.0 - 20.0);
        a1 = ref_add(ref_mul(es_[n], req_v1), fs_[n]);
        a2 = ref_add(ref_mul(ds_[n], gk[n]), ref_mul(cs_[n], gna[n]));
        a5 = ref_add(a1, a2);
        m5 = ref_mul(ref_add(ref_mul(ref_add(gk[n], gna[n]), bs_[n]), as_[n]), v0[n]);
        res = ref_add(a5, m5);
        v0[n] = res;
        exp_q.push_back('{cni: 32'(n), status: 2'b00, volt: res});
        t_q.push_back(cyc);
        if ($urandom_range(2) == 0) begin @(negedge clk) req_valid = 0; end
      end
      @(negedge clk) req_valid = 0;
      repeat (LAT + 2) @(negedge clk);     // one request per soma per step
    end
    chk(exp_q.size() == 0, "all results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
