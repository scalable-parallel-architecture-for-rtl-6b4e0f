// tb_cnp: common node processor with 64 nodes. For two simulation steps the
// testbench sends, for 40 common nodes, the parent, child-1 and child-2
// neighbour voltages in a shuffled order (so terms of many nodes interleave
// and the third terms of different nodes arrive back to back), one request
// per clock with random gaps. The reference forms each node's three terms as
// the hardware's Table of groups prescribes (parent A*V-1 + B*V0, child 1
// C*V1 + E, child 2 D*V2) and sums them in arrival order (t3 + t2) + t1.
// Checked: every response value and CNI, the stored voltage used by the next
// step, the idle flag, and the latency from the third request to the response.
module tb_cnp;
  import nsim_pkg::*;
  import tb_util_pkg::*;
  localparam int NN = 64, AL = 3, ML = 3;
  localparam int RSP_LAT = ML + 3 * AL + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we, req_valid, out_empty, out_pop, idle;
  cn_cfg_e cfg_sel;
  logic [5:0] cfg_addr, mon_addr;
  fp64_t cfg_data, mon_v0;
  msg_t req, out_data;
  cnp #(.N_NODES(NN), .OUT_DEPTH(64), .ADD_LAT(AL), .MUL_LAT(ML)) dut (.*);

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

  fp64_t ac[NN], bc[NN], cc[NN], dc[NN], ec[NN], v0[NN];
  fp64_t terms[NN][$];
  int    third_t[NN];
  msg_t  exp_rsp[$];
  int    n_back_to_back = 0, last_third = -10;

  task automatic cfg(input cn_cfg_e s, input int a, input fp64_t d);
    @(negedge clk);
    cfg_we = 1; cfg_sel = s; cfg_addr = 6'(a); cfg_data = d;
    @(negedge clk) cfg_we = 0;
  endtask

  // responses leave the FIFO as soon as they appear
  assign out_pop = !out_empty;
  always @(posedge clk) if (rst_n && out_pop) begin
    int n;
    n = int'(out_data.cni[5:0]);
    chk(exp_rsp.size() > 0, "unexpected response");
    if (exp_rsp.size() > 0) begin
      msg_t e;
      e = exp_rsp.pop_front();
      chk(out_data.cni == e.cni && out_data.volt == e.volt,
          $sformatf("response %h exp %h", out_data, e));
    end
    chk(cyc - third_t[n] == RSP_LAT, $sformatf("latency %0d", cyc - third_t[n]));
  end

  task automatic run_step();
    msg_t list[$];
    for (int n = 0; n < 40; n++) begin
      for (int s = 1; s <= 3; s++)
        list.push_back('{cni: 32'h2000 + 32'(n), status: 2'(s),
                         volt: r2b(-5.0 + real'($urandom_range(1000)) / 8.0)});
      terms[n].delete();
    end
    list.shuffle();
    foreach (list[i]) begin
      int n;
      fp64_t t;
      n = int'(list[i].cni[5:0]);
      unique case (list[i].status)
        2'b01:   t = ref_add(ref_mul(ac[n], list[i].volt), ref_mul(bc[n], v0[n]));
        2'b10:   t = ref_add(ref_mul(cc[n], list[i].volt), ec[n]);
        default: t = ref_add(ref_mul(dc[n], list[i].volt), 64'd0);
      endcase
      terms[n].push_back(t);
      @(negedge clk);
      req_valid = 1; req = list[i];
      if (terms[n].size() == 3) begin
        fp64_t nv;
        nv = ref_add(ref_add(terms[n][2], terms[n][1]), terms[n][0]);
        exp_rsp.push_back('{cni: 32'h2000 + 32'(n), status: 2'b00, volt: nv});
        v0[n] = nv;
        third_t[n] = cyc;
        if (cyc == last_third + 1) n_back_to_back++;
        last_third = cyc;
      end
      if ($urandom_range(3) == 0) begin
        @(negedge clk) req_valid = 0;
      end
    end
    @(negedge clk) req_valid = 0;
    chk(!idle, "busy after requests");
    while (!idle) @(negedge clk);
    chk(exp_rsp.size() == 0, "all responses seen");
  endtask

  initial begin
    cfg_we = 0; req_valid = 0; req = '0; mon_addr = 0; cfg_sel = CN_AC; cfg_addr = 0; cfg_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NN; n++) begin
      ac[n] = r2b(0.1 + 0.001 * real'($urandom_range(50)));
      bc[n] = r2b(0.6 + 0.001 * real'($urandom_range(50)));
      cc[n] = r2b(0.05 + 0.001 * real'($urandom_range(50)));
      dc[n] = r2b(0.05 + 0.001 * real'($urandom_range(50)));
      ec[n] = r2b(0.01 * real'($urandom_range(50)));
      v0[n] = r2b(real'($urandom_range(100)) - 10.0);
      cfg(CN_AC, n, ac[n]); cfg(CN_BC, n, bc[n]); cfg(CN_CC, n, cc[n]);
      cfg(CN_DC, n, dc[n]); cfg(CN_EC, n, ec[n]); cfg(CN_V0, n, v0[n]);
    end
    run_step();
    run_step();
    for (int n = 0; n < 40; n += 7) begin
      @(negedge clk) mon_addr = 6'(n);
      #1 chk(mon_v0 == v0[n], "stored voltage");
    end
    chk(n_back_to_back > 0, "third terms of two nodes on consecutive clocks");
    $display("back-to-back completions: %0d", n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
