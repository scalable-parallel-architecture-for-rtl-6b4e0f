// tb_cns_tree: a two-level communication media built from cns switches.
// Three lower switches serve three segment processors each and have no
// processors of their own; their uplinks are the clients of an upper switch
// that holds the common node processor (domain 0x4000) and the soma processor.
// The segment processors and the two processors are behavioural: the client
// buffers are queues of random requests, the CNP answers a request with
// volt + 1 and the SP with volt * 2, each after a random delay, through
// output buffers the upper switch polls. The test checks that every request
// reaches the right processor exactly once, that every response is broadcast
// to all nine clients, and that all clients see the responses in the same
// order. It also counts clocks in which several clients compete.
module tb_cns_tree;
  import nsim_pkg::*;
  import tb_util_pkg::*;
  localparam int NL = 3, NREQ = 400;
  localparam logic [31:0] CND_UP = 32'h4000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // lower level
  logic [NL-1:0] lo_empty [NL];
  msg_t          lo_data  [NL][NL];
  logic [NL-1:0] lo_pop   [NL];
  logic          lo_rsp_valid [NL];
  msg_t          lo_rsp       [NL];
  logic          lo_idle      [NL];
  // links between the levels
  logic [NL-1:0] up_empty;
  msg_t          up_data [NL];
  logic [NL-1:0] up_pop;
  logic          top_rsp_valid;
  msg_t          top_rsp;
  // upper level processors
  logic cnp_req_valid, sp_req_valid, cnp_out_empty, sp_out_empty, cnp_out_pop, sp_out_pop;
  msg_t cnp_req, sp_req, cnp_out_data, sp_out_data;
  logic top_up_empty, top_idle;
  msg_t top_up_data;

  for (genvar g = 0; g < NL; g++) begin : g_lo
    logic unused_cnp_v, unused_sp_v, unused_cnp_pop, unused_sp_pop;
    msg_t unused_cnp, unused_sp;
    cns #(.N_DSP(NL), .HAS_CNP(1'b0), .HAS_SP(1'b0)) u_lo (
      .clk, .rst_n,
      .cl_req_empty(lo_empty[g]), .cl_req_data(lo_data[g]), .cl_req_pop(lo_pop[g]),
      .cl_rsp_valid(lo_rsp_valid[g]), .cl_rsp(lo_rsp[g]),
      .cnp_req_valid(unused_cnp_v), .cnp_req(unused_cnp), .cnp_out_empty(1'b1), .cnp_out_data('0),
      .cnp_out_pop(unused_cnp_pop),
      .sp_req_valid(unused_sp_v), .sp_req(unused_sp), .sp_out_empty(1'b1), .sp_out_data('0),
      .sp_out_pop(unused_sp_pop),
      .up_out_empty(up_empty[g]), .up_out_data(up_data[g]), .up_out_pop(up_pop[g]),
      .up_in_valid(top_rsp_valid), .up_in(top_rsp), .idle(lo_idle[g]));
  end
  cns #(.N_DSP(NL), .CND(CND_UP)) u_up (
    .clk, .rst_n,
    .cl_req_empty(up_empty), .cl_req_data(up_data), .cl_req_pop(up_pop),
    .cl_rsp_valid(top_rsp_valid), .cl_rsp(top_rsp),
    .cnp_req_valid, .cnp_req, .cnp_out_empty, .cnp_out_data, .cnp_out_pop,
    .sp_req_valid, .sp_req, .sp_out_empty, .sp_out_data, .sp_out_pop,
    .up_out_empty(top_up_empty), .up_out_data(top_up_data), .up_out_pop(1'b0),
    .up_in_valid(1'b0), .up_in('0), .idle(top_idle));

  int checks = 0, failures = 0, cyc = 0, n_cnp = 0, n_sp = 0, n_compete = 0;
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
  always @(posedge clk) cyc <= cyc + 1;

  // behavioural client buffers
  msg_t cq [NL*NL][$];
  always @(negedge clk)
    for (int g = 0; g < NL; g++)
      for (int c = 0; c < NL; c++) begin
        lo_empty[g][c] = (cq[g*NL+c].size() == 0);
        lo_data[g][c]  = lo_empty[g][c] ? '0 : cq[g*NL+c][0];
      end
  always @(posedge clk) if (rst_n)
    for (int g = 0; g < NL; g++) begin
      if ($countones(~lo_empty[g]) > 1) n_compete++;
      for (int c = 0; c < NL; c++) if (lo_pop[g][c]) void'(cq[g*NL+c].pop_front());
    end

  // behavioural processors: (ready time, response) queues
  typedef struct { int t; msg_t m; } pend_t;
  pend_t cnp_q[$], sp_q[$];
  msg_t exp_rsp[$];     // responses the processors produced, in any order
  always @(posedge clk) if (rst_n) begin
    if (cnp_req_valid) begin
      chk((cnp_req.cni & CND_UP) == CND_UP, $sformatf("CNP got CNI %h", cnp_req.cni));
      n_cnp++;
      cnp_q.push_back('{t: cyc + 3 + $urandom_range(20),
                        m: '{cni: cnp_req.cni, status: 2'b00, volt: ref_add(cnp_req.volt, r2b(1.0))}});
    end
    if (sp_req_valid) begin
      chk(sp_req.cni < 32'h1000, $sformatf("SP got CNI %h", sp_req.cni));
      n_sp++;
      sp_q.push_back('{t: cyc + 3 + $urandom_range(20),
                       m: '{cni: sp_req.cni, status: 2'b00, volt: ref_mul(sp_req.volt, r2b(2.0))}});
    end
    if (cnp_out_pop) void'(cnp_q.pop_front());
    if (sp_out_pop) void'(sp_q.pop_front());
  end
  always @(negedge clk) begin
    cnp_out_empty = !(cnp_q.size() > 0 && cnp_q[0].t <= cyc);
    cnp_out_data  = cnp_out_empty ? '0 : cnp_q[0].m;
    sp_out_empty  = !(sp_q.size() > 0 && sp_q[0].t <= cyc);
    sp_out_data   = sp_out_empty ? '0 : sp_q[0].m;
  end

  // every client sees the same response sequence
  msg_t seen [NL*NL][$];
  msg_t top_seq[$];
  always @(posedge clk) if (rst_n) begin
    if (top_rsp_valid) top_seq.push_back(top_rsp);
    for (int g = 0; g < NL; g++) if (lo_rsp_valid[g])
      for (int c = 0; c < NL; c++) seen[g*NL+c].push_back(lo_rsp[g]);
  end

  initial begin
    msg_t want[$];
    for (int i = 0; i < NL * NL; i++) cq[i].delete();
    for (int g = 0; g < NL; g++) begin lo_empty[g] = '1; foreach (lo_data[g][c]) lo_data[g][c] = '0; end
    cnp_out_empty = 1; sp_out_empty = 1; cnp_out_data = '0; sp_out_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NREQ; i++) begin
      msg_t m;
      int k;
      k = $urandom_range(NL * NL - 1);
      m.cni = ($urandom_range(1) == 0) ? 32'(i) : (CND_UP | 32'(i));
      m.status = 2'($urandom_range(1, 3));
      m.volt = r2b(real'(i) / 4.0);
      want.push_back('{cni: m.cni, status: 2'b00,
                       volt: (m.cni < 32'h1000) ? ref_mul(m.volt, r2b(2.0)) : ref_add(m.volt, r2b(1.0))});
      @(negedge clk);
      cq[k].push_back(m);
      if ($urandom_range(3) == 0) begin
        int k2;
        k2 = $urandom_range(NL * NL - 1);
        i++;
        m.cni = CND_UP | 32'(i); m.volt = r2b(real'(i) / 4.0);
        want.push_back('{cni: m.cni, status: 2'b00, volt: ref_add(m.volt, r2b(1.0))});
        cq[k2].push_back(m);
      end
    end
    repeat (5) @(negedge clk);
    while (!(top_idle && lo_idle[0] && lo_idle[1] && lo_idle[2]) || cnp_q.size() > 0 || sp_q.size() > 0)
      @(negedge clk);
    repeat (5) @(negedge clk);
    chk(n_cnp + n_sp == want.size(), $sformatf("requests delivered %0d of %0d", n_cnp + n_sp, want.size()));
    chk(top_seq.size() == want.size(), $sformatf("responses %0d of %0d", top_seq.size(), want.size()));
    // same responses as wanted, matched by CNI
    foreach (want[i]) begin
      int hit;
      hit = 0;
      foreach (top_seq[j]) if (top_seq[j] == want[i]) hit++;
      chk(hit == 1, $sformatf("response for CNI %h seen %0d times", want[i].cni, hit));
    end
    for (int c = 0; c < NL * NL; c++)
      chk(seen[c] == top_seq, $sformatf("client %0d response order", c));
    chk(top_up_empty, "nothing sent above the top level");
    $display("CNP requests %0d, SP requests %0d, clocks with competing clients %0d", n_cnp, n_sp, n_compete);
    chk(n_cnp > 0 && n_sp > 0 && n_compete > 0, "all mechanisms happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
