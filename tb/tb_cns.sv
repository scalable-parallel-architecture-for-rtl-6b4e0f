// tb_cns: common node switch with 3 clients. Client request buffers and the
// CNP/SP output buffers are modelled as queues. Random requests for somas,
// for the local CNP domain and for foreign CNIs are queued in the clients;
// the test checks that
//   - every request reaches exactly the destination given by its CNI,
//     in per-client order, one per clock;
//   - with all clients non-empty, service rotates round-robin;
//   - a full uplink buffer stalls only uplink requests' clients
//     (the uplink is left unread for a while);
//   - responses from up_in always win, CNP and SP responses alternate when
//     both are pending, and every response is broadcast exactly once;
//   - idle is high only when all request buffers and the uplink are empty.
module tb_cns;
  import nsim_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 3;
  localparam logic [31:0] SL = 32'h100, CND = 32'h2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] cl_req_empty, cl_req_pop;
  msg_t cl_req_data[N], cl_rsp, cnp_req, sp_req, cnp_out_data, sp_out_data, up_out_data, up_in;
  logic cl_rsp_valid, cnp_req_valid, sp_req_valid, cnp_out_empty, sp_out_empty, cnp_out_pop,
        sp_out_pop, up_out_empty, up_out_pop, up_in_valid, idle;
  cns #(.N_DSP(N), .SOMA_LIMIT(SL), .CND(CND), .UP_DEPTH(4)) dut (.*);

  msg_t cq[N][$], cnp_q[$], sp_q[$];
  msg_t exp_cnp[$], exp_sp[$], exp_up[$], exp_rsp[$];
  int checks = 0, failures = 0;
  int n_cnp = 0, n_sp = 0, n_up = 0, n_rr = 0, n_prio = 0, n_alt = 0, n_stall = 0;
  bit hold_up = 0;
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

  // buffer models: outputs refreshed at the falling edge from the queues
  always @(negedge clk) begin
    for (int c = 0; c < N; c++) begin
      cl_req_empty[c] = cq[c].size() == 0;
      cl_req_data[c]  = (cq[c].size() > 0) ? cq[c][0] : '0;
    end
    cnp_out_empty = cnp_q.size() == 0;
    cnp_out_data  = (cnp_q.size() > 0) ? cnp_q[0] : '0;
    sp_out_empty  = sp_q.size() == 0;
    sp_out_data   = (sp_q.size() > 0) ? sp_q[0] : '0;
  end
  assign up_out_pop = !up_out_empty && !hold_up;

  int last_sel = -1;
  always @(posedge clk) if (rst_n) begin
    int pops, sel, dests;
    pops = 0; sel = -1;
    for (int c = 0; c < N; c++) if (cl_req_pop[c]) begin pops++; sel = c; end
    chk(pops <= 1, $sformatf("at most one request per clock %b empty %b", cl_req_pop, cl_req_empty));
    dests = int'(cnp_req_valid) + int'(sp_req_valid);
    if (sel >= 0) begin
      msg_t m;
      m = cq[sel].pop_front();
      if (m.cni < SL) begin
        chk(sp_req_valid && sp_req == m && !cnp_req_valid, "soma request to SP"); n_sp++;
      end else if ((m.cni & CND) == CND) begin
        chk(cnp_req_valid && cnp_req == m && !sp_req_valid, $sformatf("domain request to CNP %h %h %b", m.cni, cnp_req.cni, cnp_req_valid)); n_cnp++;
      end else begin
        chk(dests == 0, "foreign request not to CNP/SP"); exp_up.push_back(m); n_up++;
      end
      if (last_sel >= 0 && !cl_req_empty[(last_sel + 1) % N]
          && !cl_req_empty[(last_sel + 2) % N] && !cl_req_empty[last_sel]) begin
        chk(sel == (last_sel + 1) % N, "round robin"); n_rr++;
      end
      last_sel = sel;
    end else begin
      chk(dests == 0, "no destination without a pop");
      if (!(&cl_req_empty)) n_stall++;
    end
    if (up_out_pop) chk(up_out_data == exp_up.pop_front(), "uplink order");
    // responses
    if (up_in_valid) begin
      chk(cl_rsp_valid && cl_rsp == up_in && !cnp_out_pop && !sp_out_pop, "up_in wins");
      if (!cnp_out_empty || !sp_out_empty) n_prio++;
    end else if (!cnp_out_empty || !sp_out_empty) begin
      chk(cl_rsp_valid && (cnp_out_pop ^ sp_out_pop), "one local response");
      if (cnp_out_pop) chk(cl_rsp == cnp_q.pop_front(), "CNP response broadcast");
      if (sp_out_pop)  chk(cl_rsp == sp_q.pop_front(), "SP response broadcast");
    end else chk(!cl_rsp_valid, "no spurious response");
  end
  // alternation: when both buffers stay non-empty, sources must alternate
  bit last_was_sp, both_prev;
  always @(posedge clk) if (rst_n) begin
    if (!up_in_valid && !cnp_out_empty && !sp_out_empty) begin
      if (both_prev) begin chk(sp_out_pop != last_was_sp, "CNP/SP alternation"); n_alt++; end
      both_prev = 1;
    end else both_prev = 0;
    if (cnp_out_pop || sp_out_pop) last_was_sp = sp_out_pop;
  end

  function automatic msg_t rnd_msg();
    msg_t m;
    case ($urandom_range(2))
      0: m.cni = $urandom_range(SL - 1);
      1: m.cni = CND | 32'($urandom_range(2047));
      default: m.cni = 32'h4000 | 32'($urandom_range(2047));
    endcase
    m.status = 2'($urandom_range(3));
    m.volt = rand_fp(4);
    return m;
  endfunction

  initial begin
    up_in_valid = 0; up_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(idle, "idle at start");
    for (int burst = 0; burst < 30; burst++) begin
      for (int c = 0; c < N; c++)
        repeat ($urandom_range(12)) cq[c].push_back(rnd_msg());
      repeat ($urandom_range(10)) cnp_q.push_back(rnd_msg());
      repeat ($urandom_range(10)) sp_q.push_back(rnd_msg());
      hold_up = (burst % 4 == 1);
      for (int t = 0; t < 30; t++) begin
        @(negedge clk);
        up_in_valid = ($urandom_range(4) == 0);
        up_in = rnd_msg();
        if (t == 20) hold_up = 0;
      end
      up_in_valid = 0;
      do @(negedge clk); while (!idle || !cnp_out_empty || !sp_out_empty);
      chk(idle && cq[0].size() + cq[1].size() + cq[2].size() == 0, "idle when drained");
    end
    @(negedge clk);
    chk(exp_up.size() == 0, "uplink drained");
    $display("to SP %0d, to CNP %0d, to uplink %0d, round-robin %0d, up_in priority %0d, alternations %0d, stalled clocks %0d",
             n_sp, n_cnp, n_up, n_rr, n_prio, n_alt, n_stall);
    chk(n_rr > 20 && n_prio > 5 && n_alt > 5 && n_stall > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
