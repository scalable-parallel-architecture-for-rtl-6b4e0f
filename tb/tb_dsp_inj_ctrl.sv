// tb_dsp_inj_ctrl: nodes with and without the injection flag; flagged nodes
// must come out as v + D_d, the others unchanged, ADD_LAT clocks later.
module tb_dsp_inj_ctrl;
  import tb_util_pkg::*;
  localparam int AL = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, inj, out_valid, out_inj;
  logic [63:0] v_in, d_d, v_out;
  dsp_inj_ctrl #(.ADD_LAT(AL)) dut (.clk, .rst_n, .in_valid, .v_in, .inj, .d_d, .out_valid, .v_out, .out_inj);
  int checks = 0, failures = 0, cyc = 0, n_inj = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic [64:0] exp_q [$];
  int t_q [$];
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    logic [64:0] e;
    int t;
    e = exp_q.pop_front();
    t = t_q.pop_front();
    checks += 2;
    if ({out_inj, v_out} !== e) begin
      failures++;
      if (failures < 10) $display("FAIL got %h exp %h", {out_inj, v_out}, e);
    end
    if (cyc - t != AL) failures++;
  end
  initial begin
    in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      v_in = r2b(-70.0 + 200.0 * real'($urandom()) / 4294967296.0);
      d_d  = r2b(0.5 + real'($urandom_range(100)) / 10.0);
      inj  = 1'($urandom());
      if (in_valid) begin
        exp_q.push_back({inj, inj ? ref_add(v_in, d_d) : v_in});
        t_q.push_back(cyc);
        if (inj) n_inj++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (AL + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_inj == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
