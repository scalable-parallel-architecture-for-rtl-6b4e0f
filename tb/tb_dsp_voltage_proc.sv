// tb_dsp_voltage_proc: random node triples and coefficients, one per clock
// with gaps; the reference evaluates A_d*(v_m1+v_p1) + (B_d*v0 + C_d) in the
// same operation order in double precision, so results must match bit for
// bit; the tag and the latency 2*ADD_LAT+MUL_LAT are checked too.
module tb_dsp_voltage_proc;
  import tb_util_pkg::*;
  localparam int AL = 3, ML = 2, LAT = 2 * AL + ML;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid, in_tag, out_tag;
  logic [63:0] v_m1, v_0, v_p1, a_d, b_d, c_d, v_new;
  dsp_voltage_proc #(.ADD_LAT(AL), .MUL_LAT(ML), .TAG_W(1)) dut (
    .clk, .rst_n, .in_valid, .v_m1, .v_0, .v_p1, .a_d, .b_d, .c_d, .in_tag,
    .out_valid, .v_new, .out_tag);
  int checks = 0, failures = 0, cyc = 0;
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
    if ({out_tag, v_new} !== e) begin
      failures++;
      if (failures < 10) $display("FAIL got %h exp %h", {out_tag, v_new}, e);
    end
    if (cyc - t != LAT) begin failures++; $display("latency %0d", cyc - t); end
  end
  initial begin
    real r;
    in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      v_m1 = r2b(-70.0 + 200.0 * real'($urandom()) / 4294967296.0);
      v_0  = r2b(-70.0 + 200.0 * real'($urandom()) / 4294967296.0);
      v_p1 = r2b(-70.0 + 200.0 * real'($urandom()) / 4294967296.0);
      a_d  = r2b(0.001 * real'($urandom_range(1000)) + 1.0e-4);
      b_d  = r2b(1.0 - 0.002 * real'($urandom_range(400)));
      c_d  = r2b(-0.01 * real'($urandom_range(100)));
      in_tag = 1'($urandom());
      if (in_valid) begin
        exp_q.push_back({in_tag, ref_add(ref_mul(ref_add(v_m1, v_p1), a_d),
                                         ref_add(ref_mul(v_0, b_d), c_d))});
        t_q.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
