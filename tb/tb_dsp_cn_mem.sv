// tb_dsp_cn_mem: loads CNIs and voltages at random indices (some CNIs at two
// indices), then broadcasts responses by CNI, some for CNIs not held; a model
// array gives the expected contents of both read ports.
module tb_dsp_cn_mem;
  import tb_util_pkg::*;
  localparam int D = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic init_we, rsp_valid;
  logic [3:0] init_idx, ra_idx, rb_idx;
  logic [31:0] init_cni, rsp_cni;
  logic [63:0] init_volt, rsp_volt, ra_volt, rb_volt;
  dsp_cn_mem #(.DEPTH(D)) dut (.clk, .init_we, .init_idx, .init_cni, .init_volt,
    .rsp_valid, .rsp_cni, .rsp_volt, .ra_idx, .ra_volt, .rb_idx, .rb_volt);
  int checks = 0, failures = 0, n_multi = 0;
  logic [31:0] m_cni [D];
  logic [63:0] m_v [D];
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    init_we = 0; rsp_valid = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      init_we = 1; init_idx = 4'(i);
      init_cni = 32'h2000 + 32'(i % 12);     // indices 12..15 repeat CNIs 0..3
      init_volt = r2b(real'(i));
      m_cni[i] = init_cni; m_v[i] = init_volt;
    end
    @(negedge clk) init_we = 0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      rsp_valid = 1'($urandom());
      rsp_cni   = 32'h2000 + 32'($urandom_range(15));
      rsp_volt  = r2b(real'($urandom_range(100000)) / 7.0);
      ra_idx = 4'($urandom()); rb_idx = 4'($urandom());
      #1;
      checks += 2;
      if (ra_volt !== m_v[ra_idx]) failures++;
      if (rb_volt !== m_v[rb_idx]) failures++;
      @(posedge clk);
      if (rsp_valid) begin
        int hits;
        hits = 0;
        for (int i = 0; i < D; i++) if (m_cni[i] == rsp_cni) begin m_v[i] = rsp_volt; hits++; end
        if (hits > 1) n_multi++;
      end
    end
    checks++;
    if (n_multi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
