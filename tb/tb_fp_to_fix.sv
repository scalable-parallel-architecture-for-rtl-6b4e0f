// tb_fp_to_fix: voltages across and beyond the -64..192 mV window, including
// exact bin edges and negative values; the expected address is
// clamp(floor((v + 64) * 8), 0, 2047), computed with real arithmetic.
module tb_fp_to_fix;
  import tb_util_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [63:0] v;
  logic [10:0] addr;
  fp_to_fix dut (.clk, .v, .addr);
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    real r, e;
    int expv;
    for (int i = 0; i < 6000; i++) begin
      if (i < 2200)       r = -70.0 + 0.125 * real'(i);               // exact bin edges
      else if (i < 2300)  r = -1.0e-3 * real'($urandom_range(1000));  // small negatives
      else if (i < 2350)  r = (i % 2 == 0) ? 1.0e6 : -1.0e6;           // far outside
      else                r = -80.0 + 290.0 * real'($urandom()) / 4294967296.0;
      @(negedge clk);
      v = r2b(r);
      @(posedge clk);
      #1;
      e = $floor((r + 64.0) * 8.0);
      expv = (e < 0.0) ? 0 : (e > 2047.0) ? 2047 : int'(e);
      checks++;
      if (int'(addr) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL v=%f addr=%0d exp=%0d", r, addr, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
