// tb_idle_monitor: random request (inc) and result (dec) pulses with INC=1,
// DEC=3 as in the common node processor; the counter and the idle output are
// compared with a model every clock, with the output buffer flag toggled too.
module tb_idle_monitor;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic inc, dec, out_empty, idle;
  logic [15:0] count;
  idle_monitor #(.CW(16), .INC(1), .DEC(3)) dut (.clk, .rst_n, .inc, .dec, .out_empty, .idle, .count);
  int checks = 0, failures = 0, model = 0, n_idle = 0, n_busy = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    inc = 0; dec = 0; out_empty = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks += 2;
      if (int'(count) != model) failures++;
      if (idle != (model == 0 && out_empty)) failures++;
      if (idle) n_idle++; else n_busy++;
      inc = ($urandom_range(2) == 0);
      dec = (model + (inc ? 1 : 0) >= 3) && ($urandom_range(3) == 0);
      out_empty = ($urandom_range(5) != 0);
      @(posedge clk);
      model = model + (inc ? 1 : 0) - (dec ? 3 : 0);
    end
    checks++;
    if (n_idle == 0 || n_busy == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
