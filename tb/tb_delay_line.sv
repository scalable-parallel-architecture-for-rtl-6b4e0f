// tb_delay_line: random words through a 5-stage delay line must come out
// exactly 5 clocks later.
module tb_delay_line;
  localparam int W = 16, D = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [W-1:0] d, q;
  delay_line #(.W(W), .DEPTH(D)) dut (.clk, .d, .q);
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (i > D) begin
        checks++;
        if (q !== hist[hist.size() - D]) begin
          failures++;
          $display("FAIL at %0d: %h vs %h", i, q, hist[hist.size() - D]);
        end
      end
      d = 16'($urandom());
      hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
