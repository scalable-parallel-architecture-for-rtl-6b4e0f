// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, empty/full flags and count, including simultaneous push and pop
// when full.
module tb_sync_fifo;
  localparam int W = 66, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty, full;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(DEPTH+1)-1:0] count;
  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .empty, .full, .count);

  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  int n_full = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      chk(count == ($clog2(DEPTH+1))'(q.size()), "count");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == DEPTH), "full");
      if (q.size() > 0) chk(rdata == q[0], "head data");
      if (full) n_full++;
      // phases: fill-biased, drain-biased, balanced
      pop   = (q.size() > 0) && ($urandom_range(99) < ((i / 500) % 2 == 0 ? 30 : 70));
      push  = ($urandom_range(99) < ((i / 500) % 2 == 0 ? 70 : 30)) && (q.size() < DEPTH || pop);
      wdata = {$urandom(), $urandom(), 2'($urandom())};
      @(posedge clk);
      #1;
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    chk(n_full > 0, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
