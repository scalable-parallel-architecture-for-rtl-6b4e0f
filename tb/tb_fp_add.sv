// tb_fp_add: checks the double precision adder bit for bit against the
// simulator's own double addition, on random operands of both signs and
// close and distant exponents, on exact cancellation and on zero operands,
// and checks that every result appears exactly LAT clocks after its operands.
module tb_fp_add;
  import tb_util_pkg::*;
  localparam int LAT = 3;
  localparam int N   = 4000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid;
  logic [63:0] a, b, y;
  logic        out_valid;
  fp_add #(.LAT(LAT)) dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);

  int checks = 0, failures = 0;
  logic [63:0] exp_q [$];
  int          t_in  [$];
  int          cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    logic [63:0] e;
    int t;
    e = exp_q.pop_front();
    t = t_in.pop_front();
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("add mismatch: got %h exp %h", y, e);
    end
    checks++;
    if (cyc - t != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", cyc - t, LAT);
    end
  end

  initial begin
    in_valid = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      case (i % 5)
        0: begin a = rand_fp(8);  b = rand_fp(8);  end
        1: begin a = rand_fp(2);  b = rand_fp(2); b[63] = ~a[63]; b[62:52] = a[62:52]; end
        2: begin a = rand_fp(60); b = rand_fp(60); end
        3: begin a = rand_fp(4);  b = a; b[63] = ~a[63]; end          // exact zero
        default: begin a = rand_fp(4); b = ($urandom_range(1) != 0) ? 64'd0 : 64'h8000_0000_0000_0000; end
      endcase
      if (in_valid) begin
        exp_q.push_back(ref_add(a, b));
        t_in.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
