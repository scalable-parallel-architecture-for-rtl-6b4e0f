// fp64_pkg: combinational IEEE-754 double precision add and multiply.
//
// These functions are the arithmetic behind fp_add and fp_mul, which stand in
// for the vendor floating point cores of the original FPGA build. Rounding is
// round-to-nearest-even. Simplifications chosen for this design: subnormal
// inputs are read as zero and results that would be subnormal are flushed to
// signed zero; an overflow returns infinity; NaN operands are not treated
// specially. Membrane voltages, conductances and coefficients of a neuron
// model stay far from these corners.
package fp64_pkg;

  // Round a normalised 56-bit significand (53 bits + guard, round, sticky)
  // with a signed biased exponent, and pack it.
  function automatic logic [63:0] fp_pack(input logic sign, input logic signed [13:0] exp_in,
                                          input logic [55:0] sig);
    logic [53:0] rnd;
    logic signed [13:0] e;
    logic up;
    up  = sig[2] & (sig[1] | sig[0] | sig[3]);
    rnd = {1'b0, sig[55:3]} + {53'd0, up};
    e   = exp_in;
    if (rnd[53]) begin
      rnd = rnd >> 1;
      e   = e + 14'sd1;
    end
    if (e <= 0)           fp_pack = {sign, 63'd0};
    else if (e >= 2047)   fp_pack = {sign, 11'h7ff, 52'd0};
    else                  fp_pack = {sign, e[10:0], rnd[51:0]};
  endfunction

  function automatic logic [63:0] fp_add_f(input logic [63:0] a, input logic [63:0] b);
    logic [63:0] x, y;
    logic [52:0] mx, my;
    logic [10:0] d;
    logic [111:0] wide;
    logic [55:0] sx, sy;
    logic [56:0] sum;
    logic [55:0] norm;
    logic signed [13:0] e;
    int lz;
    // order operands so that |x| >= |y|
    if (a[62:0] >= b[62:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    if (x[62:52] == 11'd0) return 64'd0;                        // both zero
    if (y[62:52] == 11'd0) return x;                            // y is zero
    mx   = {1'b1, x[51:0]};
    my   = {1'b1, y[51:0]};
    d    = x[62:52] - y[62:52];
    wide = {my, 59'd0} >> ((d > 11'd112) ? 11'd112 : d);
    sx   = {mx, 3'b000};
    sy   = {wide[111:57], |wide[56:0]};
    e    = $signed({3'b000, x[62:52]});
    if (x[63] == y[63]) begin
      sum = {1'b0, sx} + {1'b0, sy};
      if (sum[56]) begin
        norm = {sum[56:2], sum[1] | sum[0]};
        e    = e + 14'sd1;
      end else begin
        norm = sum[55:0];
      end
    end else begin
      sum = {1'b0, sx} - {1'b0, sy};
      if (sum[55:0] == 56'd0) return 64'd0;
      lz = 0;
      for (int i = 55; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      norm = sum[55:0] << lz;
      e    = e - 14'(lz);
    end
    return fp_pack(x[63], e, norm);
  endfunction

  function automatic logic [63:0] fp_mul_f(input logic [63:0] a, input logic [63:0] b);
    logic [52:0] ma, mb;
    logic [105:0] p;
    logic [55:0] sig;
    logic signed [13:0] e;
    logic s;
    s = a[63] ^ b[63];
    if (a[62:52] == 11'd0 || b[62:52] == 11'd0) return {s, 63'd0};
    ma = {1'b1, a[51:0]};
    mb = {1'b1, b[51:0]};
    p  = ma * mb;
    e  = $signed({3'b000, a[62:52]}) + $signed({3'b000, b[62:52]}) - 14'sd1023;
    if (p[105]) begin
      sig = {p[105:51], |p[50:0]};
      e   = e + 14'sd1;
    end else begin
      sig = {p[104:50], |p[49:0]};
    end
    return fp_pack(s, e, sig);
  endfunction

endpackage
