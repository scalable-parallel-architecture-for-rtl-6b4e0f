// fp_to_fix: floating-to-fixed point converter of the soma conductance
// processor. It turns a soma (command) voltage in millivolts, a double, into
// the 11-bit address of the A(k)/B(k) lookup tables: 8 integer bits and 3
// fraction bits of (v + 64 mV), so address i covers
// [-64 + i/8, -64 + (i+1)/8) mV and the table spans -64 mV to 192 mV in
// 0.125 mV steps. The value is rounded towards minus infinity; voltages below
// the range give address 0 and above it address 2047. One clock of latency.
module fp_to_fix #(
  parameter int    FRAC_BITS = 3,    // fraction bits of the address
  parameter int    ADDR_W    = 11,   // address width
  parameter int    V_MIN_MV  = -64   // voltage of address 0
) (
  input  logic              clk,
  input  logic [63:0]       v,
  output logic [ADDR_W-1:0] addr
);
  // floor(v * 2^FRAC_BITS) as a signed integer, saturated to +-2^20
  function automatic logic signed [21:0] floor_scaled(input logic [63:0] x);
    logic [52:0] m;
    int sh;
    logic [116:0] mag_w;
    logic [52:0] ip;
    logic frac_nz;
    logic signed [21:0] r;
    if (x[62:52] == 11'd0) return '0;
    m  = {1'b1, x[51:0]};
    // value = m * 2^(e-1075); scaled = m * 2^(e-1075+FRAC_BITS)
    sh = int'(x[62:52]) - 1075 + FRAC_BITS;
    if (sh >= -52 && sh <= 0) begin
      mag_w   = {64'd0, m} >> (-sh);
      ip      = mag_w[52:0];
      frac_nz = (({64'd0, m} & ((117'd1 << (-sh)) - 117'd1)) != 0);
    end else if (sh < -52) begin
      ip      = '0;
      frac_nz = 1'b1;
    end else begin
      ip      = 53'h1F_FFFF;   // |x| >= 2^52: far outside any table
      frac_nz = 1'b0;
    end
    if (ip > 53'h10_0000) ip = 53'h10_0000;
    r = $signed({1'b0, ip[20:0]});
    if (x[63]) r = -r - (frac_nz ? 22'sd1 : 22'sd0);
    return r;
  endfunction

  logic signed [21:0] s;
  logic signed [22:0] a;
  always_comb begin
    s = floor_scaled(v);
    a = 23'(s) - 23'(V_MIN_MV * (1 << FRAC_BITS));
  end

  always_ff @(posedge clk) begin
    if (a < 0)                         addr <= '0;
    else if (a > (1 << ADDR_W) - 1)    addr <= '1;
    else                               addr <= a[ADDR_W-1:0];
  end
endmodule
