// tb_util_pkg: helpers shared by the testbenches: random doubles of moderate
// magnitude, conversion between real and IEEE-754 bits, and the same
// arithmetic as the design computed in the simulator's own double precision
// (the independent reference).
package tb_util_pkg;

  // random normal double: sign, exponent within +-span of 2^0, random mantissa
  function automatic logic [63:0] rand_fp(input int span);
    logic [63:0] r;
    int e;
    e = 1023 + int'($urandom_range(2 * span)) - span;
    r = {$urandom(), $urandom()};
    r[62:52] = 11'(e);
    return r;
  endfunction

  function automatic logic [63:0] r2b(input real r);
    return $realtobits(r);
  endfunction

  function automatic real b2r(input logic [63:0] b);
    return $bitstoreal(b);
  endfunction

  function automatic logic [63:0] ref_add(input logic [63:0] a, input logic [63:0] b);
    return $realtobits($bitstoreal(a) + $bitstoreal(b));
  endfunction

  function automatic logic [63:0] ref_mul(input logic [63:0] a, input logic [63:0] b);
    return $realtobits($bitstoreal(a) * $bitstoreal(b));
  endfunction

  // relative closeness, for results whose operation order differs
  function automatic bit close(input real a, input real b, input real tol);
    real d, m;
    d = (a > b) ? a - b : b - a;
    m = (a < 0 ? -a : a);
    if (m < 1.0e-30) return d < 1.0e-30;
    return d <= tol * m;
  endfunction

  // Hodgkin-Huxley rate constants (1/ms) of the command voltage vc (mV),
  // with the removable singularities of alpha_n and alpha_m filled in.
  function automatic real alpha(input int gate, input real vc);
    real x;
    case (gate)
      0: begin x = 10.0 - vc; return ((x < 1.0e-7 && x > -1.0e-7) ? 0.1 : 0.01 * x / ($exp(x / 10.0) - 1.0)); end
      1: begin x = 25.0 - vc; return ((x < 1.0e-7 && x > -1.0e-7) ? 1.0 : 0.1 * x / ($exp(x / 10.0) - 1.0)); end
      default: return 0.07 * $exp(-vc / 20.0);
    endcase
  endfunction

  function automatic real beta(input int gate, input real vc);
    case (gate)
      0: return 0.125 * $exp(-vc / 80.0);
      1: return 4.0 * $exp(-vc / 18.0);
      default: return 1.0 / ($exp((30.0 - vc) / 10.0) + 1.0);
    endcase
  endfunction

  // Table entries of the gate recursion p(k+1) = A + B p(k) for table address
  // i (voltage -64 + i/8 mV) and time step dt (ms).
  function automatic real lut_a(input int gate, input int i, input real dt);
    real vc, al, be;
    vc = -64.0 + real'(i) / 8.0;
    al = alpha(gate, vc);
    be = beta(gate, vc);
    return al / (al + be) * (1.0 - $exp(-dt * (al + be)));
  endfunction

  function automatic real lut_b(input int gate, input int i, input real dt);
    real vc;
    vc = -64.0 + real'(i) / 8.0;
    return $exp(-dt * (alpha(gate, vc) + beta(gate, vc)));
  endfunction

  function automatic int vaddr(input logic [63:0] v);
    real e;
    e = $floor(($bitstoreal(v) + 64.0) * 8.0);
    return (e < 0.0) ? 0 : (e > 2047.0) ? 2047 : int'(e);
  endfunction

  // Hodgkin-Huxley tables as loaded into the conductance processors, and a
  // bit-exact model of one soma step (soma voltage, then gates and
  // conductances) with the operation order of the hardware.
  logic [63:0] hh_a [3][2048];
  logic [63:0] hh_b [3][2048];

  function automatic void hh_init(input real dt);
    for (int g = 0; g < 3; g++)
      for (int i = 0; i < 2048; i++) begin
        hh_a[g][i] = $realtobits(lut_a(g, i, dt));
        hh_b[g][i] = $realtobits(lut_b(g, i, dt));
      end
  endfunction

  typedef struct {
    logic [63:0] as_, bs_, cs_, ds_, es_, fs_;
    logic [63:0] v0, gk, gna, n, m, h, gbar_k, gbar_na;
  } soma_t;

  // Forward-Euler soma coefficients: membrane capacitance cm (uF/cm^2),
  // leak gL, coupling conductance gc to the dendrite, time step dt; reversal
  // potentials E_K = -12, E_Na = 115, E_L = 10.6 mV on the command scale.
  function automatic soma_t soma_init(input real dt, input real cm, input real gl, input real gc);
    soma_t s;
    s.as_ = $realtobits(1.0 - dt * (gl + gc) / cm);
    s.bs_ = $realtobits(-dt / cm);
    s.cs_ = $realtobits(dt * 115.0 / cm);
    s.ds_ = $realtobits(dt * -12.0 / cm);
    s.es_ = $realtobits(dt * gc / cm);
    s.fs_ = $realtobits(dt * gl * 10.6 / cm);
    s.v0 = $realtobits(0.0);
    s.n = $realtobits(0.3177); s.m = $realtobits(0.0529); s.h = $realtobits(0.5961);
    s.gbar_k = $realtobits(36.0); s.gbar_na = $realtobits(120.0);
    s.gk = ref_mul(ref_mul(ref_mul(s.n, s.n), ref_mul(s.n, s.n)), s.gbar_k);
    s.gna = ref_mul(ref_mul(ref_mul(s.m, s.m), ref_mul(s.m, s.h)), s.gbar_na);
    return s;
  endfunction

  function automatic logic [63:0] soma_step(inout soma_t s, input logic [63:0] v1);
    logic [63:0] a1, a2, a5, m5, n2;
    int a;
    a1 = ref_add(ref_mul(s.es_, v1), s.fs_);
    a2 = ref_add(ref_mul(s.ds_, s.gk), ref_mul(s.cs_, s.gna));
    a5 = ref_add(a1, a2);
    m5 = ref_mul(ref_add(ref_mul(ref_add(s.gk, s.gna), s.bs_), s.as_), s.v0);
    s.v0 = ref_add(a5, m5);
    a = vaddr(s.v0);
    s.n = ref_add(ref_mul(hh_b[0][a], s.n), hh_a[0][a]);
    s.m = ref_add(ref_mul(hh_b[1][a], s.m), hh_a[1][a]);
    s.h = ref_add(ref_mul(hh_b[2][a], s.h), hh_a[2][a]);
    n2 = ref_mul(s.n, s.n);
    s.gk = ref_mul(ref_mul(n2, n2), s.gbar_k);
    s.gna = ref_mul(ref_mul(ref_mul(s.m, s.m), ref_mul(s.m, s.h)), s.gbar_na);
    return s.v0;
  endfunction

endpackage
