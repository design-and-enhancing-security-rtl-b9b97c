// chaos_ref_pkg: reference models used by the testbenches.
//
// Bit-exact models of the Q4.28 maps, the LFSR and the cascade, written with
// 64-bit integer arithmetic (an arithmetic shift of the full product, then
// the low 32 bits), plus real-valued versions of each map used to check that
// one fixed point step stays within a few LSBs of the exact formula.
package chaos_ref_pkg;

  localparam real SCALE = 268435456.0;  // 2^28

  function automatic int rmul(int a, int b);
    longint p;
    p = longint'(a) * longint'(b);
    return int'(p >>> 28);
  endfunction

  function automatic real to_real(int v);
    return real'(v) / SCALE;
  endfunction

  function automatic int ref_logistic(int x, int r);
    return rmul(32'h1000_0000 - x, rmul(x, r));
  endfunction

  function automatic int ref_tent(int x, int mu);
    if (x <= 32'sh0800_0000) return rmul(x, mu);
    else                     return rmul(32'h1000_0000 - x, mu);
  endfunction

  function automatic int ref_lozi_x(int x, int y, int a);
    int ax;
    ax = (x < 0) ? -x : x;
    return (32'h1000_0000 + y) - rmul(ax, a);
  endfunction

  function automatic int unsigned ref_lfsr_next(int unsigned s, int unsigned poly);
    return {s[30:0], ^(s & poly)};
  endfunction

  // Real-valued maps, for tolerance checks.
  function automatic real real_logistic(real x, real r);
    return r * x * (1.0 - x);
  endfunction

  function automatic real real_tent(real x, real mu);
    return (x <= 0.5) ? mu * x : mu * (1.0 - x);
  endfunction

  function automatic real real_lozi_x(real x, real y, real a);
    return 1.0 - a * ((x < 0.0) ? -x : x) + y;
  endfunction

  // Cascade model: state of one key generator (chaotic part and PN part).
  typedef struct {
    int          fb;       // fed-back tent output
    int          y;        // Lozi y register
    int unsigned pn;       // LFSR state
    bit          started;
    // statistics of the last step
    bit          tent_low;
    bit          lozi_neg;
  } gen_t;

  // Key words in chaos_pkg::key_t order.
  typedef struct {
    int r, lx0, a, b, zx0, zy0, mu, tx0;
    int unsigned seed;
  } rkey_t;

  localparam rkey_t REF_DEFAULT_KEY = '{
    r:   32'h3FD7_0A3D, lx0: 32'h0F07_23AB, a:   32'h1666_6666, b:   32'h04CC_CCCD,
    zx0: 32'h086F_2A5A, zy0: 32'h06D6_C0D7, mu:  32'h1CCC_CCCD, tx0: 32'h086F_303A,
    seed: 32'h0BFD_97C8
  };

  // One step: returns the tent output (Q4.28) and updates the generator.
  function automatic int ref_cascade_step(ref gen_t g, input rkey_t k, output byte unsigned pn_byte);
    int xl, xz, xt, yz;
    int unsigned pn;
    if (!g.started) begin
      xl = ref_logistic(k.lx0, k.r);
      xz = k.zx0;
      yz = k.zy0;
      pn = k.seed;
    end else begin
      xl = ref_logistic(g.fb, k.r);
      xz = xl;
      yz = g.y;
      pn = g.pn;
    end
    g.lozi_neg = (xz < 0);
    g.y  = rmul(xz, k.b);
    xz   = ref_lozi_x(xz, yz, k.a);
    xt   = g.started ? xz : k.tx0;
    g.tent_low = (xt <= 32'sh0800_0000);
    xt   = ref_tent(xt, k.mu);
    g.fb = xt;
    pn_byte = pn[7:0];
    g.pn = ref_lfsr_next(pn, 32'h4010_2001);
    g.started = 1;
    return xt;
  endfunction

endpackage
