// chaos_pkg: shared types and constants of the chaotic image stream cipher.
//
// All map states and map parameters are 32-bit signed fixed point numbers with
// 4 integer bits (sign included) and 28 fraction bits (Q4.28), as the design
// specifies. Every arithmetic result is truncated to Q4.28 and wraps on
// overflow; that truncate/wrap rule is this design's choice.
//
// The cipher key is the full set of map parameters, initial values and the PN
// seed: nine 32-bit words, 288 bits. DEFAULT_KEY holds the design's published
// constants (logistic r = 3.99 and mu = 1.8 are the values printed in the
// block diagrams; the prose also quotes r = 4 and mu = 0.5).
package chaos_pkg;

  localparam int WL   = 32;  // word length
  localparam int FRAC = 28;  // fraction length

  typedef logic signed [WL-1:0] fix_t;

  localparam fix_t FIX_ONE  = fix_t'(32'sh1000_0000);  // 1.0
  localparam fix_t FIX_HALF = fix_t'(32'sh0800_0000);  // 0.5

  // Cipher key, 9 x 32 = 288 bits.
  typedef struct packed {
    fix_t        log_r;     // logistic map parameter r
    fix_t        log_x0;    // logistic map initial value
    fix_t        lozi_a;    // Lozi alpha
    fix_t        lozi_b;    // Lozi beta
    fix_t        lozi_x0;   // Lozi initial x
    fix_t        lozi_y0;   // Lozi initial y
    fix_t        tent_mu;   // tent map factor mu
    fix_t        tent_x0;   // tent map initial value
    logic [31:0] pn_seed;   // LFSR initial value
  } key_t;

  localparam key_t DEFAULT_KEY = '{
    log_r:   32'h3FD7_0A3D,   // 3.9899999983608723
    log_x0:  32'h0F07_23AB,   // 0.93924300000071526
    lozi_a:  32'h1666_6666,   // 1.3999999985098839
    lozi_b:  32'h04CC_CCCD,   // 0.30000000074505806
    lozi_x0: 32'h086F_2A5A,   // 0.52713999897241592
    lozi_y0: 32'h06D6_C0D7,   // 0.42743000015616417
    tent_mu: 32'h1CCC_CCCD,   // 1.8000000007450581
    tent_x0: 32'h086F_303A,   // 0.52714560180902481
    pn_seed: 32'h0BFD_97C8
  };

  // Q4.28 x Q4.28 -> Q4.28: full 64-bit product, keep bits [59:28]
  // (truncation toward minus infinity, wrap on overflow).
  function automatic fix_t fmul(fix_t a, fix_t b);
    logic signed [2*WL-1:0] p;
    p = a * b;
    return p[FRAC +: WL];
  endfunction

endpackage
