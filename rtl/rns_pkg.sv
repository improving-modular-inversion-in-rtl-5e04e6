// rns_pkg -- types, default configuration and elaboration-time constant
// arithmetic shared by the PM-RNS inverter.
//
// Numbers are held in a residue number system (RNS) of N odd, pairwise
// coprime W-bit moduli. Inside the inverter an integer X in (-P, P) is kept in
// "hat" form: channel i holds |(X + C) * Mi^-1|_mi, with Mi = M / mi, M the
// product of the moduli and C an offset that is 0 mod 4. That form lets the
// Cox recover |X|_4 from a few bits per channel (see cox.sv).
//
// What follows the source algorithm: n = 12 channels of w = 17 bits, t = 6
// truncated bits in the Cox, odd moduli only, the hat form, the div2r and
// mod4 operations. This design's own choices: the moduli (the twelve largest
// primes below 2^17, each of the form 2^17 - h with small h so that a product
// is reduced by folding), the field prime (NIST P-192) and C = 2^(N*W-1),
// which sits near M/2 so that the Cox's truncated estimate of q is exact
// for every X in (-P, P).
//
// Every rower operation computes |(pre(a, b)) * K + D|_m, where pre() is a,
// a+b, a-b or 0 and K, D come from small per-channel constant tables selected
// by the controller; ksel_t and dsel_t name the table entries.
package rns_pkg;

  localparam int unsigned NMAX = 32;           // largest channel count supported
  typedef logic [NMAX-1:0][63:0] modvec_t;     // moduli, channel 0 in [0]

  // Default configuration: 192-bit field, 12 x 17-bit channels, t = 6.
  localparam int unsigned DEF_N  = 12;
  localparam int unsigned DEF_W  = 17;
  localparam int unsigned DEF_T  = 6;
  localparam int unsigned DEF_PW = 192;
  localparam logic [191:0] P192 = 192'hffffffff_ffffffff_ffffffff_fffffffe_ffffffff_ffffffff;

  // operand pre-combination in the rower
  typedef enum logic [1:0] {PRE_A, PRE_ADD, PRE_SUB, PRE_ZERO} pre_t;

  // multiplier constant K
  typedef enum logic [2:0] {
    K_ONE, K_MINV, K_INV2, K_INV4, K_MI, K_NMI
  } ksel_t;

  // additive constant D. The _M1/_0/_1/_2 suffix is the multiple k of P
  // added before the exact division: k = -1, 0, 1, 2.
  typedef enum logic [4:0] {
    D_ZERO,                          // 0
    D_HAT0,                          // C*Minv            (hat of 0)
    D_HAT1,                          // (1+C)*Minv        (hat of 1)
    D_HATP,                          // (P+C)*Minv        (hat of P)
    D_DIV1_0, D_DIV1_1,              // (kP+C)/2 *Minv    div2r(X^,1)
    D_DIV2_M1, D_DIV2_0, D_DIV2_1, D_DIV2_2,   // (kP+3C)/4*Minv  div2r(X^,2)
    D_SUM_M1,  D_SUM_0,  D_SUM_1,  D_SUM_2,    // (kP+2C)/4*Minv  div2r(X^+Y^,2)
    D_DIF_M1,  D_DIF_0,  D_DIF_1,  D_DIF_2,    // (kP+4C)/4*Minv  div2r(X^-Y^,2)
    D_FINP,                          // P - C  (final conversion, +)
    D_FINM                           // P + C  (final conversion, -)
  } dsel_t;

  typedef struct packed {
    pre_t  pre;
    ksel_t k;
    dsel_t d;
  } rop_t;

  // result tags travelling down the rower pipeline with each operation
  typedef enum logic [2:0] {TAG_NONE, TAG_WR, TAG_V3, TAG_V1, TAG_FIN} tag_t;

  // event counts of one inversion, kept by the controller
  typedef struct packed {
    logic [15:0] main_iters;   // main-loop iterations (plus-minus steps)
    logic [15:0] inner_iters;  // inner-loop iterations (divisions of V3)
    logic [15:0] div2;         // inner steps dividing by 2 (r = 1)
    logic [15:0] div4;         // inner steps dividing by 4 (r = 2)
    logic [15:0] plus;         // plus-minus steps that took V + U
    logic [15:0] minus;        // plus-minus steps that took V - U
    logic [15:0] swaps;        // steps where U took the old V (v > u)
    logic [15:0] cycles;       // clock cycles from start to done
  } pm_stats_t;

  // how the main loop ended: which of V3 / U3 reached +-1
  typedef enum logic [1:0] {END_V_P1, END_V_M1, END_U_P1, END_U_M1} pm_end_t;

  // ---------------------------------------------------------------- moduli
  function automatic modvec_t def_moduli();
    modvec_t v = '0;
    v[0]  = 64'd131071; v[1]  = 64'd131063; v[2]  = 64'd131059;
    v[3]  = 64'd131041; v[4]  = 64'd131023; v[5]  = 64'd131011;
    v[6]  = 64'd131009; v[7]  = 64'd130987; v[8]  = 64'd130981;
    v[9]  = 64'd130973; v[10] = 64'd130969; v[11] = 64'd130957;
    return v;
  endfunction

  // ------------------------------------------------- constant arithmetic
  function automatic logic [63:0] mulmod(logic [63:0] a, logic [63:0] b, logic [63:0] m);
    logic [127:0] p;
    p = 128'(a) * 128'(b);
    return 64'(p % 128'(m));
  endfunction

  function automatic logic [63:0] addmod(logic [63:0] a, logic [63:0] b, logic [63:0] m);
    logic [64:0] s;
    s = 65'(a % m) + 65'(b % m);
    if (s >= 65'(m)) s = s - 65'(m);
    return 64'(s);
  endfunction

  function automatic logic [63:0] submod(logic [63:0] a, logic [63:0] b, logic [63:0] m);
    return addmod(a, m - (b % m), m);
  endfunction

  // modular inverse by the extended Euclidean algorithm
  function automatic logic [63:0] invmod(logic [63:0] a, logic [63:0] m);
    longint r0, r1, t0, t1, q, tmp;
    r0 = longint'(m); r1 = longint'(a) % longint'(m);
    t0 = 0; t1 = 1;
    while (r1 != 0) begin
      q = r0 / r1;
      tmp = r0 - q * r1; r0 = r1; r1 = tmp;
      tmp = t0 - q * t1; t0 = t1; t1 = tmp;
    end
    if (t0 < 0) t0 = t0 + longint'(m);
    return 64'(t0);
  endfunction

  // |2^e|_m
  function automatic logic [63:0] pow2mod(int unsigned e, logic [63:0] m);
    logic [63:0] r;
    r = 64'd1 % m;
    for (int unsigned i = 0; i < e; i++) r = addmod(r, r, m);
    return r;
  endfunction

  // |V|_m for a number of up to 1024 bits, of which the low `bits` are used
  function automatic logic [63:0] widemod(logic [1023:0] v, int unsigned bits, logic [63:0] m);
    logic [63:0] r;
    r = '0;
    for (int i = int'(bits) - 1; i >= 0; i--)
      r = addmod(addmod(r, r, m), {63'd0, v[i]}, m);
    return r;
  endfunction

  // |M / m_i|_{m_i}
  function automatic logic [63:0] mi_res(modvec_t mods, int unsigned n, int unsigned i);
    logic [63:0] r;
    r = 64'd1;
    for (int unsigned j = 0; j < n; j++)
      if (j != i) r = mulmod(r, mods[j] % mods[i], mods[i]);
    return r;
  endfunction

  // |M / m_i|_4 and |M|_4 for the Cox
  function automatic logic [1:0] mi_mod4(modvec_t mods, int unsigned n, int unsigned i);
    logic [1:0] r;
    r = 2'd1;
    for (int unsigned j = 0; j < n; j++)
      if (j != i) r = 2'(r * mods[j][1:0]);
    return r;
  endfunction

  function automatic logic [1:0] m_mod4(modvec_t mods, int unsigned n);
    logic [1:0] r;
    r = 2'd1;
    for (int unsigned j = 0; j < n; j++) r = 2'(r * mods[j][1:0]);
    return r;
  endfunction

  // ------------------------------------------- per-channel rower constants
  // mi = |M/m|_m, c = |C|_m, p = |P|_m
  function automatic logic [63:0] kconst(ksel_t s, logic [63:0] m, logic [63:0] mi);
    case (s)
      K_ONE:   return 64'd1;
      K_MINV:  return invmod(mi, m);
      K_INV2:  return (m + 64'd1) >> 1;
      K_INV4:  return invmod(64'd4, m);
      K_MI:    return mi % m;
      K_NMI:   return submod(64'd0, mi, m);
      default: return 64'd0;
    endcase
  endfunction

  // |k*P + j*C|_m for k in -1..2, j in 0..4
  function automatic logic [63:0] kp_jc(int k, int unsigned j, logic [63:0] m,
                                        logic [63:0] c, logic [63:0] p);
    logic [63:0] r;
    r = mulmod(64'(j), c, m);
    if (k < 0) r = submod(r, p, m);
    else       r = addmod(r, mulmod(64'(k), p, m), m);
    return r;
  endfunction

  function automatic logic [63:0] dconst(dsel_t s, logic [63:0] m, logic [63:0] mi,
                                         logic [63:0] c, logic [63:0] p);
    logic [63:0] minv, i2, i4;
    minv = invmod(mi, m);
    i2   = (m + 64'd1) >> 1;
    i4   = invmod(64'd4, m);
    case (s)
      D_ZERO:    return 64'd0;
      D_HAT0:    return mulmod(c, minv, m);
      D_HAT1:    return mulmod(addmod(c, 64'd1, m), minv, m);
      D_HATP:    return mulmod(addmod(c, p, m), minv, m);
      D_DIV1_0:  return mulmod(mulmod(kp_jc(0, 1, m, c, p), i2, m), minv, m);
      D_DIV1_1:  return mulmod(mulmod(kp_jc(1, 1, m, c, p), i2, m), minv, m);
      D_DIV2_M1: return mulmod(mulmod(kp_jc(-1, 3, m, c, p), i4, m), minv, m);
      D_DIV2_0:  return mulmod(mulmod(kp_jc(0, 3, m, c, p), i4, m), minv, m);
      D_DIV2_1:  return mulmod(mulmod(kp_jc(1, 3, m, c, p), i4, m), minv, m);
      D_DIV2_2:  return mulmod(mulmod(kp_jc(2, 3, m, c, p), i4, m), minv, m);
      D_SUM_M1:  return mulmod(mulmod(kp_jc(-1, 2, m, c, p), i4, m), minv, m);
      D_SUM_0:   return mulmod(mulmod(kp_jc(0, 2, m, c, p), i4, m), minv, m);
      D_SUM_1:   return mulmod(mulmod(kp_jc(1, 2, m, c, p), i4, m), minv, m);
      D_SUM_2:   return mulmod(mulmod(kp_jc(2, 2, m, c, p), i4, m), minv, m);
      D_DIF_M1:  return mulmod(mulmod(kp_jc(-1, 4, m, c, p), i4, m), minv, m);
      D_DIF_0:   return mulmod(mulmod(kp_jc(0, 4, m, c, p), i4, m), minv, m);
      D_DIF_1:   return mulmod(mulmod(kp_jc(1, 4, m, c, p), i4, m), minv, m);
      D_DIF_2:   return mulmod(mulmod(kp_jc(2, 4, m, c, p), i4, m), minv, m);
      D_FINP:    return submod(p, c, m);
      D_FINM:    return addmod(p, c, m);
      default:   return 64'd0;
    endcase
  endfunction

  // hat of -1: (C - 1) * Minv
  function automatic logic [63:0] hat_m1(logic [63:0] m, logic [63:0] mi, logic [63:0] c);
    return mulmod(submod(c, 64'd1, m), invmod(mi, m), m);
  endfunction

endpackage
