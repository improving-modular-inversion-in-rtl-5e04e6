// tb_rower -- self-checking testbench of one rower channel.
//
// The channel used is the last one of the default base (m = 130957, the
// modulus with the largest fold constant H). The testbench derives the
// channel residues of M/m, C = 2^(N*W-1) and P with wide-integer %, and
// the K and D constants by Fermat inversion (m is prime), independently of
// the package's Euclidean routines. It then issues random operations
// back-to-back, one per cycle, plus the extreme operands 0 and m-1, and
// checks every result two cycles after issue against
// |pre(a,b) * K + D|_m. It also checks the +-1 flags and the Cox bits.
module tb_rower;
  import rns_pkg::*;

  localparam int unsigned W  = 17;
  localparam int unsigned T  = 6;
  localparam int unsigned CH = 11;
  localparam modvec_t     MODS = def_moduli();
  localparam logic [31:0] M  = MODS[CH];

  function automatic logic [31:0] mi_of();
    logic [63:0] r = 1;
    for (int j = 0; j < 12; j++) if (j != CH) r = (r * 64'(MODS[j])) % 64'(M);
    return 32'(r);
  endfunction
  localparam logic [31:0] MI = mi_of();
  localparam logic [255:0] CW = 256'd1 << (12*17-1);
  localparam logic [31:0] CR = 32'(CW % 256'(M));
  localparam logic [31:0] PR = 32'({64'd0, P192} % 256'(M));

  logic clk = 0, rst_n = 0;
  rop_t op;
  logic [W-1:0] a, b, r;
  logic [T+1:0] cx;
  logic p1, m1;

  rower #(.W(W), .T(T), .MOD(M), .MI_RES(MI), .C_RES(CR), .P_RES(PR)) dut (
    .clk, .rst_n, .op_i(op), .a_i(a), .b_i(b), .r_o(r), .cox_o(cx),
    .is_p1_o(p1), .is_m1_o(m1));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic logic [63:0] pw(logic [63:0] x, logic [63:0] e);
    logic [63:0] res = 1;
    x = x % 64'(M);
    while (e != 0) begin
      if (e[0]) res = (res * x) % 64'(M);
      x = (x * x) % 64'(M);
      e = e >> 1;
    end
    return res;
  endfunction
  function automatic logic [63:0] inv(logic [63:0] x); return pw(x, 64'(M) - 2); endfunction
  function automatic logic [63:0] md(longint x);
    longint r0 = x % longint'(M);
    if (r0 < 0) r0 += longint'(M);
    return 64'(r0);
  endfunction

  logic [63:0] minv, i2, i4;
  function automatic logic [63:0] kexp(ksel_t s);
    case (s)
      K_ONE:  return 1;
      K_MINV: return minv;
      K_INV2: return i2;
      K_INV4: return i4;
      K_MI:   return 64'(MI);
      K_NMI:  return md(-longint'(MI));
      default: return 0;
    endcase
  endfunction
  // |(k*P + j*C) * inv(2^r) * Minv|
  function automatic logic [63:0] dv(int k, int j, logic [63:0] ir);
    longint v = longint'(k) * longint'(PR) + longint'(j) * longint'(CR);
    return (((md(v) * ir) % 64'(M)) * minv) % 64'(M);
  endfunction
  function automatic logic [63:0] dexp(dsel_t s);
    case (s)
      D_ZERO:    return 0;
      D_HAT0:    return (64'(CR) * minv) % 64'(M);
      D_HAT1:    return (md(longint'(CR) + 1) * minv) % 64'(M);
      D_HATP:    return (md(longint'(CR) + longint'(PR)) * minv) % 64'(M);
      D_DIV1_0:  return dv(0, 1, i2);
      D_DIV1_1:  return dv(1, 1, i2);
      D_DIV2_M1: return dv(-1, 3, i4);
      D_DIV2_0:  return dv(0, 3, i4);
      D_DIV2_1:  return dv(1, 3, i4);
      D_DIV2_2:  return dv(2, 3, i4);
      D_SUM_M1:  return dv(-1, 2, i4);
      D_SUM_0:   return dv(0, 2, i4);
      D_SUM_1:   return dv(1, 2, i4);
      D_SUM_2:   return dv(2, 2, i4);
      D_DIF_M1:  return dv(-1, 4, i4);
      D_DIF_0:   return dv(0, 4, i4);
      D_DIF_1:   return dv(1, 4, i4);
      D_DIF_2:   return dv(2, 4, i4);
      D_FINP:    return md(longint'(PR) - longint'(CR));
      D_FINM:    return md(longint'(PR) + longint'(CR));
      default:   return 0;
    endcase
  endfunction

  function automatic logic [63:0] expect_of(rop_t o, logic [W-1:0] x, logic [W-1:0] y);
    logic [63:0] pre;
    case (o.pre)
      PRE_A:   pre = 64'(x);
      PRE_ADD: pre = (64'(x) + 64'(y)) % 64'(M);
      PRE_SUB: pre = md(longint'(x) - longint'(y));
      default: pre = 0;
    endcase
    return (pre * kexp(o.k) + dexp(o.d)) % 64'(M);
  endfunction

  logic [63:0] exp_q [$];

  task automatic issue(rop_t o, logic [W-1:0] x, logic [W-1:0] y);
    op = o; a = x; b = y;
    exp_q.push_back(expect_of(o, x, y));
    @(posedge clk); #1;
  endtask

  // results appear two cycles after issue: compare on each falling edge
  int issued_before = 0;
  always @(negedge clk) if (rst_n) begin
    if (exp_q.size() > 0 && issued_before >= 2) begin
      checks++;
      if (64'(r) != exp_q[0]) begin
        failures++;
        if (failures < 10) $display("mismatch: got %0d expected %0d", r, exp_q[0]);
      end
      // Cox bits and flags follow r
      checks++;
      if (cx != {r[W-1 -: T], r[1:0]} ||
          p1 != (64'(r) == dexp(D_HAT1)) ||
          m1 != (64'(r) == (md(longint'(CR) - 1) * minv) % 64'(M))) failures++;
      void'(exp_q.pop_front());
    end
  end
  always @(posedge clk) if (rst_n) issued_before <= issued_before + 1;

  rop_t o;
  initial begin
    minv = inv(64'(MI)); i2 = inv(2); i4 = inv(4);
    op = '{PRE_ZERO, K_ONE, D_ZERO}; a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // two idle operations to fill the pipeline whose results are also checked
    // extreme operands for every pre/k combination
    for (int pi = 0; pi < 4; pi++)
      for (int ki = 0; ki < 6; ki++) begin
        o = '{pre_t'(pi), ksel_t'(ki), D_ZERO};
        issue(o, W'(M - 1), W'(M - 1));
        issue(o, W'(M - 1), '0);
        issue(o, '0, W'(M - 1));
      end
    for (int i = 0; i < 20000; i++) begin
      o.pre = pre_t'($urandom_range(0, 3));
      o.k   = ksel_t'($urandom_range(0, 5));
      o.d   = dsel_t'($urandom_range(0, 19));
      issue(o, W'($urandom_range(0, int'(M) - 1)), W'($urandom_range(0, int'(M) - 1)));
    end
    // load constants hat(1) and hat(-1) through the unit to exercise the flags
    issue('{PRE_ZERO, K_ONE, D_HAT1}, '0, '0);
    issue('{PRE_A, K_ONE, D_ZERO}, W'((md(longint'(CR) - 1) * minv) % 64'(M)), '0);
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
