// tb_pm_ctrl -- self-checking testbench of the PM-RNS controller alone.
//
// The channels are replaced by an integer model of what the rowers, the
// register file and the Cox compute: each register holds the plain integer
// that its hat form stands for, and each operation issued by the controller
// is interpreted by its meaning (load X, load P / 1 / 0, (a [+-] b + kP) / 2^r,
// +-a + P). The model delivers results with the datapath's latencies:
// write-back and +-1 flags two cycles after issue, mod 4 three cycles after.
// It counts a failure for any division that is not exact, any operand that
// leaves (-P, P), any operation the algorithm does not use, and any result
// S that is not in (0, 2P) or not the inverse of X modulo P. The prime used,
// P = 65521, is 1 mod 4, the other case from the 192-bit default.
module tb_pm_ctrl;
  import rns_pkg::*;

  localparam longint P = 65521;

  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] mod4 = '0;
  logic p1 = 0, m1 = 0;
  rop_t op;
  logic [2:0] ra, rb, wa;
  logic we, busy, done;
  pm_stats_t st;
  pm_end_t endk;

  pm_ctrl #(.PM4(2'(P % 4))) dut (
    .clk, .rst_n, .start_i(start), .mod4_i(mod4), .all_p1_i(p1), .all_m1_i(m1),
    .op_o(op), .raddr_a_o(ra), .raddr_b_o(rb), .we_o(we), .waddr_o(wa),
    .busy_o(busy), .done_o(done), .stats_o(st), .end_o(endk));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint R [8];
  longint res [int];
  int cyc = 0;
  int n_ops = 0;

  function automatic longint pmod(longint a, longint m);
    longint r = a % m;
    return (r < 0) ? r + m : r;
  endfunction

  // k of a "_M1 .. _2" group entry
  function automatic longint kof(dsel_t d, dsel_t m1);
    return longint'(int'(d) - int'(m1)) - 1;
  endfunction

  function automatic longint exec(rop_t o, longint a, longint b, output logic bad);
    longint pre, num, den;
    bad = 0;
    case (o.pre)
      PRE_A:   pre = a;
      PRE_ADD: pre = a + b;
      PRE_SUB: pre = a - b;
      default: pre = 0;
    endcase
    den = 0; num = 0;
    if (o == '{PRE_ZERO, K_ONE, D_ZERO}) return 0;
    if (o == '{PRE_A, K_MINV, D_HAT0}) return a;
    if (o == '{PRE_ZERO, K_ONE, D_HATP}) return P;
    if (o == '{PRE_ZERO, K_ONE, D_HAT1}) return 1;
    if (o == '{PRE_ZERO, K_ONE, D_HAT0}) return 0;
    if (o == '{PRE_A, K_MI, D_FINP}) return a + P;
    if (o == '{PRE_A, K_NMI, D_FINM}) return P - a;
    if (o.k == K_INV2 && o.pre == PRE_A && (o.d == D_DIV1_0 || o.d == D_DIV1_1)) begin
      den = 2; num = pre + (o.d == D_DIV1_1 ? P : 0);
    end else if (o.k == K_INV4 && o.pre == PRE_A && o.d >= D_DIV2_M1 && o.d <= D_DIV2_2) begin
      den = 4; num = pre + kof(o.d, D_DIV2_M1) * P;
    end else if (o.k == K_INV4 && o.pre == PRE_ADD && o.d >= D_SUM_M1 && o.d <= D_SUM_2) begin
      den = 4; num = pre + kof(o.d, D_SUM_M1) * P;
    end else if (o.k == K_INV4 && o.pre == PRE_SUB && o.d >= D_DIF_M1 && o.d <= D_DIF_2) begin
      den = 4; num = pre + kof(o.d, D_DIF_M1) * P;
    end else begin
      bad = 1;
      return 0;
    end
    if (num % den != 0) bad = 1;
    return num / den;
  endfunction

  // inputs for the new cycle: flags of the op issued 2 cycles ago, mod 4 of 3 ago
  always @(posedge clk) begin
    #1;
    cyc++;
    p1   = res.exists(cyc - 2) && res[cyc - 2] == 1;
    m1   = res.exists(cyc - 2) && res[cyc - 2] == -1;
    mod4 = res.exists(cyc - 3) ? 2'(pmod(res[cyc - 3], 4)) : 2'd0;
  end

  // issue (read operands now) then write-back of the op issued 2 cycles ago
  always @(negedge clk) if (rst_n) begin
    logic bad;
    longint v;
    if (op != '{PRE_ZERO, K_ONE, D_ZERO}) begin
      v = exec(op, R[ra], R[rb], bad);
      n_ops++;
      checks++;
      if (bad || (v <= -P || v >= 2 * P)) begin
        failures++;
        if (failures < 10) $display("bad operation %p on %0d, %0d", op, R[ra], R[rb]);
      end
      res[cyc] = v;
    end
    if (we) R[wa] = res.exists(cyc - 2) ? res[cyc - 2] : 0;
    if (res.exists(cyc - 8)) res.delete(cyc - 8);
  end

  function automatic longint inv_ref(longint x);
    longint r = 1, b = x, e = P - 2;
    while (e != 0) begin
      if (e[0]) r = (r * b) % P;
      b = (b * b) % P;
      e = e >> 1;
    end
    return r;
  endfunction

  task automatic invert(longint x);
    int t0;
    R[6] = x;
    start = 1; @(posedge clk); #2 start = 0;
    t0 = cyc;
    while (!done) @(posedge clk);
    #2;
    checks++;
    if (R[7] <= 0 || R[7] >= 2 * P || pmod(R[7], P) != inv_ref(x)) begin
      failures++;
      $display("X=%0d: result %0d, expected %0d (mod P)", x, R[7], inv_ref(x));
    end
    checks++;
    if (int'(st.cycles) != 5 + 3 * (int'(st.main_iters) + int'(st.inner_iters)) + 4) begin
      failures++;
      $display("X=%0d: %0d cycles", x, st.cycles);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) R[i] = 0;
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    @(posedge clk); #2;
    for (longint x = 1; x <= 300; x++) invert(x);
    for (longint x = P - 300; x < P; x++) invert(x);
    for (int k = 0; k < 400; k++) invert(longint'($urandom_range(1, int'(P) - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
