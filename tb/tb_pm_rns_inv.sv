// tb_pm_rns_inv -- end-to-end testbench of the PM-RNS inverter at its
// default configuration (192-bit P, 12 channels of 17 bits, t = 6).
//
// For each X (edge cases 1, 2, 3, 4, P-1, P-2, 2^k, then random values
// below P) it loads |X|_mi through the I/O port, starts an inversion and
// waits for done. The expected inverse is computed here with wide integer
// arithmetic, X^(P-2) mod P, independently of the design, and every residue
// of the result must match either X^-1 or X^-1 + P (the design returns S in
// (0, 2P)). Also checked per inversion: S * X = 1 mod P as a whole number
// rebuilt from the residues, the cycle count against the controller's
// schedule (5 + 3 * steps + 4, steps = main + inner iterations) and against
// the 1753-cycle figure reported for the 192-bit FPGA implementation, and
// the average main-loop iteration count against the expected 0.71 * 192
// and the average number of W-bit modular multiplications against 5474.
// Each mechanism of the algorithm -- division by 2, division by 4, a plus
// step, a minus step, a swap of U and V, termination through V3 and through
// U3 -- must occur at least once over the run.
module tb_pm_rns_inv;
  import rns_pkg::*;

  localparam int unsigned N = DEF_N, W = DEF_W;
  localparam modvec_t     MODS = def_moduli();
  localparam logic [191:0] P = P192;
  localparam int NRAND = 40;
  localparam longint NAVG = longint'(NRAND) + 64'd4;

  logic clk = 0, rst_n = 0;
  logic io_we = 0, start = 0;
  logic [$clog2(N)-1:0] io_ch = '0;
  logic [W-1:0] io_data = '0;
  logic [N-1:0][W-1:0] s;
  logic busy, done;
  pm_stats_t st;
  pm_end_t   endk;

  pm_rns_inv dut (
    .clk, .rst_n, .io_we_i(io_we), .io_ch_i(io_ch), .io_data_i(io_data), .start_i(start),
    .busy_o(busy), .done_o(done), .s_o(s), .stats_o(st), .end_o(endk),
    .cox_q_o(), .cox_s_o());

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_div2 = 0, n_div4 = 0, n_plus = 0, n_minus = 0, n_swap = 0;
  int n_end_v = 0, n_end_u = 0, n_inv = 0;
  longint sum_main = 0, max_cycles = 0, sum_mult = 0;

  function automatic logic [191:0] mulmodp(logic [191:0] a, logic [191:0] b);
    logic [383:0] prod;
    prod = {192'd0, a} * {192'd0, b};
    return 192'(prod % {192'd0, P});
  endfunction

  function automatic logic [191:0] inverse(logic [191:0] x);
    logic [191:0] r = 192'd1, e = P - 192'd2, base = x;
    while (e != 0) begin
      if (e[0]) r = mulmodp(r, base);
      base = mulmodp(base, base);
      e = e >> 1;
    end
    return r;
  endfunction

  // rebuild S from its residues by the CRT (the moduli are prime)
  function automatic logic [255:0] crt(logic [N-1:0][W-1:0] res);
    logic [255:0] mm = 256'd1, acc = '0, mi;
    logic [63:0] mir, inv, e, bb;
    for (int i = 0; i < int'(N); i++) mm = mm * 256'(MODS[i]);
    for (int i = 0; i < int'(N); i++) begin
      mi  = mm / 256'(MODS[i]);
      mir = 64'(mi % 256'(MODS[i]));
      inv = 1; e = 64'(MODS[i]) - 2; bb = mir;
      while (e != 0) begin
        if (e[0]) inv = (inv * bb) % 64'(MODS[i]);
        bb = (bb * bb) % 64'(MODS[i]);
        e = e >> 1;
      end
      acc = (acc + mi * 256'((64'(res[i]) * inv) % 64'(MODS[i]))) % mm;
    end
    return acc;
  endfunction

  task automatic invert(logic [191:0] x);
    logic [191:0] xi;
    logic [255:0] sv;
    logic [383:0] xp;
    logic ok_a, ok_b;
    int steps;
    for (int i = 0; i < int'(N); i++) begin
      io_ch = ($clog2(N))'(i); io_data = W'({64'd0, x} % 256'(MODS[i]));
      io_we = 1; @(posedge clk); #1 io_we = 0;
    end
    start = 1; @(posedge clk); #1 start = 0;
    while (!done) @(posedge clk);
    #1;
    xi = inverse(x);
    ok_a = 1; ok_b = 1;
    for (int i = 0; i < int'(N); i++) begin
      if (64'(s[i]) != 64'({64'd0, xi} % 256'(MODS[i])))              ok_a = 0;
      if (64'(s[i]) != 64'(({64'd0, xi} + {64'd0, P}) % 256'(MODS[i]))) ok_b = 0;
    end
    checks++;
    if (!(ok_a || ok_b)) begin
      failures++;
      $display("wrong inverse for X=%h", x);
    end
    sv = crt(s);
    xp = 384'(sv % {64'd0, P}) * {192'd0, x};
    checks++;
    if (sv == 0 || sv >= 2 * {64'd0, P} || (xp % {192'd0, P}) != 384'd1) begin
      failures++;
      $display("S out of range or S*X != 1 for X=%h", x);
    end
    steps = int'(st.main_iters) + int'(st.inner_iters);
    checks++;
    if (int'(st.cycles) != 5 + 3 * steps + 4 || int'(st.cycles) > 1753) begin
      failures++;
      $display("cycle count %0d for %0d steps", st.cycles, steps);
    end
    checks++;
    if (st.inner_iters != st.div2 + st.div4 || st.main_iters != st.plus + st.minus) failures++;
    n_div2 += int'(st.div2); n_div4 += int'(st.div4);
    n_plus += int'(st.plus); n_minus += int'(st.minus); n_swap += int'(st.swaps);
    if (endk == END_V_P1 || endk == END_V_M1) n_end_v++; else n_end_u++;
    n_inv++;
    if (x > 192'd4) begin
      sum_main += longint'(st.main_iters);
      sum_mult += longint'(N) * longint'(2 * steps + 2);
    end
    if (longint'(st.cycles) > max_cycles) max_cycles = longint'(st.cycles);
  endtask

  logic [191:0] x;
  int nrand_done = 0;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    invert(192'd1); invert(192'd2); invert(192'd3); invert(192'd4);
    invert(P - 192'd1); invert(P - 192'd2); invert(192'd1 << 100); invert(P >> 1);
    for (int k = 0; k < NRAND; k++) begin
      x = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      while (x >= P || x == 0) x = x >> 1;
      invert(x);
      nrand_done++;
    end
    // average main iterations over the random X: 0.71 * 192 = 136 expected
    checks++;
    if (sum_main / NAVG < 110 || sum_main / NAVG > 160) begin
      failures++;
      $display("average main iterations %0d out of range", sum_main / NAVG);
    end
    // W-bit modular multiplications: per channel two per step (the V3 and
    // the V1 division) plus the conversions into and out of hat form; the
    // expected average for this size is 5474
    checks++;
    if (sum_mult / NAVG < 4379 || sum_mult / NAVG > 6569) begin
      failures++;
      $display("average multiplication count %0d out of range", sum_mult / NAVG);
    end
    $display("average W-bit multiplications per inversion=%0d", sum_mult / NAVG);
    $display("inversions=%0d avg_main=%0d max_cycles=%0d div2=%0d div4=%0d plus=%0d minus=%0d swaps=%0d end_v=%0d end_u=%0d",
             n_inv, sum_main / NAVG, max_cycles, n_div2, n_div4, n_plus, n_minus,
             n_swap, n_end_v, n_end_u);
    checks++; if (n_div2  == 0) begin failures++; $display("no division by 2"); end
    checks++; if (n_div4  == 0) begin failures++; $display("no division by 4"); end
    checks++; if (n_plus  == 0) begin failures++; $display("no plus step"); end
    checks++; if (n_minus == 0) begin failures++; $display("no minus step"); end
    checks++; if (n_swap  == 0) begin failures++; $display("no swap"); end
    checks++; if (n_end_v == 0) begin failures++; $display("no end through V3"); end
    checks++; if (n_end_u == 0) begin failures++; $display("no end through U3"); end
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
