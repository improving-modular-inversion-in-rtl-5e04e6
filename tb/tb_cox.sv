// tb_cox -- self-checking testbench of the Cox at the default configuration
// (12 channels, t = 6, default moduli).
//
// Part 1 feeds hat-form vectors of random integers X in (-P, P), built here
// with wide-integer arithmetic: xi_i = |(X + C) * Mi^-1|_mi, C = 2^203. The
// Cox must return mod4 = |X|_4, the exact CRT quotient
// q = (sum xi_i * Mi - (X + C)) / M and s = |sum xi_i * Mi|_4.
// Part 2 feeds arbitrary random bit patterns and checks q and s against the
// definition of the estimate: q = floor(sum trunc_t(xi_i) / 2^t),
// s = |sum |xi_i|_4 * |Mi|_4|_4. Outputs are checked one cycle after input.
module tb_cox;
  import rns_pkg::*;

  localparam int unsigned N = 12, W = 17, T = 6;
  localparam modvec_t MODS = def_moduli();

  logic clk = 0, rst_n = 0;
  logic [N-1:0][T+1:0] in;
  logic [3:0] q;
  logic [1:0] s, m4;

  cox #(.N(N), .T(T), .MODULI(MODS)) dut (
    .clk, .rst_n, .in_i(in), .q_o(q), .s_o(s), .mod4_o(m4));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [255:0] M, Mi [N], CC;
  logic [63:0] minv [N];

  function automatic logic [63:0] pw(logic [63:0] x, logic [63:0] e, logic [63:0] m);
    logic [63:0] r = 1;
    x = x % m;
    while (e != 0) begin
      if (e[0]) r = (r * x) % m;
      x = (x * x) % m;
      e = e >> 1;
    end
    return r;
  endfunction

  logic [W-1:0] xi [N];
  logic [255:0] z, acc;
  logic [3:0]  q_exp;
  logic [1:0]  s_exp, m4_exp;
  int          sgn;
  logic [191:0] mag;
  int          msum;

  initial begin
    M = 1;
    for (int i = 0; i < int'(N); i++) M = M * 256'(MODS[i]);
    CC = 256'd1 << (N * W - 1);
    for (int i = 0; i < int'(N); i++) begin
      Mi[i] = M / 256'(MODS[i]);
      minv[i] = pw(64'(Mi[i] % 256'(MODS[i])), 64'(MODS[i]) - 2, 64'(MODS[i]));
    end
    in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      if (k < 2000) begin
        // hat vector of a random X in (-P, P)
        mag = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        if (k % 4 == 1) mag = 192'($urandom_range(0, 3));
        if (mag >= P192) mag = P192 - 1;
        sgn = $urandom_range(0, 1);
        z = sgn ? CC - 256'(mag) : CC + 256'(mag);     // X + C
        acc = 0;
        for (int i = 0; i < int'(N); i++) begin
          xi[i] = W'(((64'(z % 256'(MODS[i]))) * minv[i]) % 64'(MODS[i]));
          acc = acc + 256'(xi[i]) * Mi[i];
        end
        q_exp  = 4'((acc - z) / M);
        s_exp  = acc[1:0];
        m4_exp = sgn ? 2'(-mag[1:0]) : mag[1:0];
      end else begin
        msum = 0; s_exp = 0;
        for (int i = 0; i < int'(N); i++) begin
          xi[i] = W'($urandom);
          msum += int'(xi[i][W-1 -: T]);
          s_exp = s_exp + 2'(xi[i][1:0] * 2'(Mi[i] % 4));
        end
        q_exp  = 4'(msum >> T);
        m4_exp = s_exp - 2'(q_exp[1:0] * 2'(M % 4));
      end
      for (int i = 0; i < int'(N); i++) in[i] = {xi[i][W-1 -: T], xi[i][1:0]};
      @(posedge clk); #1;
      checks++;
      if (q != q_exp || s != s_exp || m4 != m4_exp) begin
        failures++;
        if (failures < 10) $display("k=%0d q %0d/%0d s %0d/%0d mod4 %0d/%0d", k, q, q_exp, s, s_exp, m4, m4_exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
