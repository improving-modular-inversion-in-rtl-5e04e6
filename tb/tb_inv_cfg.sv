// tb_inv_cfg -- checker used by tb_workloads: one PM-RNS inverter in a
// given configuration (field size, channel count and width, moduli, prime)
// and the stimulus and checks for it.
//
// It inverts NINV values (1, P-1, then pseudo-random ones below P). The
// expected inverse is X^(P-2) mod P, computed here with 1024-bit integer
// arithmetic; each result residue must match X^-1 or X^-1 + P. The cycle
// count of each inversion must not exceed MAX_CYCLES, the count reported for
// the FPGA implementation of that field size. When finished it raises done_o
// and holds its check and failure counts on its outputs.
module tb_inv_cfg
  import rns_pkg::*;
#(
  parameter int unsigned    N  = 12,
  parameter int unsigned    W  = 17,
  parameter int unsigned    PW = 192,
  parameter logic [PW-1:0]  P  = PW'(P192),
  parameter modvec_t        MODULI = def_moduli(),
  parameter int             NINV = 6,
  parameter int             MAX_CYCLES = 1753,
  parameter int unsigned    SEED = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done_o,
  output int   checks_o,
  output int   failures_o,
  output int   max_cycles_o
);

  typedef logic [1023:0] big_t;

  logic io_we = 0, start = 0;
  logic [$clog2(N)-1:0] io_ch = '0;
  logic [W-1:0] io_data = '0;
  logic [N-1:0][W-1:0] s;
  logic busy, done;
  pm_stats_t st;
  pm_end_t   endk;

  pm_rns_inv #(.N(N), .W(W), .T(6), .PW(PW), .P(P), .MODULI(MODULI)) dut (
    .clk, .rst_n, .io_we_i(io_we), .io_ch_i(io_ch), .io_data_i(io_data), .start_i(start),
    .busy_o(busy), .done_o(done), .s_o(s), .stats_o(st), .end_o(endk),
    .cox_q_o(), .cox_s_o());

  function automatic big_t inverse(big_t x);
    big_t r = 1, e = big_t'(P) - 2, b = x, pp = big_t'(P);
    while (e != 0) begin
      if (e[0]) r = (r * b) % pp;
      b = (b * b) % pp;
      e = e >> 1;
    end
    return r;
  endfunction

  int checks = 0, failures = 0, maxc = 0;
  assign checks_o = checks;
  assign failures_o = failures;
  assign max_cycles_o = maxc;

  task automatic invert(big_t x);
    big_t xi;
    logic ok_a, ok_b;
    for (int i = 0; i < int'(N); i++)
      @(negedge clk) begin
        io_we = 1; io_ch = ($clog2(N))'(i); io_data = W'(x % big_t'(MODULI[i]));
      end
    @(negedge clk) begin io_we = 0; start = 1; end
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    xi = inverse(x);
    ok_a = 1; ok_b = 1;
    for (int i = 0; i < int'(N); i++) begin
      if (big_t'(s[i]) != xi % big_t'(MODULI[i]))                ok_a = 0;
      if (big_t'(s[i]) != (xi + big_t'(P)) % big_t'(MODULI[i]))  ok_b = 0;
    end
    checks++;
    if (!(ok_a || ok_b)) begin
      failures++;
      $display("N=%0d W=%0d: wrong inverse of %h", N, W, x);
    end
    checks++;
    if (int'(st.cycles) > MAX_CYCLES) begin
      failures++;
      $display("N=%0d W=%0d: %0d cycles", N, W, st.cycles);
    end
    if (int'(st.cycles) > maxc) maxc = int'(st.cycles);
  endtask

  big_t x;
  initial begin
    done_o = 0;
    void'($urandom(SEED));
    @(posedge rst_n);
    invert(1);
    invert(big_t'(P) - 1);
    for (int k = 0; k < NINV - 2; k++) begin
      x = '0;
      for (int j = 0; j < int'(PW) / 32; j++) x = (x << 32) | big_t'($urandom);
      x = x % big_t'(P);
      if (x == 0) x = 1;
      invert(x);
    end
    done_o = 1;
  end
endmodule
