// pm_rns_inv -- modular inverter over F_P for numbers in a residue number
// system, using the plus-minus (PM-RNS) algorithm.
//
// Given X (0 < X < P, gcd(X, P) = 1) as N residues x_i = |X|_mi, it returns
// S with S = X^-1 (mod P) and 0 < S < 2P, again as N residues. There is no
// base extension: every step is one channel-parallel rower operation, and
// the only cross-channel logic is the Cox, which returns |V|_4 of a rower
// result so that the controller can choose between V + U and V - U and the
// exact divisions by 2 and 4.
//
// Structure (one column per channel, all channels in lock step):
//   chan_regs[i] -- 8-word register file, I/O write port, 2 read ports
//   rower[i]     -- |pre(a, b) * K + D|_mi, 2-cycle pipeline
//   cox          -- q and s of the CRT sum, hence mod 4, 1 cycle
//   pm_ctrl      -- the algorithm, issuing one rower operation per cycle
//
// Interface: while idle, write the residues of X one per cycle, io_we_i = 1
// with io_ch_i = i and io_data_i = x_i (into register slot 6 of channel i),
// then pulse start_i. busy_o is high until done_o pulses; s_o then holds the residues
// of S and stays valid until the next inversion ends. stats_o counts the
// events of the last inversion (cycles, loop iterations, plus and minus
// steps, swaps), end_o says which of V3 / U3 reached +-1 and with what sign.
// cox_q_o / cox_s_o show the Cox's q and s for the rower results of the
// previous cycle (N >= 2).
//
// Timing: about 3 cycles per inner or plus-minus step, 0.71 * log2 P main
// iterations on average, so roughly 700 cycles for a 192-bit P.
//
// The channel / rower / Cox / controller organisation and the Cox's
// one-cycle CRT sum follow the source's architecture. The source's
// architecture also routes q into the rowers and has an N-to-1 output mux
// fed back to every channel, used for base extension in the RNS processor
// it adapts; PM-RNS needs neither, and they are not built. The W-bit input
// bus follows the source; the result comes out on a parallel N x W port,
// where the source does not show how it is read out.
module pm_rns_inv
  import rns_pkg::*;
#(
  parameter int unsigned N      = rns_pkg::DEF_N,
  parameter int unsigned W      = rns_pkg::DEF_W,
  parameter int unsigned T      = rns_pkg::DEF_T,
  parameter int unsigned PW     = rns_pkg::DEF_PW,
  parameter logic [PW-1:0] P    = PW'(rns_pkg::P192),
  parameter modvec_t     MODULI = rns_pkg::def_moduli()
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                io_we_i,
  input  logic [$clog2(N)-1:0] io_ch_i,
  input  logic [W-1:0]        io_data_i,
  input  logic                start_i,
  output logic                busy_o,
  output logic                done_o,
  output logic [N-1:0][W-1:0] s_o,
  output pm_stats_t           stats_o,
  output pm_end_t             end_o,
  output logic [$clog2(N)-1:0] cox_q_o,
  output logic [1:0]          cox_s_o
);

  rop_t       op;
  logic [2:0] raddr_a, raddr_b, waddr;
  logic       we;
  logic [N-1:0][T+1:0] cox_bits;
  logic [N-1:0]        p1, m1;
  logic [1:0]          mod4;

  for (genvar i = 0; i < int'(N); i++) begin : g_ch
    logic [W-1:0] a, b, r;

    chan_regs #(.W(W), .DEPTH(8)) u_regs (
      .clk, .rst_n,
      .io_we_i   (io_we_i && io_ch_i == ($clog2(N))'(i)),
      .io_addr_i (3'd6),
      .io_data_i (io_data_i),
      .we_i      (we),
      .waddr_i   (waddr),
      .wdata_i   (r),
      .raddr_a_i (raddr_a),
      .rdata_a_o (a),
      .raddr_b_i (raddr_b),
      .rdata_b_o (b),
      .res_o     (s_o[i])
    );

    rower #(
      .W      (W),
      .T      (T),
      .MOD    (MODULI[i]),
      .MI_RES (mi_res(MODULI, N, i)),
      .C_RES  (pow2mod(N * W - 1, MODULI[i])),
      .P_RES  (widemod(1024'(P), PW, MODULI[i]))
    ) u_rower (
      .clk, .rst_n,
      .op_i    (op),
      .a_i     (a),
      .b_i     (b),
      .r_o     (r),
      .cox_o   (cox_bits[i]),
      .is_p1_o (p1[i]),
      .is_m1_o (m1[i])
    );
  end

  cox #(.N(N), .T(T), .MODULI(MODULI)) u_cox (
    .clk, .rst_n,
    .in_i   (cox_bits),
    .q_o    (cox_q_o),
    .s_o    (cox_s_o),
    .mod4_o (mod4)
  );

  pm_ctrl #(.PM4(P[1:0])) u_ctrl (
    .clk, .rst_n,
    .start_i   (start_i),
    .mod4_i    (mod4),
    .all_p1_i  (&p1),
    .all_m1_i  (&m1),
    .op_o      (op),
    .raddr_a_o (raddr_a),
    .raddr_b_o (raddr_b),
    .we_o      (we),
    .waddr_o   (waddr),
    .busy_o    (busy_o),
    .done_o    (done_o),
    .stats_o   (stats_o),
    .end_o     (end_o)
  );

endmodule
