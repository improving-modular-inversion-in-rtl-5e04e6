// rower -- the modular arithmetic unit of one RNS channel.
//
// Each cycle it accepts one operation and, two cycles later, delivers
//     r = | pre(a, b) * K + D |_MOD,   pre(a, b) in {a, a+b, a-b, 0}
// where K and D are taken from small constant tables of this channel (see
// rns_pkg). With the right K and D this single form covers every channel
// operation the PM-RNS inversion needs: conversion into hat form
// (K = Mi^-1), loading a constant (pre = 0), the exact divisions div2r by 2
// and by 4 of a hat value, of a sum or of a difference of hat values
// (K = 2^-1 or 4^-1, D corrects for the offset C and adds the multiple of P
// that makes the division exact), and the final conversion out of hat form
// (K = +-Mi, D = P -+ C).
//
// Pipeline: stage 1 forms pre(a, b) mod MOD and looks up K and D; stage 2
// multiplies, reduces and adds D. Latency 2 cycles, one operation per cycle.
// The modulus must be of the form 2^W - H with H < 2^(W/2 - 1); the W x W
// product is then reduced by repeated folding (hi * H + lo) and at most two
// conditional subtractions.
//
// Outputs besides r_o: cox_o carries the T most significant and the 2 least
// significant bits of r_o to the Cox (the t+2 wires of the architecture);
// is_p1_o / is_m1_o flag that r_o equals the hat form of +1 / -1.
//
// The rower's existence, its place in each channel and its +, -, x and
// division operations follow the source; the single multiply-add form, the
// constant tables, the two-stage pipeline and the folding reduction are this
// design's own.
module rower
  import rns_pkg::*;
#(
  parameter int unsigned W      = rns_pkg::DEF_W,
  parameter int unsigned T      = rns_pkg::DEF_T,
  parameter logic [63:0] MOD    = 64'd131071,
  parameter logic [63:0] MI_RES = rns_pkg::mi_res(rns_pkg::def_moduli(), rns_pkg::DEF_N, 0),
  parameter logic [63:0] C_RES  = rns_pkg::pow2mod(rns_pkg::DEF_N * rns_pkg::DEF_W - 1, 64'd131071),
  parameter logic [63:0] P_RES  = rns_pkg::widemod(1024'(rns_pkg::P192), rns_pkg::DEF_PW, 64'd131071)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  rop_t         op_i,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] r_o,
  output logic [T+1:0] cox_o,
  output logic         is_p1_o,
  output logic         is_m1_o
);

  localparam logic [W:0]   MODW = (W+1)'(MOD);
  localparam logic [W-1:0] H    = W'((64'd1 << W) - 64'(MOD));
  localparam int unsigned  NK   = 6;
  localparam int unsigned  ND   = 20;

  typedef logic [NK-1:0][W-1:0] ktab_t;
  typedef logic [ND-1:0][W-1:0] dtab_t;

  function automatic ktab_t make_ktab();
    ktab_t t;
    for (int i = 0; i < int'(NK); i++) t[i] = W'(kconst(ksel_t'(i), MOD, MI_RES));
    return t;
  endfunction

  function automatic dtab_t make_dtab();
    dtab_t t;
    for (int i = 0; i < int'(ND); i++) t[i] = W'(dconst(dsel_t'(i), MOD, MI_RES, C_RES, P_RES));
    return t;
  endfunction

  localparam ktab_t  KTAB  = make_ktab();
  localparam dtab_t  DTAB  = make_dtab();
  localparam logic [W-1:0] HAT_P1 = W'(dconst(D_HAT1, MOD, MI_RES, C_RES, P_RES));
  localparam logic [W-1:0] HAT_M1 = W'(hat_m1(MOD, MI_RES, C_RES));

  // reduce a value below 2^(2W+1) modulo MOD = 2^W - H
  function automatic logic [W-1:0] reduce(logic [2*W:0] x);
    logic [2*W:0] v;
    v = x;
    for (int i = 0; i < 4; i++)
      v = (v >> W) * (2*W+1)'(H) + (v & (2*W+1)'({W{1'b1}}));
    for (int i = 0; i < 2; i++)
      if (v >= (2*W+1)'(MOD)) v = v - (2*W+1)'(MOD);
    return W'(v);
  endfunction

  // ---------------------------------------------------------------- stage 1
  logic [W:0]   sum, dif;
  logic [W-1:0] pre_d;

  always_comb begin
    sum = {1'b0, a_i} + {1'b0, b_i};
    if (sum >= MODW) sum = sum - MODW;
    dif = {1'b0, a_i} - {1'b0, b_i};
    if (a_i < b_i) dif = dif + MODW;
    unique case (op_i.pre)
      PRE_A:    pre_d = a_i;
      PRE_ADD:  pre_d = sum[W-1:0];
      PRE_SUB:  pre_d = dif[W-1:0];
      default:  pre_d = '0;
    endcase
  end

  logic [W-1:0] pre_q, k_q, d_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_q <= '0;
      k_q   <= '0;
      d_q   <= '0;
    end else begin
      pre_q <= pre_d;
      k_q   <= KTAB[op_i.k];
      d_q   <= DTAB[op_i.d];
    end
  end

  // ---------------------------------------------------------------- stage 2
  logic [2*W-1:0] prod;
  logic [W-1:0]   red;
  logic [W:0]     acc;

  always_comb begin
    prod = {{W{1'b0}}, pre_q} * {{W{1'b0}}, k_q};
    red  = reduce({1'b0, prod});
    acc  = {1'b0, red} + {1'b0, d_q};
    if (acc >= MODW) acc = acc - MODW;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_o <= '0;
    else        r_o <= acc[W-1:0];
  end

  assign cox_o   = {r_o[W-1 -: T], r_o[1:0]};
  assign is_p1_o = (r_o == HAT_P1);
  assign is_m1_o = (r_o == HAT_M1);

endmodule
