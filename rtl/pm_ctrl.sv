// pm_ctrl -- sequencer of the plus-minus RNS modular inversion (PM-RNS).
//
// It runs, on all channels at once (every channel receives the same rower
// operation and register addresses), the binary extended Euclidean
// algorithm in which comparisons are replaced by the plus-minus rule:
//
//   init:   V3 = X^, U3 = P^, V1 = 1^, U1 = 0^, u = v = 0      (^ = hat form)
//   while V3 != +-1 and U3 != +-1:
//     while V3 even:                       (inner loop)
//       r = 2 if V3 = 0 mod 4 else 1
//       V3 = V3 / 2^r ; V1 = (V1 + kP) / 2^r ; v += r
//     V* = V
//     if V3 + U3 = 0 mod 4: V = (V + U) / 4   else V = (V - U) / 4
//     if v > u: U = V*, swap u and v
//     v += 1
//   S = +-V1 + P (or +-U1 + P), converted out of hat form
//
// Every "/ 2^r" is one rower operation (div2r). The multiple k of P that
// makes the division of the "1" operand exact comes from its residue mod 4.
// The controller tracks that residue (b) for V3, V1, U3 and U1: each new V3
// or V1 result passes through the Cox, which returns its mod 4 three cycles
// after the operation was issued. Equality of V3 with +-1 is flagged by the
// rowers two cycles after issue.
//
// The "3" and "1" operands live in three register slots each (V, U and a
// free slot). A plus-minus step writes the new V into the free slot, so
// "U = V*" is a renaming of slot pointers, not a copy.
//
// Timing: every step, inner or plus-minus, issues the V3 operation (cycle 0)
// and the V1 operation (cycle 1), then waits one cycle, so the next step
// issues in cycle 3, when the Cox result for the new V3 is available.
// Initialisation takes 5 cycles and the final conversion 4.
//
// Interface: start_i (one cycle, while idle) begins an inversion of the
// residues already in register slot 6. done_o pulses when the result is in
// slot 7. op_o / raddr_*_o drive the rowers and register read ports in the
// issue cycle; we_o / waddr_o the register write port two cycles later,
// when the rower result appears.
//
// Assertions at the end check that the V, U and free slots stay distinct,
// that the input slot is never overwritten and that done_o only pulses once
// the controller is back in its idle state. They use rst_n only as their
// "disable iff" condition. A lint tool may therefore report rst_n as used
// both synchronously and asynchronously; no flip-flop samples it
// synchronously.
//
// The algorithm, the b / u / v bookkeeping and the +-1 termination test
// follow the source. The schedule, the slot renaming and the statistics
// outputs are this design's own.
module pm_ctrl
  import rns_pkg::*;
#(
  parameter logic [1:0] PM4 = 2'd3     // |P|_4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic [1:0]  mod4_i,      // Cox: mod 4 of the op issued 3 cycles ago
  input  logic        all_p1_i,    // rowers: result of the op issued 2 cycles ago is hat(+1)
  input  logic        all_m1_i,    //                                             is hat(-1)
  output rop_t        op_o,
  output logic [2:0]  raddr_a_o,
  output logic [2:0]  raddr_b_o,
  output logic        we_o,
  output logic [2:0]  waddr_o,
  output logic        busy_o,
  output logic        done_o,
  output pm_stats_t   stats_o,
  output pm_end_t     end_o
);

  localparam logic [2:0] SLOT_X   = 3'd6;
  localparam logic [2:0] SLOT_RES = 3'd7;

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_DECIDE, S_ISSUE1, S_GAP, S_FIN, S_WAIT} state_t;

  state_t      state;
  logic [2:0]  icnt;                  // init operation counter
  logic [1:0]  pV, pU, pF;            // slot pointers (0..2)
  logic [1:0]  bV3_q, bV1_q, bU3, bU1;
  logic        eqVp1, eqVm1, eqUp1, eqUm1;
  logic        eqVsp1, eqVsm1;        // flags of V* saved for a swap
  logic [1:0]  bV3s;                  // mod 4 of V3* saved for a swap
  logic [15:0] u, v;
  logic        outer_top;             // next decision is at the top of the main loop
  logic        step_pm, step_plus, step_swap, step_r2;
  logic        src_u, src_neg;
  pm_stats_t   st;
  pm_end_t     endk;

  // tag / write-address pipeline following each issued operation
  tag_t        tag_s0, tag1, tag2, tag3;
  logic [2:0]  wa_s0, wa1, wa2;

  logic [1:0]  bV3e, bV1e, bsum, k4;
  logic        fin_now;

  // index of the D entry for multiple k of P, given the _M1 entry of a group
  function automatic dsel_t dsel_k(dsel_t m1, logic [1:0] kk);
    logic [1:0] idx;
    idx = kk + 2'd1;             // k = 3 is taken as k = -1
    return dsel_t'(5'(m1) + {3'd0, idx});
  endfunction

  always_comb begin
    bV3e    = (tag3 == TAG_V3) ? mod4_i : bV3_q;
    bV1e    = (tag3 == TAG_V1) ? mod4_i : bV1_q;
    fin_now = outer_top && (eqVp1 || eqVm1 || eqUp1 || eqUm1);
    bsum    = step_plus ? (bV1e + bU1) : (bV1e - bU1);
    k4      = 2'(-(step_pm ? bsum : bV1e) * PM4);   // k = -b * P^-1 mod 4 (P^-1 = P mod 4)

    op_o      = '{PRE_ZERO, K_ONE, D_ZERO};
    raddr_a_o = '0;
    raddr_b_o = '0;
    tag_s0    = TAG_NONE;
    wa_s0     = '0;
    unique case (state)
      S_INIT: begin
        unique case (icnt)
          3'd0: begin   // V3 = hat(X)
            op_o = '{PRE_A, K_MINV, D_HAT0}; raddr_a_o = SLOT_X;
            tag_s0 = TAG_V3; wa_s0 = {1'b0, pV};
          end
          3'd1: begin op_o = '{PRE_ZERO, K_ONE, D_HATP}; tag_s0 = TAG_WR; wa_s0 = {1'b0, pU}; end
          3'd2: begin op_o = '{PRE_ZERO, K_ONE, D_HAT1}; tag_s0 = TAG_WR; wa_s0 = 3'd3 + 3'(pV); end
          3'd3: begin op_o = '{PRE_ZERO, K_ONE, D_HAT0}; tag_s0 = TAG_WR; wa_s0 = 3'd3 + 3'(pU); end
          default: ;
        endcase
      end
      S_DECIDE: begin
        if (fin_now) begin
          // nothing issued: the last V1 result is written at the end of this cycle
        end else if (!bV3e[0]) begin
          // inner loop: V3 = V3 / 2^r, exact
          op_o = bV3e[1] ? '{PRE_A, K_INV2, D_DIV1_0} : '{PRE_A, K_INV4, D_DIV2_0};
          raddr_a_o = {1'b0, pV};
          tag_s0 = TAG_V3; wa_s0 = {1'b0, pV};
        end else begin
          // plus-minus step: V3 = (V3 +- U3) / 4 into the free slot
          op_o = ((bV3e + bU3) == 2'd0) ? '{PRE_ADD, K_INV4, D_SUM_0} : '{PRE_SUB, K_INV4, D_DIF_0};
          raddr_a_o = {1'b0, pV}; raddr_b_o = {1'b0, pU};
          tag_s0 = TAG_V3; wa_s0 = {1'b0, pF};
        end
      end
      S_ISSUE1: begin
        if (step_pm) begin
          op_o = step_plus ? '{PRE_ADD, K_INV4, dsel_k(D_SUM_M1, k4)}
                           : '{PRE_SUB, K_INV4, dsel_k(D_DIF_M1, k4)};
          raddr_a_o = 3'd3 + 3'(pV); raddr_b_o = 3'd3 + 3'(pU);
          wa_s0 = 3'd3 + 3'(pF);
        end else begin
          op_o = step_r2 ? '{PRE_A, K_INV4, dsel_k(D_DIV2_M1, k4)}
                         : (bV1e[0] ? '{PRE_A, K_INV2, D_DIV1_1} : '{PRE_A, K_INV2, D_DIV1_0});
          raddr_a_o = 3'd3 + 3'(pV);
          wa_s0 = 3'd3 + 3'(pV);
        end
        tag_s0 = TAG_V1;
      end
      S_FIN: begin
        op_o = src_neg ? '{PRE_A, K_NMI, D_FINM} : '{PRE_A, K_MI, D_FINP};
        raddr_a_o = 3'd3 + 3'(src_u ? pU : pV);
        tag_s0 = TAG_FIN; wa_s0 = SLOT_RES;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; icnt <= '0;
      pV <= 2'd0; pU <= 2'd1; pF <= 2'd2;
      bV3_q <= '0; bV1_q <= '0; bU3 <= '0; bU1 <= '0; bV3s <= '0;
      eqVp1 <= 1'b0; eqVm1 <= 1'b0; eqUp1 <= 1'b0; eqUm1 <= 1'b0;
      eqVsp1 <= 1'b0; eqVsm1 <= 1'b0;
      u <= '0; v <= '0; outer_top <= 1'b0;
      step_pm <= 1'b0; step_plus <= 1'b0; step_swap <= 1'b0; step_r2 <= 1'b0;
      src_u <= 1'b0; src_neg <= 1'b0;
      tag1 <= TAG_NONE; tag2 <= TAG_NONE; tag3 <= TAG_NONE;
      wa1 <= '0; wa2 <= '0;
      st <= '0; endk <= END_V_P1;
      done_o <= 1'b0;
    end else begin
      tag1 <= tag_s0; tag2 <= tag1; tag3 <= tag2;
      wa1  <= wa_s0;  wa2  <= wa1;
      done_o <= 1'b0;
      if (state != S_IDLE) st.cycles <= st.cycles + 16'd1;

      // results coming back
      if (tag2 == TAG_V3) begin eqVp1 <= all_p1_i; eqVm1 <= all_m1_i; end
      if (tag3 == TAG_V3) bV3_q <= mod4_i;
      if (tag3 == TAG_V1) bV1_q <= mod4_i;

      unique case (state)
        S_IDLE: if (start_i) begin
          state <= S_INIT; icnt <= '0;
          pV <= 2'd0; pU <= 2'd1; pF <= 2'd2;
          bU3 <= PM4; bV1_q <= 2'd1; bU1 <= 2'd0;
          eqUp1 <= 1'b0; eqUm1 <= 1'b0;
          u <= '0; v <= '0; outer_top <= 1'b1;
          st <= '0;
        end
        S_INIT: begin
          icnt <= icnt + 3'd1;
          if (icnt == 3'd4) state <= S_DECIDE;   // one spare cycle for the U1 write
        end
        S_DECIDE: begin
          if (fin_now) begin
            src_u   <= !(eqVp1 || eqVm1);
            src_neg <= (eqVp1 || eqVm1) ? eqVm1 : eqUm1;
            endk    <= (eqVp1 || eqVm1) ? (eqVm1 ? END_V_M1 : END_V_P1)
                                        : (eqUm1 ? END_U_M1 : END_U_P1);
            state   <= S_FIN;
          end else if (!bV3e[0]) begin
            step_pm <= 1'b0;
            step_r2 <= !bV3e[1];
            v <= v + (bV3e[1] ? 16'd1 : 16'd2);
            outer_top <= 1'b0;
            st.inner_iters <= st.inner_iters + 16'd1;
            if (bV3e[1]) st.div2 <= st.div2 + 16'd1;
            else         st.div4 <= st.div4 + 16'd1;
            state <= S_ISSUE1;
          end else begin
            step_pm   <= 1'b1;
            step_plus <= ((bV3e + bU3) == 2'd0);
            step_swap <= (v > u);
            bV3s      <= bV3e;
            eqVsp1    <= eqVp1;
            eqVsm1    <= eqVm1;
            outer_top <= 1'b1;
            st.main_iters <= st.main_iters + 16'd1;
            if ((bV3e + bU3) == 2'd0) st.plus  <= st.plus + 16'd1;
            else                      st.minus <= st.minus + 16'd1;
            state <= S_ISSUE1;
          end
        end
        S_ISSUE1: begin
          if (step_pm) begin
            if (step_swap) begin
              pU <= pV; pV <= pF; pF <= pU;
              bU3 <= bV3s; bU1 <= bV1e;
              eqUp1 <= eqVsp1; eqUm1 <= eqVsm1;
              u <= v; v <= u + 16'd1;
              st.swaps <= st.swaps + 16'd1;
            end else begin
              pV <= pF; pF <= pV;
              v <= v + 16'd1;
            end
          end
          state <= S_GAP;
        end
        S_GAP:  state <= S_DECIDE;
        S_FIN:  state <= S_WAIT;
        S_WAIT: if (tag2 == TAG_FIN) begin
          done_o <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the three slot pointers always name three different slots; a result is
  // never written over the input word; done only ends a running inversion
  a_slots_distinct: assert property (@(posedge clk) disable iff (!rst_n)
    pV != pU && pV != pF && pU != pF && pV < 2'd3 && pU < 2'd3 && pF < 2'd3)
    else $error("pm_ctrl: slot pointers collide");
  a_input_kept: assert property (@(posedge clk) disable iff (!rst_n)
    !(we_o && waddr_o == SLOT_X))
    else $error("pm_ctrl: write-back to the input slot");
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
    done_o |-> state == S_IDLE)
    else $error("pm_ctrl: done while busy");

  assign we_o    = (tag2 != TAG_NONE);
  assign waddr_o = wa2;
  assign busy_o  = (state != S_IDLE);
  assign stats_o = st;
  assign end_o   = endk;

endmodule
