// tb_workloads -- runs the PM-RNS inverter in each field size and channel
// configuration of the published evaluation other than the default one
// (192-bit 12 x 17, covered by tb_pm_rns_inv): 192-bit fields with 9 x 22
// and 7 x 29, 384-bit fields with 18 x 22, 14 x 29 and 12 x 33. The primes
// are NIST P-192 and P-384; each base is the N largest primes below 2^W.
// Every configuration inverts several values, checked against wide-integer
// exponentiation, and must finish each within the cycle count reported for
// its field size (1753 for 192 bits, 3518 for 384 bits).
module tb_workloads;
  import rns_pkg::*;

  localparam logic [383:0] P384 =
    384'hffffffff_ffffffff_ffffffff_ffffffff_ffffffff_ffffffff_ffffffff_fffffffe_ffffffff_00000000_00000000_ffffffff;

  function automatic modvec_t mods(int sel);
    modvec_t v = '0;
    case (sel)
      0: begin   // 9 x 22 (the first 9 of the 18 x 22 list)
        v[0] = 64'd4194301; v[1] = 64'd4194287; v[2] = 64'd4194277; v[3] = 64'd4194271;
        v[4] = 64'd4194247; v[5] = 64'd4194217; v[6] = 64'd4194199; v[7] = 64'd4194191;
        v[8] = 64'd4194187; v[9] = 64'd4194181; v[10] = 64'd4194173; v[11] = 64'd4194167;
        v[12] = 64'd4194143; v[13] = 64'd4194137; v[14] = 64'd4194131; v[15] = 64'd4194107;
        v[16] = 64'd4194103; v[17] = 64'd4194023;
      end
      1: begin   // 29-bit primes (first 7 for 7 x 29, all 14 for 14 x 29)
        v[0] = 64'd536870909; v[1] = 64'd536870879; v[2] = 64'd536870869; v[3] = 64'd536870849;
        v[4] = 64'd536870839; v[5] = 64'd536870837; v[6] = 64'd536870819; v[7] = 64'd536870813;
        v[8] = 64'd536870791; v[9] = 64'd536870779; v[10] = 64'd536870767; v[11] = 64'd536870743;
        v[12] = 64'd536870729; v[13] = 64'd536870723;
      end
      default: begin   // 12 x 33
        v[0] = 64'd8589934583; v[1] = 64'd8589934567; v[2] = 64'd8589934543;
        v[3] = 64'd8589934513; v[4] = 64'd8589934487; v[5] = 64'd8589934307;
        v[6] = 64'd8589934291; v[7] = 64'd8589934289; v[8] = 64'd8589934271;
        v[9] = 64'd8589934237; v[10] = 64'd8589934211; v[11] = 64'd8589934207;
      end
    endcase
    return v;
  endfunction

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NC = 5;
  logic [NC-1:0] done;
  int ch [NC], fl [NC], mc [NC];

  tb_inv_cfg #(.N(9),  .W(22), .PW(192), .P(P192), .MODULI(mods(0)), .NINV(6), .MAX_CYCLES(1753), .SEED(11))
    c0 (.clk, .rst_n, .done_o(done[0]), .checks_o(ch[0]), .failures_o(fl[0]), .max_cycles_o(mc[0]));
  tb_inv_cfg #(.N(7),  .W(29), .PW(192), .P(P192), .MODULI(mods(1)), .NINV(6), .MAX_CYCLES(1753), .SEED(12))
    c1 (.clk, .rst_n, .done_o(done[1]), .checks_o(ch[1]), .failures_o(fl[1]), .max_cycles_o(mc[1]));
  tb_inv_cfg #(.N(18), .W(22), .PW(384), .P(P384), .MODULI(mods(0)), .NINV(6), .MAX_CYCLES(3518), .SEED(13))
    c2 (.clk, .rst_n, .done_o(done[2]), .checks_o(ch[2]), .failures_o(fl[2]), .max_cycles_o(mc[2]));
  tb_inv_cfg #(.N(14), .W(29), .PW(384), .P(P384), .MODULI(mods(1)), .NINV(6), .MAX_CYCLES(3518), .SEED(14))
    c3 (.clk, .rst_n, .done_o(done[3]), .checks_o(ch[3]), .failures_o(fl[3]), .max_cycles_o(mc[3]));
  tb_inv_cfg #(.N(12), .W(33), .PW(384), .P(P384), .MODULI(mods(2)), .NINV(6), .MAX_CYCLES(3518), .SEED(15))
    c4 (.clk, .rst_n, .done_o(done[4]), .checks_o(ch[4]), .failures_o(fl[4]), .max_cycles_o(mc[4]));

  int checks, failures;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < NC; i++) begin
      checks += ch[i]; failures += fl[i];
      $display("configuration %0d: checks=%0d failures=%0d max_cycles=%0d", i, ch[i], fl[i], mc[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NC; i++) begin checks += ch[i]; failures += fl[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
