// cox -- computes |X|_4 of an RNS number held in hat form, in one cycle.
//
// For a hat value (xi_1 .. xi_n), xi_i = |(X + C) * Mi^-1|_mi, the CRT gives
//     X + C = sum_i xi_i * Mi - q * M,   q = floor(sum_i xi_i / m_i)
// so, with C = 0 mod 4,
//     |X|_4 = | s - q * |M|_4 |_4,       s = | sum_i |xi_i|_4 * |Mi|_4 |_4.
// q is estimated as in Kawamura's method, from the T most significant bits
// of each residue: q = floor(sum_i trunc_T(xi_i) / 2^T). The offset C is
// chosen near M/2 so that the estimate is exact for every X in (-P, P).
//
// Interface: in_i[i] carries {T MSBs, 2 LSBs} of channel i's rower output
// (T+2 bits per channel). q_o, s_o and mod4_o are registered: they refer to
// the rower outputs of the previous cycle (latency 1). q_o is ceil(log2 N)
// bits wide.
//
// From the source: the two sums (q from the T-bit MSBs, s from the 2-bit
// LSBs), both done in a single cycle over all channels, t = 6 and the width
// of q. This design's own choices: combining q and s into mod4_o here, and
// registering the outputs.
module cox
  import rns_pkg::*;
#(
  parameter int unsigned  N  = rns_pkg::DEF_N,
  parameter int unsigned  T  = rns_pkg::DEF_T,
  parameter modvec_t      MODULI = rns_pkg::def_moduli(),
  localparam int unsigned QW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N-1:0][T+1:0]     in_i,
  output logic [QW-1:0]           q_o,
  output logic [1:0]              s_o,
  output logic [1:0]              mod4_o
);

  localparam int unsigned SW = T + QW;   // width of the MSB sum

  typedef logic [N-1:0][1:0] m4vec_t;
  function automatic m4vec_t make_mi4();
    m4vec_t v;
    for (int unsigned i = 0; i < N; i++) v[i] = mi_mod4(MODULI, N, i);
    return v;
  endfunction
  localparam m4vec_t     MI4 = make_mi4();
  localparam logic [1:0] M4  = m_mod4(MODULI, N);

  logic [SW-1:0] msum;
  logic [1:0]    s_d, q_d;

  always_comb begin
    msum = '0;
    s_d  = '0;
    for (int unsigned i = 0; i < N; i++) begin
      msum = msum + SW'(in_i[i][T+1:2]);
      s_d  = s_d + 2'(in_i[i][1:0] * MI4[i]);
    end
  end

  assign q_d = msum[T +: 2];   // q mod 4 is all that |q*M|_4 needs

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_o    <= '0;
      s_o    <= '0;
      mod4_o <= '0;
    end else begin
      q_o    <= QW'(msum >> T);
      s_o    <= s_d;
      mod4_o <= s_d - 2'(q_d * M4);
    end
  end

endmodule
