// isc_mul: improved stochastic-computing multiplier (ISC-MUL) with signs.
//
// Sign and magnitude: the magnitudes go through the leading-zero shifting module
// (zsas), which normalises them and computes the final shift S_f, and then through
// the NSC-MUL core (two Sobol SNGs, AND, parallel counter, shifter). The product
// sign is the XOR of the operand signs. p is a two's-complement approximation of
// (-1)^(a_sgn^b_sgn) * a_mag * b_mag. n1s exposes the ones count, which is what
// neighbouring PEs combine for longer streams. All of this follows the described
// ISC-MUL; SEG selects which segment of the Sobol sequence this PE holds, and M sets
// the segment to 2^M cells (5, i.e. 32 cells, in the array; the single-PE lengths 8,
// 16 and 64 the design was explored with are M = 3, 4 and 6).
// Combinational (one PE cycle).
module isc_mul
  import sc_cgra_pkg::*;
#(
  parameter int SEG = 0,
  parameter int M   = sc_cgra_pkg::SEQ_M
) (
  input  logic [OP_N-1:0]         a_mag,
  input  logic                    a_sgn,
  input  logic [OP_N-1:0]         b_mag,
  input  logic                    b_sgn,
  output logic [M:0]              n1s,
  output logic signed [MAG_W:0]   p
);

  logic [OP_N-1:0]        a_n, b_n;
  logic [3:0]             s_a, s_b;
  logic signed [SF_W-1:0] s_f;
  logic [MAG_W-1:0]       mag;

  zsas #(.M(M)) u_zsas (
    .a(a_mag), .b(b_mag), .a_n(a_n), .b_n(b_n), .s_a(s_a), .s_b(s_b), .s_f(s_f)
  );

  nsc_mul #(.SEG(SEG), .M(M)) u_nsc (.a(a_n), .b(b_n), .s_f(s_f), .n1s(n1s), .mag(mag));

  always_comb begin
    if (a_sgn ^ b_sgn) p = -$signed({1'b0, mag});
    else               p =  $signed({1'b0, mag});
  end

endmodule
