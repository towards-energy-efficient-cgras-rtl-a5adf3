// nsc_mul: naive stochastic-computing multiplier core.
//
// Two parallel SNGs turn the operands into 2^M-bit streams (operand a against
// Sobol dimension 1, operand b against dimension 2, both from this PE's segment
// SEG), a SEQ_LEN-wide AND multiplies the streams bit by bit, the APC counts the ones
// (N_1s, so N_1s / 2^M ~= a/2^N * b/2^N) and a shifter scales the count back to an
// integer product by s_f. Used alone, s_f is L = 2N - M; inside the ISC-MUL it comes
// from the leading-zero shifting module. A negative s_f shifts right (this design's
// extension: the described shifter only shifts left). The structure follows the
// described NSC-MUL. M (log2 of the stream length per PE) defaults to the array's 5
// (32 cells); other values give the shorter and longer single-PE multipliers the
// design was explored with. Combinational.
module nsc_mul
  import sc_cgra_pkg::*;
#(
  parameter int SEG = 0,
  parameter int M   = sc_cgra_pkg::SEQ_M,
  localparam int LEN = 2 ** M
) (
  input  logic [OP_N-1:0]        a,
  input  logic [OP_N-1:0]        b,
  input  logic signed [SF_W-1:0] s_f,
  output logic [M:0]             n1s,
  output logic [MAG_W-1:0]       mag
);

  logic [LEN-1:0] seq_a, seq_b, prod;

  sng #(.DIM(0), .SEG(SEG), .LEN(LEN)) u_sng_a (.x(a), .stream(seq_a));
  sng #(.DIM(1), .SEG(SEG), .LEN(LEN)) u_sng_b (.x(b), .stream(seq_b));

  assign prod = seq_a & seq_b;

  apc #(.WIDTH(LEN)) u_apc (.bits(prod), .count(n1s));

  always_comb begin
    if (s_f >= 0) mag = MAG_W'(n1s) << s_f;
    else          mag = MAG_W'(n1s) >> (-s_f);
  end

endmodule
