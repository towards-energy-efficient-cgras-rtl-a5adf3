// zsas: leading-zero shifting module of the improved SC multiplier
// (Zeros & Shifter & Adder & Subtractor).
//
// A small operand would lose all its ones against the Sobol cells, so each operand is
// first shifted left by its number of leading zeros (S_a, S_b), which puts its top one
// at the most significant position. The multiplier then has to undo S_a + S_b, and
// it already has to shift the ones count left by L = 2N - M (Eq. 1: a*b = N_1s *
// 2^(2N-M)), so the single shift left is S_f = L - (S_a + S_b). With N = 16 and
// M = 5, S_f ranges from -3 to 27 and is returned signed; a negative value means a
// right shift. A zero operand reports 15 leading zeros (the 4-bit maximum); its
// product is zero anyway. Combinational.
module zsas
  import sc_cgra_pkg::*;
#(
  parameter int M = sc_cgra_pkg::SEQ_M
) (
  input  logic [OP_N-1:0]        a,
  input  logic [OP_N-1:0]        b,
  output logic [OP_N-1:0]        a_n,
  output logic [OP_N-1:0]        b_n,
  output logic [3:0]             s_a,
  output logic [3:0]             s_b,
  output logic signed [SF_W-1:0] s_f
);

  localparam int L = 2 * OP_N - M;

  // leading zeros of a 16-bit word, saturated at 15
  function automatic logic [3:0] lzc(input logic [OP_N-1:0] v);
    logic [3:0] n;
    logic       seen;
    n    = 4'd15;
    seen = 1'b0;
    for (int i = OP_N - 1; i >= 1; i--) begin
      if (!seen && v[i]) begin
        n    = 4'(OP_N - 1 - i);
        seen = 1'b1;
      end
    end
    return n;
  endfunction

  logic [4:0] s_sum;   // adder: S_a + S_b

  always_comb begin
    s_a   = lzc(a);
    s_b   = lzc(b);
    a_n   = a << s_a;
    b_n   = b << s_b;
    s_sum = {1'b0, s_a} + {1'b0, s_b};
    s_f   = SF_W'(L) - SF_W'(s_sum);      // subtractor
  end

endmodule
