// sc_alu: the arithmetic unit of an SC-PE.
//
// Its multiplier is the stochastic ISC-MUL: operand magnitudes are saturated to 16
// bits, the sign goes round the multiplier through an XOR, and the approximate
// product is saturated to DATA_W bits. Its adder is an adder-shifter: the DATA_W+1
// bit sum is shifted right by one when shr1 is set (a context bit), which averages
// the products of two PEs that multiplied the same operands against different Sobol
// segments, giving the accuracy of a stream twice as long. SUB, the shifter and the
// adder-shifter are named by the described SC-ALU; PASS, SHL/SHR split and the logic
// operations are this design's choice. LD/ST results are formed in the PE, here they
// pass a. Combinational; one result per cycle.
module sc_alu
  import sc_cgra_pkg::*;
#(
  parameter int SEG = 0
) (
  input  op_e                       op,
  input  logic                      shr1,
  input  logic signed [DATA_W-1:0]  a,
  input  logic signed [DATA_W-1:0]  b,
  output logic signed [DATA_W-1:0]  y,
  output logic [CNT_W-1:0]          n1s
);

  localparam logic signed [MAG_W:0] PMAX = (MAG_W + 1)'(2 ** (DATA_W - 1) - 1);
  localparam logic signed [MAG_W:0] PMIN = -(MAG_W + 1)'(2 ** (DATA_W - 1));

  // magnitude of a two's-complement word, saturated to OP_N bits
  function automatic logic [OP_N-1:0] mag16(input logic signed [DATA_W-1:0] v);
    logic [DATA_W-1:0] m;
    m = v[DATA_W-1] ? DATA_W'(-v) : DATA_W'(v);
    if (m > DATA_W'(2 ** OP_N - 1)) return '1;
    return m[OP_N-1:0];
  endfunction

  logic signed [MAG_W:0]   p;
  logic signed [DATA_W:0]  sum;

  isc_mul #(.SEG(SEG)) u_mul (
    .a_mag(mag16(a)), .a_sgn(a[DATA_W-1]),
    .b_mag(mag16(b)), .b_sgn(b[DATA_W-1]),
    .n1s(n1s), .p(p)
  );

  always_comb begin
    sum = (DATA_W + 1)'(a) + (DATA_W + 1)'(b);
    unique case (op)
      OP_ADD:  y = shr1 ? DATA_W'(sum >>> 1) : DATA_W'(sum);
      OP_SUB:  y = a - b;
      OP_MUL:  begin
        if (p > PMAX)      y = PMAX[DATA_W-1:0];
        else if (p < PMIN) y = PMIN[DATA_W-1:0];
        else               y = p[DATA_W-1:0];
      end
      OP_SHL:  y = a << b[4:0];
      OP_SHR:  y = a >>> b[4:0];
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      default: y = a;            // NOP, PASS, LD, ST
    endcase
  end

endmodule
