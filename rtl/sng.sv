// sng: parallel stochastic number generator (SNG) with a fixed Sobol sequence.
//
// The operand x, read as the fraction x / 2^OP_N, is compared with LEN Sobol
// cells at once; bit i of the stream is 1 when cell i < x, so the stream holds about
// x / 2^OP_N * LEN ones. The cells are constants (wires to supply or ground, no
// storage), taken from segment SEG of Sobol dimension DIM: cells
// SEG*LEN .. SEG*LEN+LEN-1 of the sequence in sc_cgra_pkg. The comparator
// sense (cell < operand) and the parallel, fixed-sequence structure follow the
// described design; the segment scheme is this design's own.
// Purely combinational.
module sng
  import sc_cgra_pkg::*;
#(
  parameter int DIM     = 0,
  parameter int SEG     = 0,
  parameter int LEN = sc_cgra_pkg::SEQ_LEN
) (
  input  logic [OP_N-1:0]    x,
  output logic [LEN-1:0] stream
);

  for (genvar i = 0; i < LEN; i++) begin : g_cell
    localparam logic [OP_N-1:0] CELL = sobol_cell(DIM, SEG * LEN + i);
    assign stream[i] = (CELL < x);
  end

endmodule
