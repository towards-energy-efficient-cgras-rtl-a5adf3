// sc_cgra_pkg: types, constants and the fixed Sobol cell function shared by the
// stochastic-computing CGRA (SC-CGRA).
//
// The SC-CGRA replaces the exact multiplier of each processing element (PE) with a
// stochastic multiplier: both operands are turned into 32-bit parallel bit-streams by
// comparing them with fixed Sobol low-discrepancy cells, the streams are AND-ed and
// the ones are counted. The numbers here follow the described design where it gives
// them: 16-bit multiplier operands, 32 cells per PE (the preferred ISC-MUL length),
// a 4x4 array and at most four PEs (128 cells) combined for one product. The data
// width (32), register-file depth (4), configuration depth (16 slots), data memory
// size (1024 words), opcode set and context-word layout are this design's own choice.
//
// Sobol cells: every PE holds one 32-cell segment of a 128-point Sobol sequence per
// operand (dimension 1 for operand a, dimension 2 for operand b, points in Gray-code
// order). Four neighbouring PEs holding segments 0..3 together hold the first 128
// points, so combining their counts gives a 128-long stream. Cell values are 16-bit
// binary fractions: cell = point * 2^16.
package sc_cgra_pkg;

  localparam int DATA_W     = 32;   // PE data word
  localparam int OP_N       = 16;   // ISC-MUL operand magnitude width (N)
  localparam int SEQ_LEN    = 32;   // cells per PE = bit-stream length (2^M)
  localparam int SEQ_M      = 5;    // M
  localparam int MAX_COMB   = 4;    // PEs combined for the longest stream (128 cells)
  localparam int CNT_W      = SEQ_M + 1;          // width of a ones count (0..SEQ_LEN)
  localparam int MAG_W      = 2 * OP_N + 1;       // magnitude of an SC product
  localparam int SF_W       = 7;                  // signed shift amount S_f
  localparam int RF_DEPTH   = 4;
  localparam int RF_AW      = 2;
  localparam int CFG_DEPTH  = 16;
  localparam int CFG_AW     = 4;
  localparam int DMEM_DEPTH = 1024;
  localparam int DMEM_AW    = 10;
  localparam int IMM_W      = 16;
  localparam int NNBR       = 8;    // mesh-plus inputs: N S E W and the four 2-hop PEs

  // ALU / PE operations
  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,   // hold output register
    OP_PASS = 4'd1,   // y = a (routing)
    OP_ADD  = 4'd2,   // adder-shifter: y = (a + b) >>> shr1
    OP_SUB  = 4'd3,   // y = a - b
    OP_MUL  = 4'd4,   // ISC-MUL: y ~= a * b
    OP_SHL  = 4'd5,   // y = a << b[4:0]
    OP_SHR  = 4'd6,   // y = a >>> b[4:0]
    OP_AND  = 4'd7,
    OP_OR   = 4'd8,
    OP_XOR  = 4'd9,
    OP_LD   = 4'd10,  // y = dmem[a + imm]
    OP_ST   = 4'd11   // dmem[a + imm] = b, output register held
  } op_e;

  // operand sources of a PE
  typedef enum logic [3:0] {
    SRC_N    = 4'd0,
    SRC_S    = 4'd1,
    SRC_E    = 4'd2,
    SRC_W    = 4'd3,
    SRC_N2   = 4'd4,
    SRC_S2   = 4'd5,
    SRC_E2   = 4'd6,
    SRC_W2   = 4'd7,
    SRC_RF   = 4'd8,
    SRC_IMM  = 4'd9,
    SRC_SELF = 4'd10,
    SRC_ZERO = 4'd11
  } src_e;

  // one configuration context of one PE (36 bits)
  typedef struct packed {
    op_e              op;
    logic             shr1;    // adder-shifter: shift the sum right by one
    src_e             src_a;
    src_e             src_b;
    logic [RF_AW-1:0] rf_ra;   // register read for src_a == SRC_RF
    logic [RF_AW-1:0] rf_rb;   // register read for src_b == SRC_RF
    logic             rf_we;   // also write the result to the register file
    logic [RF_AW-1:0] rf_wa;
    logic [IMM_W-1:0] imm;     // sign-extended immediate / address offset
  } ctx_t;

  localparam ctx_t CTX_NOP = '0;

  // data-memory request of one PE row
  typedef struct packed {
    logic               req;
    logic               we;
    logic [DMEM_AW-1:0] addr;
    logic [DATA_W-1:0]  wdata;
  } mem_req_t;

  // Cell idx (0..127) of Sobol dimension dim (0 or 1) as an OP_N-bit fraction.
  // Direction numbers v_k = m_k / 2^k: dimension 0 has m_k = 1, dimension 1 uses
  // the primitive polynomial x + 1, m_k = 2*m_(k-1) xor m_(k-1), m_1 = 1.
  function automatic logic [OP_N-1:0] sobol_cell(input int dim, input int idx);
    logic [OP_N-1:0] x;
    int              g;
    int              m;
    g = idx ^ (idx >> 1);
    x = '0;
    m = 1;
    for (int k = 1; k <= 7; k++) begin
      if (k > 1 && dim != 0) m = (m << 1) ^ m;
      if (((g >> (k - 1)) & 1) != 0) x = x ^ OP_N'(m << (OP_N - k));
    end
    return x;
  endfunction

endpackage
