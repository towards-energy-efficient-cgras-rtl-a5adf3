// tb_sc_cgra: end-to-end run of the SC-CGRA at its default size.
//
// Kernel: y[k] = a[k] * b[k] for NITER elements, with the product made accurate by
// combining two PEs (quality scaling): PE(0,0) and PE(1,1) multiply the same
// operands against different Sobol segments and PE(1,0)'s adder-shifter averages
// the two products, the equivalent of a 64-cell stream. The single-PE product of
// PE(1,1) is also stored, through a two-hop mesh-plus link. The loop is modulo
// scheduled with initiation interval 4 (four context slots):
//   slot 0: PE(0,1), PE(1,0) increment their address counters (register file);
//           PE(2,0) stores the previous scaled product y[k-1]
//   slot 1: PE(0,1) loads a[k], PE(1,0) loads b[k]; PE(2,0) counts
//   slot 2: PE(0,0) and PE(1,1) multiply a[k] * b[k] (ISC-MUL)
//   slot 3: PE(1,0) adds the two products and shifts right by one; PE(3,1) stores
//           the PE(1,1) product z[k] (operand from two rows up); PE(3,1) counts in slot 0
// The host loads contexts and data, starts 4*NITER+1 cycles, waits for done and
// reads back y and z, which must equal the reference model bit for bit; the run must
// take exactly n_cycles + 2 cycles from start to done (start registration, drain).
// A second kernel makes two PEs of a row load at once, which must raise the
// conflict flag. Every mechanism used is
// counted and must occur.
module tb_sc_cgra;
  import sc_cgra_pkg::*;
  import tb_sc_ref_pkg::*;

  localparam int NITER  = 64;
  localparam int A_BASE = 0;
  localparam int B_BASE = 128;
  localparam int Y_BASE = 257;   // 256 is scratch for the first (empty) store
  localparam int Z_BASE = 400;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, cfg_we, dm_we, start, busy, done, mem_conflict;
  logic [3:0] cfg_slot, cfg_pe;
  ctx_t cfg_wdata;
  logic [9:0] dm_addr;
  logic [31:0] dm_wdata, dm_rdata;
  logic [4:0] ii;
  logic [31:0] n_cycles;
  logic [31:0] pe_out [16];

  sc_cgra dut (
    .clk, .rst_n, .cfg_we, .cfg_slot, .cfg_pe, .cfg_wdata, .dm_we, .dm_addr, .dm_wdata,
    .dm_rdata, .start, .ii, .n_cycles, .busy, .done, .mem_conflict, .pe_out
  );

  int a [NITER], b [NITER];

  // mechanism counters
  int n_slot_switch = 0, n_ld = 0, n_st = 0, n_mul = 0, n_zsas = 0, n_scale = 0;
  int n_hop2 = 0, n_neg = 0, n_conflict = 0, n_run_cycles = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (busy) n_run_cycles++;
    if (dut.ctx_valid && dut.slot != 0) n_slot_switch++;
    for (int r = 0; r < 4; r++) if (dut.row_req[r].req) begin
      if (dut.row_req[r].we) n_st++; else n_ld++;
    end
    if (mem_conflict) n_conflict++;
    if (dut.u_array.g_row[0].g_col[0].u_pe.ctx_q.op == OP_MUL) begin
      n_mul++;
      if (dut.u_array.g_row[0].g_col[0].u_pe.u_alu.u_mul.s_a != 0 ||
          dut.u_array.g_row[0].g_col[0].u_pe.u_alu.u_mul.s_b != 0) n_zsas++;
    end
    if (dut.u_array.g_row[1].g_col[1].u_pe.ctx_q.op == OP_MUL) n_mul++;
    if (dut.u_array.g_row[1].g_col[0].u_pe.ctx_q.op == OP_ADD &&
        dut.u_array.g_row[1].g_col[0].u_pe.ctx_q.shr1) n_scale++;
    if (dut.u_array.g_row[3].g_col[1].u_pe.ctx_q.op == OP_ST &&
        dut.u_array.g_row[3].g_col[1].u_pe.ctx_q.src_b == SRC_N2) n_hop2++;
  end

  task automatic put_ctx(input int slot, input int r, input int c, input op_e op,
                         input src_e sa, input src_e sb, input int imm,
                         input logic rf_we, input logic shr1);
    ctx_t x;
    x = CTX_NOP;
    x.op = op; x.src_a = sa; x.src_b = sb; x.imm = 16'(imm);
    x.rf_we = rf_we; x.rf_wa = 0; x.rf_ra = 0; x.rf_rb = 0; x.shr1 = shr1;
    @(negedge clk);
    cfg_we = 1; cfg_slot = 4'(slot); cfg_pe = 4'(r * 4 + c); cfg_wdata = x;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic dm_write(input int addr, input int v);
    @(negedge clk);
    dm_we = 1; dm_addr = 10'(addr); dm_wdata = v;
    @(negedge clk);
    dm_we = 0;
  endtask

  task automatic run(input int vii, input int n, output int cycles);
    @(negedge clk);
    start = 1; ii = 5'(vii); n_cycles = n;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int cyc;
    rst_n = 0; cfg_we = 0; dm_we = 0; start = 0; cfg_slot = 0; cfg_pe = 0; cfg_wdata = CTX_NOP;
    dm_addr = 0; dm_wdata = 0; ii = 1; n_cycles = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // operands: full-range, small (leading zeros) and negative values
    for (int k = 0; k < NITER; k++) begin
      a[k] = int'(16'($urandom)) - 32768;
      b[k] = int'(16'($urandom)) - 32768;
      if (k % 3 == 1) a[k] = a[k] >>> ($urandom % 12);
      if (k % 4 == 2) b[k] = b[k] >>> ($urandom % 12);
      dm_write(A_BASE + k, a[k]);
      dm_write(B_BASE + k, b[k]);
    end

    // the modulo-scheduled kernel
    put_ctx(0, 0, 1, OP_ADD,  SRC_RF,   SRC_IMM, 1,          1, 0);
    put_ctx(1, 0, 1, OP_LD,   SRC_RF,   SRC_ZERO, A_BASE - 1, 0, 0);
    put_ctx(0, 1, 0, OP_ADD,  SRC_RF,   SRC_IMM, 1,          1, 0);
    put_ctx(1, 1, 0, OP_LD,   SRC_RF,   SRC_ZERO, B_BASE - 1, 0, 0);
    put_ctx(2, 0, 0, OP_MUL,  SRC_E,    SRC_S,   0,          0, 0);
    put_ctx(2, 1, 1, OP_MUL,  SRC_N,    SRC_W,   0,          0, 0);
    put_ctx(3, 1, 0, OP_ADD,  SRC_N,    SRC_E,   0,          0, 1);
    put_ctx(0, 2, 0, OP_ST,   SRC_RF,   SRC_N,   Y_BASE - 1, 0, 0);
    put_ctx(1, 2, 0, OP_ADD,  SRC_RF,   SRC_IMM, 1,          1, 0);
    put_ctx(3, 3, 1, OP_ST,   SRC_RF,   SRC_N2,  Z_BASE - 1, 0, 0);
    put_ctx(0, 3, 1, OP_ADD,  SRC_RF,   SRC_IMM, 1,          1, 0);

    run(4, 4 * NITER + 1, cyc);
    checks++;
    if (cyc != 4 * NITER + 3) begin
      failures++;
      $display("FAIL run took %0d cycles, expected %0d", cyc, 4 * NITER + 3);
    end

    for (int k = 0; k < NITER; k++) begin
      longint m0, m3, y;
      m0 = longint'(ref_alu_mul(0, a[k], b[k]));
      m3 = longint'(ref_alu_mul(3, a[k], b[k]));
      y  = (m0 + m3) >>> 1;
      if (m3 < 0) n_neg++;
      @(negedge clk);
      dm_addr = 10'(Y_BASE + k);
      #1;
      checks++;
      if (int'(dm_rdata) != int'(y)) begin
        failures++;
        $display("FAIL y[%0d] %0d*%0d: got %0d exp %0d", k, a[k], b[k], int'(dm_rdata), y);
      end
      dm_addr = 10'(Z_BASE + k);
      #1;
      checks++;
      if (int'(dm_rdata) != int'(m3)) begin
        failures++;
        $display("FAIL z[%0d] %0d*%0d: got %0d exp %0d", k, a[k], b[k], int'(dm_rdata), m3);
      end
    end
    checks++;
    if (n_conflict != 0) begin failures++; $display("FAIL conflict in a conflict-free kernel"); end

    // second kernel: two loads in row 2 in one slot must be flagged
    put_ctx(5, 2, 2, OP_LD, SRC_ZERO, SRC_ZERO, 3, 0, 0);
    put_ctx(5, 2, 3, OP_LD, SRC_ZERO, SRC_ZERO, 4, 0, 0);
    for (int s = 0; s < 5; s++) for (int p = 0; p < 16; p++) begin
      @(negedge clk);
      cfg_we = 1; cfg_slot = 4'(s); cfg_pe = 4'(p); cfg_wdata = CTX_NOP;
    end
    @(negedge clk);
    cfg_we = 0;
    run(6, 6, cyc);
    checks++;
    if (pe_out[2*4+2] !== a[3]) begin failures++; $display("FAIL granted load"); end

    $display("mechanisms: slot switches %0d, loads %0d, stores %0d, ISC-MULs %0d, ZSAS shifts %0d,",
             n_slot_switch, n_ld, n_st, n_mul, n_zsas);
    $display("            accuracy-scaling adds %0d, two-hop links %0d, negative products %0d, conflicts %0d",
             n_scale, n_hop2, n_neg, n_conflict);
    checks++; if (n_slot_switch == 0) begin failures++; $display("FAIL no slot switch"); end
    checks++; if (n_ld == 0)          begin failures++; $display("FAIL no load"); end
    checks++; if (n_st == 0)          begin failures++; $display("FAIL no store"); end
    checks++; if (n_mul == 0)         begin failures++; $display("FAIL no MUL"); end
    checks++; if (n_zsas == 0)        begin failures++; $display("FAIL no ZSAS shift"); end
    checks++; if (n_scale == 0)       begin failures++; $display("FAIL no accuracy scaling"); end
    checks++; if (n_hop2 == 0)        begin failures++; $display("FAIL no two-hop link"); end
    checks++; if (n_neg == 0)         begin failures++; $display("FAIL no negative product"); end
    checks++; if (n_conflict == 0)    begin failures++; $display("FAIL conflict never flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
