// tb_sc_cgra_mmm: matrix-matrix multiplication C = A x B on the SC-CGRA at its
// default size, for 2x2, 4x4, 10x10 and 12x12 matrices.
//
// One pass of the kernel computes, for a tile of up to 72 elements of C, the part of
// the inner product over four values of k (one per row, the lanes) and adds it to C in
// memory (in place). An n x n product takes ceil(n/4) k-chunks times ceil(n*n/72)
// tiles; the host writes each pass's operand streams and resets the array (which
// clears the address counters and the contexts) before it. For tile element t
// (C[i][j]) and chunk q, the streams are AS[4t + r] = A[i][4q+r] and
// BS[4t + r] = B[4q+r][j], zero where 4q+r >= n. Pass mapping (II = 4, one element
// per iteration):
//   row r (lane r):  PE(r,0) loads AS[4t+r] in slot 1, PE(r,2) loads BS[4t+r] in
//                    slot 2, both advance their address counters by 4 in slot 0;
//                    PE(r,1) multiplies W x E (ISC-MUL) in slot 3.
//   next iteration:  slot 0 PE(1,1) = N + SELF, PE(2,1) = SELF + S, PE(0,3) loads
//                    the old C element; slot 1 PE(1,1) = SELF + S (chunk sum);
//                    slot 2 PE(1,3) = W2 + N (two-hop link plus the old value);
//                    slot 3 PE(1,3) stores SELF, PE(0,3) advances its counter;
//                    PE(1,3) advances its counter in slot 0.
// Every element of C must equal the sum of the reference ISC-MUL products of the
// lanes' PEs (segment 2*(r%2)+1), every pass must take n_cycles + 2 cycles, and the
// row memory ports must never collide. The deviation from the exact product is
// reported. The 10x10 and 12x12 operands are scaled to 14 bits so the 32-bit sums
// cannot wrap.
module tb_sc_cgra_mmm;
  import sc_cgra_pkg::*;
  import tb_sc_ref_pkg::*;

  localparam int NMAX    = 12;
  localparam int TILE    = 72;     // elements of C per pass
  localparam int AS_BASE = 0;
  localparam int BS_BASE = 4 * TILE;
  localparam int C_BASE  = 600;    // C_BASE - 2 and C_BASE - 1 are scratch

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

  int n_conflict = 0;
  always @(posedge clk) if (rst_n && mem_conflict) n_conflict++;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put_ctx(input int slot, input int r, input int c, input op_e op,
                         input src_e sa, input src_e sb, input int imm, input logic rf_we);
    ctx_t x;
    x = CTX_NOP;
    x.op = op; x.src_a = sa; x.src_b = sb; x.imm = 16'(imm); x.rf_we = rf_we;
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

  int A [NMAX][NMAX], B [NMAX][NMAX];

  function automatic int av(input int i, input int k, input int n);
    return (k < n) ? A[i][k] : 0;
  endfunction
  function automatic int bv(input int k, input int j, input int n);
    return (k < n) ? B[k][j] : 0;
  endfunction

  // one pass: chunk q of the inner dimension for the elements t0 .. t0+nt-1 of C
  task automatic mmm_pass(input int n, input int q, input int t0, input int nt);
    int cyc;
    for (int t = 0; t < nt; t++) for (int r = 0; r < 4; r++) begin
      dm_write(AS_BASE + 4 * t + r, av((t0 + t) / n, 4 * q + r, n));
      dm_write(BS_BASE + 4 * t + r, bv(4 * q + r, (t0 + t) % n, n));
    end
    // reset the address counters (register files) before the pass
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      put_ctx(0, r, 0, OP_ADD, SRC_RF, SRC_IMM, 4, 1);
      put_ctx(1, r, 0, OP_LD,  SRC_RF, SRC_ZERO, AS_BASE + r - 4, 0);
      put_ctx(0, r, 2, OP_ADD, SRC_RF, SRC_IMM, 4, 1);
      put_ctx(2, r, 2, OP_LD,  SRC_RF, SRC_ZERO, BS_BASE + r - 4, 0);
      put_ctx(3, r, 1, OP_MUL, SRC_W,  SRC_E, 0, 0);
    end
    put_ctx(0, 1, 1, OP_ADD, SRC_N,    SRC_SELF, 0, 0);
    put_ctx(0, 2, 1, OP_ADD, SRC_SELF, SRC_S,    0, 0);
    put_ctx(1, 1, 1, OP_ADD, SRC_SELF, SRC_S,    0, 0);
    put_ctx(0, 0, 3, OP_LD,  SRC_RF,   SRC_ZERO, C_BASE + t0 - 1, 0);
    put_ctx(3, 0, 3, OP_ADD, SRC_RF,   SRC_IMM,  1, 1);
    put_ctx(2, 1, 3, OP_ADD, SRC_W2,   SRC_N,    0, 0);
    put_ctx(3, 1, 3, OP_ST,  SRC_RF,   SRC_SELF, C_BASE + t0 - 2, 0);
    put_ctx(0, 1, 3, OP_ADD, SRC_RF,   SRC_IMM,  1, 1);

    @(negedge clk);
    start = 1; ii = 5'd4; n_cycles = 4 * (nt + 1);
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 4 * (nt + 1) + 2) begin
      failures++;
      $display("FAIL %0dx%0d pass took %0d cycles", n, n, cyc);
    end
    run_cycles += cyc;
  endtask

  int run_cycles;

  task automatic mmm(input int n);
    int nout, npass;
    real err, ref_sum;
    nout = n * n;
    for (int i = 0; i < n; i++) for (int k = 0; k < n; k++) begin
      A[i][k] = int'(16'($urandom)) - 32768;
      B[i][k] = int'(16'($urandom)) - 32768;
      if (n > 4) begin
        A[i][k] = A[i][k] >>> 2;
        B[i][k] = B[i][k] >>> 2;
      end
      if ($urandom % 3 == 0) A[i][k] = A[i][k] >>> 6;
    end
    for (int t = 0; t < nout; t++) dm_write(C_BASE + t, 0);
    run_cycles = 0;
    npass = 0;
    for (int q = 0; q < (n + 3) / 4; q++)
      for (int t0 = 0; t0 < nout; t0 += TILE) begin
        mmm_pass(n, q, t0, (nout - t0 < TILE) ? nout - t0 : TILE);
        npass++;
      end
    err = 0.0; ref_sum = 0.0;
    for (int t = 0; t < nout; t++) begin
      int e;
      longint ex;
      e = 0; ex = 0;
      for (int q = 0; q < (n + 3) / 4; q++) begin
        int lane;
        lane = 0;
        for (int r = 0; r < 4; r++)
          lane += ref_alu_mul(2 * (r % 2) + 1, av(t / n, 4 * q + r, n), bv(4 * q + r, t % n, n));
        e += lane;
      end
      for (int k = 0; k < n; k++) ex += longint'(A[t / n][k]) * longint'(B[k][t % n]);
      dm_addr = 10'(C_BASE + t);
      #1;
      checks++;
      if (int'(dm_rdata) != e) begin
        failures++;
        $display("FAIL %0dx%0d C[%0d][%0d]: got %0d exp %0d", n, n, t / n, t % n, int'(dm_rdata), e);
      end
      err += (real'(int'(dm_rdata)) - real'(ex)) * (real'(int'(dm_rdata)) - real'(ex));
      ref_sum += real'(ex) * real'(ex);
    end
    $display("%0dx%0d MMM: %0d passes, %0d array cycles, relative RMS deviation from the exact product %0.2f%%",
             n, n, npass, run_cycles, 100.0 * $sqrt(err / ref_sum));
  endtask

  initial begin
    rst_n = 0; cfg_we = 0; dm_we = 0; start = 0; cfg_slot = 0; cfg_pe = 0; cfg_wdata = CTX_NOP;
    dm_addr = 0; dm_wdata = 0; ii = 1; n_cycles = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    mmm(2);
    mmm(4);
    mmm(10);
    mmm(12);
    checks++;
    if (n_conflict != 0) begin failures++; $display("FAIL memory conflict"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
