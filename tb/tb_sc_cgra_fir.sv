// tb_sc_cgra_fir: 8-tap and 64-tap FIR filters y[n] = sum_k h[k] * x[n-k] on the
// SC-CGRA at its default size, 64 output samples each.
//
// One pass of the kernel applies eight taps and adds them to the partial outputs held
// in memory (in place); the 64-tap filter is eight passes, the host rewriting the tap
// immediates and load offsets between passes. Pass mapping (II = 4, one output per
// iteration); row r is lane r and holds taps 8p+r and 8p+r+4:
//   slot 0: PE(r,0), PE(r,2) advance their counters; PE(r,1) adds its lane's two tap
//           products (W + E); PE(0,3) loads the partial output y[n];
//           PE(1,3) stores the finished y[n-1] (SELF)
//   slot 1: PE(r,0) loads x[n-8p-r]; PE(1,1) = N + SELF, PE(2,1) = SELF + S;
//           PE(1,3) advances its counter
//   slot 2: PE(r,0) multiplies it by its tap; PE(r,2) loads x[n-8p-r-4];
//           PE(1,1) = SELF + S (sum of the eight taps)
//   slot 3: PE(r,2) multiplies by its tap; PE(1,3) = W2 + N (two-hop link from
//           PE(1,1) plus the partial output from PE(0,3)); PE(0,3) advances its counter
// Counters live in register 0 and are never cleared, so each pass folds the count of
// the passes before it into its immediates. Samples before the start of x are zeros.
// Every output must equal the sum of the reference ISC-MUL products of the tap PEs,
// every pass must take n_cycles + 2 cycles, and the row memory ports must never
// collide. The deviation from the exact filter is reported.
module tb_sc_cgra_fir;
  import sc_cgra_pkg::*;
  import tb_sc_ref_pkg::*;

  localparam int NOUT   = 64;
  localparam int MAXTAP = 64;
  localparam int NIT    = NOUT + 2;  // iterations per pass
  localparam int X_BASE = 64;        // x[-63..-1] = 0 at 1..63
  localparam int Y_BASE = 201;       // 199 and 200 are scratch

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
    repeat (40000) @(posedge clk);
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

  function automatic int xs(input int n, input int x [NOUT]);
    return (n < 0) ? 0 : x[n];
  endfunction

  int x [NOUT];
  int h [MAXTAP];
  int npass = 0;

  // one pass: taps 8p .. 8p+7 added into y
  task automatic run_pass(input int p);
    int b, cyc;
    b = npass * NIT;   // counter value at the start of this pass
    for (int r = 0; r < 4; r++) begin
      put_ctx(0, r, 0, OP_ADD, SRC_RF,   SRC_IMM,  1, 1);
      put_ctx(1, r, 0, OP_LD,  SRC_RF,   SRC_ZERO, X_BASE - 8 * p - r - 1 - b, 0);
      put_ctx(2, r, 0, OP_MUL, SRC_SELF, SRC_IMM,  h[8 * p + r], 0);
      put_ctx(0, r, 2, OP_ADD, SRC_RF,   SRC_IMM,  1, 1);
      put_ctx(2, r, 2, OP_LD,  SRC_RF,   SRC_ZERO, X_BASE - 8 * p - r - 4 - 1 - b, 0);
      put_ctx(3, r, 2, OP_MUL, SRC_SELF, SRC_IMM,  h[8 * p + r + 4], 0);
      put_ctx(0, r, 1, OP_ADD, SRC_W,    SRC_E,    0, 0);
    end
    put_ctx(1, 1, 1, OP_ADD, SRC_N,    SRC_SELF, 0, 0);
    put_ctx(1, 2, 1, OP_ADD, SRC_SELF, SRC_S,    0, 0);
    put_ctx(2, 1, 1, OP_ADD, SRC_SELF, SRC_S,    0, 0);
    put_ctx(0, 0, 3, OP_LD,  SRC_RF,   SRC_ZERO, Y_BASE - 1 - b, 0);
    put_ctx(3, 0, 3, OP_ADD, SRC_RF,   SRC_IMM,  1, 1);
    put_ctx(0, 1, 3, OP_ST,  SRC_RF,   SRC_SELF, Y_BASE - 2 - b, 0);
    put_ctx(1, 1, 3, OP_ADD, SRC_RF,   SRC_IMM,  1, 1);
    put_ctx(3, 1, 3, OP_ADD, SRC_W2,   SRC_N,    0, 0);

    @(negedge clk);
    start = 1; ii = 5'd4; n_cycles = 4 * NIT;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 4 * NIT + 2) begin
      failures++;
      $display("FAIL pass %0d took %0d cycles", p, cyc);
    end
    npass++;
  endtask

  task automatic run_filter(input int ntap);
    real err, pw;
    for (int n = 0; n < NOUT; n++) dm_write(Y_BASE + n, 0);
    for (int p = 0; p < ntap / 8; p++) run_pass(p);
    err = 0.0; pw = 0.0;
    for (int n = 0; n < NOUT; n++) begin
      int e;
      longint ex;
      e = 0; ex = 0;
      for (int p = 0; p < ntap / 8; p++) begin
        int lane;
        lane = 0;
        for (int r = 0; r < 4; r++)
          lane += ref_alu_mul(2 * (r % 2), xs(n - 8 * p - r, x), h[8 * p + r])
                + ref_alu_mul(2 * (r % 2), xs(n - 8 * p - r - 4, x), h[8 * p + r + 4]);
        e += lane;
        for (int k = 8 * p; k < 8 * p + 8; k++) ex += longint'(xs(n - k, x)) * h[k];
      end
      dm_addr = 10'(Y_BASE + n);
      #1;
      checks++;
      if (int'(dm_rdata) != e) begin
        failures++;
        $display("FAIL %0d-tap y[%0d]: got %0d exp %0d", ntap, n, int'(dm_rdata), e);
      end
      err += (real'(int'(dm_rdata)) - real'(ex)) ** 2;
      pw  += real'(ex) ** 2;
    end
    $display("%0d-tap FIR, %0d samples: %0d passes of %0d cycles, relative RMS deviation from the exact filter %0.2f%%",
             ntap, NOUT, ntap / 8, 4 * NIT + 2, 100.0 * $sqrt(err / pw));
  endtask

  initial begin
    rst_n = 0; cfg_we = 0; dm_we = 0; start = 0; cfg_slot = 0; cfg_pe = 0; cfg_wdata = CTX_NOP;
    dm_addr = 0; dm_wdata = 0; ii = 1; n_cycles = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // a smooth tap set (Q15, windowed) and a noisy two-tone input
    for (int k = 0; k < MAXTAP; k++)
      h[k] = int'(6000.0 * $sin(3.14159 * (k + 0.5) / 8.0) ** 2) + int'($urandom % 64);
    for (int n = 0; n < NOUT; n++)
      x[n] = int'(12000.0 * $sin(0.2 * n) + 6000.0 * $sin(2.1 * n)) + int'($urandom % 512) - 256;
    for (int m = X_BASE - MAXTAP + 1; m < X_BASE; m++) dm_write(m, 0);
    for (int n = 0; n < NOUT; n++) dm_write(X_BASE + n, x[n]);

    run_filter(8);
    for (int k = 0; k < MAXTAP; k++)
      h[k] = int'(1500.0 * $sin(3.14159 * (k + 0.5) / 64.0) ** 2) + int'($urandom % 64);
    run_filter(64);

    checks++;
    if (n_conflict != 0) begin failures++; $display("FAIL %0d memory conflicts", n_conflict); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
