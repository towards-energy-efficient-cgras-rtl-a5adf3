// tb_sc_cgra_poe: 64th-order polynomial evaluation p(x) = sum_k c[k] x^k at 32 points
// on the SC-CGRA at its default size, in Q15 fixed point by Horner's rule.
//
// The accumulator of every point lives in data memory and starts at c[64]; one pass of
// the kernel performs one Horner step acc = ((acc * x) >>> 15) + c[k] on all points, in
// place, so the polynomial takes 64 passes, the host rewriting the coefficient
// immediate between them. Pass mapping (II = 4); row r handles points 4i + r:
//   slot 0: PE(r,0) loads acc[n]; PE(r,2) adds the coefficient (SELF + IMM) to the
//           shifted product of the previous iteration
//   slot 1: PE(r,1) loads x[n]
//   slot 2: PE(r,1) multiplies W * SELF (stochastic); PE(r,3) stores the previous
//           iteration's new accumulator (W)
//   slot 3: PE(r,2) shifts the product right by 15 (W >>> IMM); PE(r,0), PE(r,1) and
//           PE(r,3) advance their address counters by 4
// The counters live in register 0 and are never cleared, so each pass folds the count
// of the passes before it into its immediates. Every result must equal the same Horner
// recurrence over the reference ISC-MUL of each multiplying PE, every pass must take
// n_cycles + 2 cycles, and the row memory ports must never collide. The deviation
// from the exact polynomial is reported.
module tb_sc_cgra_poe;
  import sc_cgra_pkg::*;
  import tb_sc_ref_pkg::*;

  localparam int NPTS     = 32;
  localparam int ORDER    = 64;
  localparam int NIT      = NPTS / 4 + 1;  // iterations per pass
  localparam int X_BASE   = 100;
  localparam int ACC_BASE = 200;           // 196..199 are scratch

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
    repeat (20000) @(posedge clk);
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

  int x [NPTS];
  int c [ORDER + 1];
  int npass = 0;

  // one Horner step with coefficient c[k]
  task automatic run_pass(input int k);
    int b, cyc;
    b = npass * NIT * 4;   // counter value at the start of this pass
    for (int r = 0; r < 4; r++) begin
      put_ctx(0, r, 0, OP_LD,  SRC_RF,   SRC_ZERO, ACC_BASE + r - b, 0);
      put_ctx(3, r, 0, OP_ADD, SRC_RF,   SRC_IMM,  4, 1);
      put_ctx(1, r, 1, OP_LD,  SRC_RF,   SRC_ZERO, X_BASE + r - b, 0);
      put_ctx(2, r, 1, OP_MUL, SRC_W,    SRC_SELF, 0, 0);
      put_ctx(3, r, 1, OP_ADD, SRC_RF,   SRC_IMM,  4, 1);
      put_ctx(3, r, 2, OP_SHR, SRC_W,    SRC_IMM,  15, 0);
      put_ctx(0, r, 2, OP_ADD, SRC_SELF, SRC_IMM,  c[k], 0);
      put_ctx(2, r, 3, OP_ST,  SRC_RF,   SRC_W,    ACC_BASE + r - 4 - b, 0);
      put_ctx(3, r, 3, OP_ADD, SRC_RF,   SRC_IMM,  4, 1);
    end

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
      $display("FAIL pass %0d took %0d cycles", k, cyc);
    end
    npass++;
  endtask

  initial begin
    int acc [NPTS];
    real err, pw;
    rst_n = 0; cfg_we = 0; dm_we = 0; start = 0; cfg_slot = 0; cfg_pe = 0; cfg_wdata = CTX_NOP;
    dm_addr = 0; dm_wdata = 0; ii = 1; n_cycles = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // alternating, decaying coefficients and points spread over (-0.9, 0.9)
    for (int k = 0; k <= ORDER; k++)
      c[k] = int'(((k % 2) ? -5000.0 : 5000.0) * (0.93 ** k)) + int'($urandom % 32);
    for (int n = 0; n < NPTS; n++) begin
      x[n] = int'(29000.0 * (2.0 * n / (NPTS - 1) - 1.0)) + int'($urandom % 64) - 32;
      acc[n] = c[ORDER];
      dm_write(X_BASE + n, x[n]);
      dm_write(ACC_BASE + n, c[ORDER]);
    end
    for (int k = ORDER - 1; k >= 0; k--) begin
      run_pass(k);
      for (int n = 0; n < NPTS; n++)
        acc[n] = (ref_alu_mul(2 * (n % 2) + 1, acc[n], x[n]) >>> 15) + c[k];
    end

    err = 0.0; pw = 0.0;
    for (int n = 0; n < NPTS; n++) begin
      real xr, pr;
      xr = real'(x[n]) / 32768.0;
      pr = 0.0;
      for (int k = ORDER; k >= 0; k--) pr = pr * xr + real'(c[k]);
      dm_addr = 10'(ACC_BASE + n);
      #1;
      checks++;
      if (int'(dm_rdata) != acc[n]) begin
        failures++;
        $display("FAIL p(x[%0d]): got %0d exp %0d", n, int'(dm_rdata), acc[n]);
      end
      err += (real'(int'(dm_rdata)) - pr) ** 2;
      pw  += pr ** 2;
    end
    $display("order-%0d polynomial at %0d points: %0d passes of %0d cycles, relative RMS deviation from exact %0.2f%%",
             ORDER, NPTS, ORDER, 4 * NIT + 2, 100.0 * $sqrt(err / pw));
    checks++;
    if (n_conflict != 0) begin failures++; $display("FAIL %0d memory conflicts", n_conflict); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
