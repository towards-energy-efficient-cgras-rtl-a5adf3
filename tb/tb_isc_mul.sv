// tb_isc_mul: the improved SC multiplier of all four Sobol segments against the
// reference model (signs, zero, small and large operands), the cell-level example
// a = 1000.., b = 0110.. (shift S_f = 26), and accuracy: the mean relative error of
// one 32-cell PE must stay below 8 % (a few per cent is expected for 32 cells) and
// the average of the four segments (a 128-cell stream) must be clearly better,
// below 3.5 %.
module tb_isc_mul;
  import tb_sc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] am, bm;
  logic        as_, bs;
  logic signed [33:0] p [4];
  logic [5:0]  n [4];

  for (genvar s = 0; s < 4; s++) begin : g_s
    isc_mul #(.SEG(s)) dut (.a_mag(am), .a_sgn(as_), .b_mag(bm), .b_sgn(bs), .n1s(n[s]), .p(p[s]));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [15:0] va, input logic vas, input logic [15:0] vb, input logic vbs);
    longint e;
    am = va; as_ = vas; bm = vb; bs = vbs;
    @(posedge clk);
    for (int s = 0; s < 4; s++) begin
      e = ref_mul(s, int'(va), int'(vas), int'(vb), int'(vbs));
      checks++;
      if (longint'(p[s]) != e) begin
        failures++;
        $display("FAIL seg%0d a=%s%0d b=%s%0d: got %0d exp %0d", s, vas ? "-" : "", va,
                 vbs ? "-" : "", vb, p[s], e);
      end
    end
  endtask

  function automatic real absr(input real v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    real r1, r4, ex;
    int  nr;
    chk(16'h8000, 0, 16'h6000, 0);
    checks++;
    if (dut_sf() != 26) begin failures++; $display("FAIL S_f %0d", dut_sf()); end
    chk(16'd8, 0, 16'd6, 1);
    checks++;
    if (p[0] >= 0) begin failures++; $display("FAIL sign"); end
    chk(16'd0, 1, 16'd500, 0);
    checks++;
    if (p[0] != 0) failures++;
    chk(16'hFFFF, 0, 16'hFFFF, 0);
    chk(16'd1, 0, 16'd1, 1);
    r1 = 0.0; r4 = 0.0; nr = 0;
    for (int k = 0; k < 1500; k++) begin
      logic [15:0] va, vb;
      va = 16'($urandom); vb = 16'($urandom);
      if (va == 0 || vb == 0) continue;
      chk(va, 1'($urandom), vb, 1'($urandom));
      ex = real'(va) * real'(vb);
      r1 += absr(absr(real'(p[0])) - ex) / ex;
      r4 += absr((absr(real'(p[0])) + absr(real'(p[1])) + absr(real'(p[2])) + absr(real'(p[3]))) / 4.0 - ex) / ex;
      nr++;
    end
    $display("ISC-MUL mean relative error: 32 cells %0.2f%%, 4 PEs combined (128) %0.2f%%",
             100.0 * r1 / nr, 100.0 * r4 / nr);
    checks++;
    if (r1 / nr > 0.08) begin failures++; $display("FAIL accuracy 32"); end
    checks++;
    if (r4 / nr > 0.035 || r4 >= r1) begin failures++; $display("FAIL accuracy 128"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dut_sf();
    return int'(g_s[0].dut.s_f);
  endfunction
endmodule
