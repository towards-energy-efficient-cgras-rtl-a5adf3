// tb_nsc_mul: the naive SC multiplier (no leading-zero shifting, s_f = L = 27) of
// two segments: ones count and shifted result against the reference model, over
// every shift amount from -3 (right shift) to 27, and
// the mean relative error of the naive scheme, which is large for random operands
// because small operands lose their ones.
module tb_nsc_mul;
  import tb_sc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] a, b;
  logic signed [6:0] s_f;
  logic [5:0]  n0, n3;
  logic [32:0] m0, m3;

  nsc_mul #(.SEG(0)) dut0 (.a, .b, .s_f, .n1s(n0), .mag(m0));
  nsc_mul #(.SEG(3)) dut3 (.a, .b, .s_f, .n1s(n3), .mag(m3));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [15:0] va, input logic [15:0] vb, input int sf);
    int e0, e3;
    longint x0, x3;
    a = va; b = vb; s_f = 7'(sf);
    @(posedge clk);
    e0 = ref_count(0, int'(va), int'(vb), 32);
    e3 = ref_count(3, int'(va), int'(vb), 32);
    x0 = (sf >= 0) ? (longint'(e0) << sf) : (longint'(e0) >> -sf);
    x3 = (sf >= 0) ? (longint'(e3) << sf) : (longint'(e3) >> -sf);
    checks++;
    if (int'(n0) != e0 || int'(n3) != e3 || longint'(m0) != x0 || longint'(m3) != x3) begin
      failures++;
      $display("FAIL a=%h b=%h sf=%0d: n0=%0d/%0d n3=%0d/%0d m0=%0d m3=%0d", va, vb, sf, n0, e0, n3, e3, m0, m3);
    end
  endtask

  initial begin
    real rel;
    int  nrel;
    chk(16'hFFFF, 16'hFFFF, 27);
    chk(16'h0000, 16'h1234, 27);
    chk(16'h0001, 16'h0001, -3);
    // every shift amount the ZSAS can produce, right shifts included
    for (int k = 0; k < 620; k++)
      chk(16'($urandom) | 16'h8000, 16'($urandom) | 16'h8000, k % 31 - 3);
    rel = 0.0; nrel = 0;
    for (int k = 0; k < 2000; k++) begin
      logic [15:0] va, vb;
      va = 16'($urandom); vb = 16'($urandom);
      if (va == 0 || vb == 0) continue;
      chk(va, vb, 27);
      rel += ((real'(m0) - real'(va) * real'(vb)) < 0 ? -(real'(m0) - real'(va) * real'(vb))
              : (real'(m0) - real'(va) * real'(vb))) / (real'(va) * real'(vb));
      nrel++;
    end
    $display("NSC-MUL mean relative error, 32 cells: %0.1f%%", 100.0 * rel / nrel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
