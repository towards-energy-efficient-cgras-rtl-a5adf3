// tb_zsas: leading-zero counts, normalised operands and S_f = 27 - (S_a + S_b),
// including the worked example scaled to 16 bits (a = 1000.., b = 0110..:
// S_a = 0, S_b = 1, b amplified to 1100..).
module tb_zsas;
  import tb_sc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] a, b, a_n, b_n;
  logic [3:0]  s_a, s_b;
  logic signed [6:0] s_f;

  zsas dut (.a, .b, .a_n, .b_n, .s_a, .s_b, .s_f);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [15:0] va, input logic [15:0] vb);
    int ea, eb;
    a = va; b = vb;
    @(posedge clk);
    ea = ref_lz(int'(va));
    eb = ref_lz(int'(vb));
    checks++;
    if (int'(s_a) != ea || int'(s_b) != eb || a_n !== 16'(va << ea) || b_n !== 16'(vb << eb)
        || int'(s_f) != 27 - ea - eb) begin
      failures++;
      $display("FAIL a=%h b=%h: sa=%0d sb=%0d an=%h bn=%h sf=%0d", va, vb, s_a, s_b, a_n, b_n, s_f);
    end
  endtask

  initial begin
    chk(16'h8000, 16'h6000);
    checks++;
    if (s_a !== 0 || s_b !== 1 || b_n !== 16'hC000 || s_f !== 7'sd26) failures++;
    chk(16'h0001, 16'h0001);   // S_f negative: 27 - 30
    checks++;
    if (s_f !== -7'sd3) failures++;
    chk(16'h0000, 16'hFFFF);
    for (int k = 0; k < 3000; k++) chk(16'($urandom) >> ($urandom % 16), 16'($urandom) >> ($urandom % 16));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
