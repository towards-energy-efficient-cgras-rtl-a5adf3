// tb_sng: checks the parallel SNG of every Sobol segment against independently
// computed cells: bit i must be (cell i < x), and the ones count must be within one
// of x/2^16 * 32 (the stratification a Sobol segment guarantees), for corner and
// random operands.
module tb_sng;
  import tb_sc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] x;
  logic [31:0] st [4][2];

  for (genvar s = 0; s < 4; s++) begin : g_s
    sng #(.DIM(0), .SEG(s)) u_a (.x(x), .stream(st[s][0]));
    sng #(.DIM(1), .SEG(s)) u_b (.x(x), .stream(st[s][1]));
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_x(input logic [15:0] v);
    int exp_ones;
    x = v;
    @(posedge clk);
    for (int s = 0; s < 4; s++)
      for (int d = 0; d < 2; d++) begin
        logic [31:0] e;
        for (int i = 0; i < 32; i++) e[i] = (ref_cell(d, s * 32 + i) < int'(v));
        checks++;
        if (st[s][d] !== e) begin
          failures++;
          $display("FAIL x=%h seg=%0d dim=%0d got %h exp %h", v, s, d, st[s][d], e);
        end
        exp_ones = (int'(v) * 32) >> 16;
        checks++;
        if ($countones(st[s][d]) < exp_ones - 1 || $countones(st[s][d]) > exp_ones + 1) begin
          failures++;
          $display("FAIL ones x=%h seg=%0d dim=%0d: %0d", v, s, d, $countones(st[s][d]));
        end
      end
  endtask

  initial begin
    // Fig. 2(c): operand 1/2 against cell 1/2 gives 0 (cell < operand is false)
    check_x(16'h8000);
    checks++;
    if (st[0][0][1] !== 1'b0) begin failures++; $display("FAIL cell 1/2"); end
    check_x(16'h0000);
    check_x(16'hFFFF);
    check_x(16'h0001);
    for (int k = 0; k < 200; k++) check_x(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
