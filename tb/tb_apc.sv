// tb_apc: the parallel counter must return the exact number of ones, for the
// example of the APC description (0010001001 has 3 ones), corners and random words.
module tb_apc;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] bits;
  logic [5:0]  count;

  apc #(.WIDTH(32)) dut (.bits, .count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] v);
    int n;
    bits = v;
    @(posedge clk);
    n = 0;
    for (int i = 0; i < 32; i++) n += int'(v[i]);
    checks++;
    if (int'(count) != n) begin
      failures++;
      $display("FAIL %h: got %0d exp %0d", v, count, n);
    end
  endtask

  initial begin
    chk(32'b0010001001);
    chk(32'b0001001100110001);   // six ones, as in the multiplier example
    checks++;
    if (count !== 6'd6) failures++;
    chk('0);
    chk('1);
    for (int i = 0; i < 32; i++) chk(32'(1) << i);
    for (int k = 0; k < 2000; k++) chk($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
