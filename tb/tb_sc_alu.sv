// tb_sc_alu: every SC-ALU operation against independently computed results:
// the adder-shifter with and without the one-bit right shift (47 + 49 -> 48, the
// accuracy-scaling example), SUB, shifts, logic, PASS, and the ISC-MUL with sign
// handling and 16-bit magnitude / 32-bit result saturation.
module tb_sc_alu;
  import sc_cgra_pkg::*;
  import tb_sc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  op_e op;
  logic shr1;
  logic signed [31:0] a, b, y;
  logic [5:0] n1s;

  sc_alu #(.SEG(2)) dut (.op, .shr1, .a, .b, .y, .n1s);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_y(input op_e o, input logic s, input int va, input int vb);
    longint sum;
    case (o)
      OP_ADD:  begin sum = longint'(va) + longint'(vb); return s ? int'(sum >>> 1) : int'(sum); end
      OP_SUB:  return va - vb;
      OP_MUL:  return ref_alu_mul(2, va, vb);
      OP_SHL:  return va << (vb & 31);
      OP_SHR:  return va >>> (vb & 31);
      OP_AND:  return va & vb;
      OP_OR:   return va | vb;
      OP_XOR:  return va ^ vb;
      default: return va;
    endcase
  endfunction

  task automatic chk(input op_e o, input logic s, input int va, input int vb);
    int e;
    op = o; shr1 = s; a = va; b = vb;
    @(posedge clk);
    e = expect_y(o, s, va, vb);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL %s shr1=%0d a=%0d b=%0d: got %0d exp %0d", o.name(), s, va, vb, y, e);
    end
  endtask

  initial begin
    op_e ops [10] = '{OP_NOP, OP_PASS, OP_ADD, OP_SUB, OP_MUL, OP_SHL, OP_SHR, OP_AND, OP_OR, OP_XOR};
    chk(OP_ADD, 1, 47, 49);
    checks++;
    if (y !== 48) failures++;
    chk(OP_ADD, 1, -7, 2);          // arithmetic shift keeps the sign
    chk(OP_ADD, 1, 32'h7FFFFFFF, 32'h7FFFFFFF);  // no overflow in the averaged sum
    chk(OP_MUL, 0, -32768, -32768);
    chk(OP_MUL, 0, 100000, 3);      // magnitude saturation
    chk(OP_MUL, 0, -6, 8);
    chk(OP_MUL, 0, 0, -5);
    for (int k = 0; k < 3000; k++) begin
      int va, vb;
      va = $urandom; vb = $urandom;
      if (k % 2 == 0) begin va = va >>> ($urandom % 32); vb = vb >>> ($urandom % 32); end
      chk(ops[k % 10], 1'($urandom), va, vb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
