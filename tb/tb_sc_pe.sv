// tb_sc_pe: random context sequences against a cycle model of the PE: the context
// register delays execution by one cycle; operands come from the eight mesh-plus
// neighbours, the register file, the immediate, the own output or zero; results go
// to the output register and (rf_we) the register file; LD returns the memory data;
// ST drives address a + imm and data b and leaves the output alone; NOP holds it.
module tb_sc_pe;
  import sc_cgra_pkg::*;
  import tb_sc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  ctx_t ctx_in;
  logic [7:0][31:0] nbr;
  mem_req_t mem_req;
  logic [31:0] mem_rdata, out_q;

  sc_pe #(.SEG(1)) dut (.clk, .rst_n, .ctx_in, .nbr, .mem_req, .mem_rdata, .out_q);

  // model state
  ctx_t m_ctx;
  int   m_out;
  int   m_rf [4];
  int   n_ld = 0, n_st = 0, n_mul = 0, n_rf = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick(input src_e s, input int rfv, input ctx_t c);
    case (s)
      SRC_N, SRC_S, SRC_E, SRC_W, SRC_N2, SRC_S2, SRC_E2, SRC_W2: return int'(nbr[int'(s)]);
      SRC_RF:   return rfv;
      SRC_IMM:  return int'(signed'(c.imm));
      SRC_SELF: return m_out;
      default:  return 0;
    endcase
  endfunction

  function automatic int alu(input op_e o, input logic s, input int va, input int vb);
    longint sum;
    case (o)
      OP_ADD:  begin sum = longint'(va) + longint'(vb); return s ? int'(sum >>> 1) : int'(sum); end
      OP_SUB:  return va - vb;
      OP_MUL:  return ref_alu_mul(1, va, vb);
      OP_SHL:  return va << (vb & 31);
      OP_SHR:  return va >>> (vb & 31);
      OP_AND:  return va & vb;
      OP_OR:   return va | vb;
      OP_XOR:  return va ^ vb;
      default: return va;
    endcase
  endfunction

  initial begin
    int va, vb, res;
    rst_n = 0; ctx_in = CTX_NOP; nbr = '0; mem_rdata = 0;
    m_ctx = CTX_NOP; m_out = 0;
    for (int i = 0; i < 4; i++) m_rf[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      ctx_in.op    = op_e'($urandom % 12);
      ctx_in.shr1  = 1'($urandom);
      ctx_in.src_a = src_e'($urandom % 12);
      ctx_in.src_b = src_e'($urandom % 12);
      ctx_in.rf_ra = 2'($urandom); ctx_in.rf_rb = 2'($urandom);
      ctx_in.rf_we = 1'($urandom); ctx_in.rf_wa = 2'($urandom);
      ctx_in.imm   = 16'($urandom);
      for (int n = 0; n < 8; n++) nbr[n] = ($urandom % 3 == 0) ? ($urandom >> ($urandom % 32)) : $urandom;
      mem_rdata = $urandom;
      #1;
      // expected behaviour of the context latched at the previous edge
      va  = pick(m_ctx.src_a, m_rf[m_ctx.rf_ra], m_ctx);
      vb  = pick(m_ctx.src_b, m_rf[m_ctx.rf_rb], m_ctx);
      res = (m_ctx.op == OP_LD) ? int'(mem_rdata) : alu(m_ctx.op, m_ctx.shr1, va, vb);
      checks++;
      if (mem_req.req !== (m_ctx.op inside {OP_LD, OP_ST}) || mem_req.we !== (m_ctx.op == OP_ST)) begin
        failures++; $display("FAIL mem req op %s", m_ctx.op.name());
      end
      if (m_ctx.op inside {OP_LD, OP_ST}) begin
        checks++;
        if (mem_req.addr !== 10'(va + int'(signed'(m_ctx.imm))) ||
            (m_ctx.op == OP_ST && mem_req.wdata !== vb)) begin
          failures++; $display("FAIL mem addr/data");
        end
        if (m_ctx.op == OP_LD) n_ld++; else n_st++;
      end
      if (m_ctx.op == OP_MUL) n_mul++;
      @(posedge clk);
      if (!(m_ctx.op inside {OP_NOP, OP_ST})) begin
        m_out = res;
        if (m_ctx.rf_we) begin m_rf[m_ctx.rf_wa] = res; n_rf++; end
      end
      m_ctx = ctx_in;
      #1;
      checks++;
      if (out_q !== m_out) begin
        failures++;
        $display("FAIL cycle %0d out %0d exp %0d", k, out_q, m_out);
      end
    end
    checks++;
    if (n_ld == 0 || n_st == 0 || n_mul == 0 || n_rf == 0) failures++;
    $display("loads %0d stores %0d muls %0d rf writes %0d", n_ld, n_st, n_mul, n_rf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
