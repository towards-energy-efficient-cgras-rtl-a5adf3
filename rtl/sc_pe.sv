// sc_pe: stochastic-computing processing element.
//
// Each cycle the context register takes this PE's context for the current time slot
// from the configuration memory (a NOP context when the array is idle). In the next
// cycle the PE executes it: two multiplexers pick the operands from the eight
// mesh-plus neighbours (N, S, E, W and the PEs two hops away), the register file,
// the immediate, its own output or zero; the SC-ALU computes the result, which is
// written to the output register seen by the neighbours and, if rf_we, to the
// register file. LD and ST use address a + imm on the row's data-memory port; a load
// result is written like an ALU result, a store leaves the output register alone, and
// so does NOP. One operation per cycle, result visible to neighbours one cycle after
// execution. The context-register/ALU/register-file organisation follows the
// described PE; the source list and memory addressing are this design's choice.
module sc_pe
  import sc_cgra_pkg::*;
#(
  parameter int SEG = 0     // Sobol segment held by this PE
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  ctx_t                     ctx_in,
  input  logic [NNBR-1:0][DATA_W-1:0] nbr,      // N S E W N2 S2 E2 W2
  output mem_req_t                 mem_req,
  input  logic [DATA_W-1:0]        mem_rdata,
  output logic [DATA_W-1:0]        out_q
);

  ctx_t                      ctx_q;
  logic signed [DATA_W-1:0]  opa, opb, alu_y, result, imm_x;
  logic [DATA_W-1:0]         rd0, rd1;
  logic                      writes;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctx_q <= CTX_NOP;
    else        ctx_q <= ctx_in;
  end

  assign imm_x = DATA_W'(signed'(ctx_q.imm));

  function automatic logic [DATA_W-1:0] pick(input src_e s, input logic [DATA_W-1:0] rf);
    case (s)
      SRC_N, SRC_S, SRC_E, SRC_W, SRC_N2, SRC_S2, SRC_E2, SRC_W2: return nbr[s[2:0]];
      SRC_RF:   return rf;
      SRC_IMM:  return imm_x;
      SRC_SELF: return out_q;
      default:  return '0;
    endcase
  endfunction

  always_comb begin
    opa = pick(ctx_q.src_a, rd0);
    opb = pick(ctx_q.src_b, rd1);
  end

  regfile #(.DEPTH(RF_DEPTH), .DATA_W(DATA_W)) u_rf (
    .clk, .rst_n, .we(ctx_q.rf_we && writes), .wa(ctx_q.rf_wa), .wd(result),
    .ra0(ctx_q.rf_ra), .rd0, .ra1(ctx_q.rf_rb), .rd1
  );

  sc_alu #(.SEG(SEG)) u_alu (
    .op(ctx_q.op), .shr1(ctx_q.shr1), .a(opa), .b(opb), .y(alu_y), .n1s()
  );

  always_comb begin
    result          = (ctx_q.op == OP_LD) ? mem_rdata : alu_y;
    writes          = (ctx_q.op != OP_NOP) && (ctx_q.op != OP_ST);
    mem_req.req     = (ctx_q.op == OP_LD) || (ctx_q.op == OP_ST);
    mem_req.we      = (ctx_q.op == OP_ST);
    mem_req.addr    = DMEM_AW'(opa + imm_x);
    mem_req.wdata   = opb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      out_q <= '0;
    else if (writes) out_q <= result;
  end

endmodule
