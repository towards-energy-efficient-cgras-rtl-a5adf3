// config_mem: configuration (context) memory of the SC-CGRA.
//
// DEPTH time slots, each holding one context word per PE. The host writes one PE's
// context of one slot per cycle; the array reads a whole slot at once
// (asynchronously), so the controller can switch every PE's operation each cycle.
// Contents are cleared by reset to NOP. Organisation and size are this design's
// choice; the memory itself is named by the described architecture.
module config_mem
  import sc_cgra_pkg::*;
#(
  parameter int DEPTH = CFG_DEPTH,
  parameter int NPE   = 16,
  localparam int AW   = $clog2(DEPTH),
  localparam int PW   = $clog2(NPE)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] wslot,
  input  logic [PW-1:0] wpe,
  input  ctx_t          wdata,
  input  logic [AW-1:0] rslot,
  output ctx_t          rdata [NPE]
);

  ctx_t mem [DEPTH][NPE];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < DEPTH; s++)
        for (int p = 0; p < NPE; p++) mem[s][p] <= CTX_NOP;
    end else if (we) begin
      mem[wslot][wpe] <= wdata;
    end
  end

  always_comb begin
    for (int p = 0; p < NPE; p++) rdata[p] = mem[rslot][p];
  end

endmodule
