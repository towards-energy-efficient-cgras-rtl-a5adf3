// regfile: the local register file of a PE.
//
// DEPTH words of DATA_W bits, two asynchronous read ports (one per operand
// multiplexer) and one synchronous write port. Cleared by reset so that loop
// counters kept here start at zero. Size and ports are this design's choice.
module regfile #(
  parameter int DEPTH  = 4,
  parameter int DATA_W = 32,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [AW-1:0]     wa,
  input  logic [DATA_W-1:0] wd,
  input  logic [AW-1:0]     ra0,
  output logic [DATA_W-1:0] rd0,
  input  logic [AW-1:0]     ra1,
  output logic [DATA_W-1:0] rd1
);

  logic [DATA_W-1:0] r [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) r[i] <= '0;
    end else if (we) begin
      r[wa] <= wd;
    end
  end

  assign rd0 = r[ra0];
  assign rd1 = r[ra1];

endmodule
