// sc_pe_array: ROWS x COLS array of SC-PEs on a 2D mesh-plus interconnect.
//
// Every PE reads the output registers of its four nearest neighbours and of the four
// PEs two hops away in the same row or column (the "plus" links, which give an
// operand the fan-out needed when several PEs multiply the same operands). Links that
// would leave the array read zero; there is no wrap-around. PE (r,c) holds Sobol
// segment 2*(r mod 2) + (c mod 2), so every 2x2 block of neighbours holds all four
// 32-cell segments and together forms a 128-cell stream. Each row shares one
// data-memory port: when several PEs of a row access memory in the same cycle the
// lowest column wins and mem_conflict is raised (a mapping error). The mesh-plus
// interconnect follows the described array; the link reach, segment placement and
// memory ports are this design's choice.
module sc_pe_array
  import sc_cgra_pkg::*;
#(
  parameter int ROWS = 4,
  parameter int COLS = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  ctx_t                     ctx     [ROWS*COLS],
  output mem_req_t                 row_req [ROWS],
  input  logic [DATA_W-1:0]        row_rdata [ROWS],
  output logic [DATA_W-1:0]        pe_out  [ROWS*COLS],
  output logic                     mem_conflict
);

  mem_req_t pe_req [ROWS*COLS];
  logic [ROWS-1:0] row_conf;

  function automatic logic [DATA_W-1:0] at(input int r, input int c);
    return (r >= 0 && r < ROWS && c >= 0 && c < COLS) ? pe_out[r*COLS + c] : '0;
  endfunction

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [NNBR-1:0][DATA_W-1:0] nbr;
      assign nbr[0] = at(r - 1, c);   // N
      assign nbr[1] = at(r + 1, c);   // S
      assign nbr[2] = at(r, c + 1);   // E
      assign nbr[3] = at(r, c - 1);   // W
      assign nbr[4] = at(r - 2, c);   // N2
      assign nbr[5] = at(r + 2, c);   // S2
      assign nbr[6] = at(r, c + 2);   // E2
      assign nbr[7] = at(r, c - 2);   // W2
      sc_pe #(.SEG(2 * (r % 2) + (c % 2))) u_pe (
        .clk, .rst_n, .ctx_in(ctx[r*COLS + c]), .nbr,
        .mem_req(pe_req[r*COLS + c]), .mem_rdata(row_rdata[r]),
        .out_q(pe_out[r*COLS + c])
      );
    end

    // row memory port: lowest requesting column wins
    always_comb begin
      int n;
      row_req[r] = '0;
      n          = 0;
      for (int c = COLS - 1; c >= 0; c--) begin
        if (pe_req[r*COLS + c].req) begin
          row_req[r] = pe_req[r*COLS + c];
          n++;
        end
      end
      row_conf[r] = (n > 1);
    end
  end

  assign mem_conflict = |row_conf;

endmodule
