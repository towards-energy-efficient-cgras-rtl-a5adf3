// data_mem: shared data memory of the SC-CGRA.
//
// DEPTH words of DATA_W bits with NPORT PE ports (one per array row) and a host
// port. Reads are asynchronous, so a load completes in the PE's execute cycle.
// Writes take effect at the clock edge; if two ports write the same word in one
// cycle the higher port wins and the host beats them all. The memory is named by
// the described architecture; its size, ports and timing are this design's choice.
// Not reset: the host loads what a kernel reads.
module data_mem
  import sc_cgra_pkg::*;
#(
  parameter int DEPTH = DMEM_DEPTH,
  parameter int NPORT = 4
) (
  input  logic               clk,
  input  mem_req_t           req   [NPORT],
  output logic [DATA_W-1:0]  rdata [NPORT],
  input  logic               h_we,
  input  logic [DMEM_AW-1:0] h_addr,
  input  logic [DATA_W-1:0]  h_wdata,
  output logic [DATA_W-1:0]  h_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORT; p++)
      if (req[p].req && req[p].we) mem[req[p].addr] <= req[p].wdata;
    if (h_we) mem[h_addr] <= h_wdata;
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) rdata[p] = mem[req[p].addr];
  end
  assign h_rdata = mem[h_addr];

endmodule
