// sc_cgra: stochastic-computing coarse-grained reconfigurable array (SC-CGRA).
//
// A 4x4 array of SC-PEs (sc_pe_array) on a mesh-plus interconnect, a configuration
// memory with one context per PE per time slot, a shared data memory with one port
// per PE row, and the kernel sequencer (host_ctrl). The external host loads contexts
// through the cfg_* port and data through the dm_* port, then pulses start with the
// initiation interval ii and the number of cycles to run; busy stays high until the
// last results are stored, and done pulses once. The host may not write either
// memory while busy. mem_conflict flags two PEs of a row using memory in the same
// cycle (a mapping error).
//
// Timing: the slot issued in cycle t is latched by the PE context registers at the end
// of t, executed in t+1, and its results are visible (to neighbours, the register
// files and the data memory) from t+2.
module sc_cgra
  import sc_cgra_pkg::*;
#(
  parameter int ROWS       = 4,
  parameter int COLS       = 4,
  parameter int CTX_DEPTH  = sc_cgra_pkg::CFG_DEPTH,
  parameter int DM_DEPTH   = sc_cgra_pkg::DMEM_DEPTH,
  localparam int NPE  = ROWS * COLS,
  localparam int CAW  = $clog2(CTX_DEPTH),
  localparam int PW   = $clog2(NPE)
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration load
  input  logic               cfg_we,
  input  logic [CAW-1:0]     cfg_slot,
  input  logic [PW-1:0]      cfg_pe,       // PE index r*COLS + c
  input  ctx_t               cfg_wdata,
  // data memory host port
  input  logic               dm_we,
  input  logic [DMEM_AW-1:0] dm_addr,
  input  logic [DATA_W-1:0]  dm_wdata,
  output logic [DATA_W-1:0]  dm_rdata,
  // kernel control
  input  logic               start,
  input  logic [CAW:0]       ii,
  input  logic [31:0]        n_cycles,
  output logic               busy,
  output logic               done,
  output logic               mem_conflict,
  // PE output registers, index r*COLS + c (observation)
  output logic [DATA_W-1:0]  pe_out [ROWS*COLS]
);

  logic [CAW-1:0]    slot;
  logic              ctx_valid;
  ctx_t              slot_ctx [NPE];
  ctx_t              pe_ctx   [NPE];
  mem_req_t          row_req  [ROWS];
  logic [DATA_W-1:0] row_rdata [ROWS];

  host_ctrl #(.DEPTH(CTX_DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .ii, .n_cycles, .slot, .ctx_valid, .busy, .done
  );

  config_mem #(.DEPTH(CTX_DEPTH), .NPE(NPE)) u_cfg (
    .clk, .rst_n, .we(cfg_we), .wslot(cfg_slot), .wpe(cfg_pe), .wdata(cfg_wdata),
    .rslot(slot), .rdata(slot_ctx)
  );

  always_comb begin
    for (int p = 0; p < NPE; p++) pe_ctx[p] = ctx_valid ? slot_ctx[p] : CTX_NOP;
  end

  sc_pe_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n, .ctx(pe_ctx), .row_req, .row_rdata, .pe_out, .mem_conflict
  );

  data_mem #(.DEPTH(DM_DEPTH), .NPORT(ROWS)) u_dmem (
    .clk, .req(row_req), .rdata(row_rdata),
    .h_we(dm_we), .h_addr(dm_addr), .h_wdata(dm_wdata), .h_rdata(dm_rdata)
  );

  // the host must leave the memories alone while a kernel runs
  a_no_host_write_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(cfg_we || dm_we));

endmodule
