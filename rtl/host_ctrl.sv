// host_ctrl: kernel sequencer of the SC-CGRA.
//
// After start it issues context slots 0, 1, .., ii-1, 0, 1, .. (modulo scheduling with
// initiation interval ii) for n_cycles cycles, with ctx_valid high; the PEs latch each
// slot's contexts and execute them one cycle later. One drain cycle later, when the
// last results are in the PE registers and the memory, done pulses for one cycle and
// busy falls. start is ignored while busy. ii = 0 is treated as 1. The described
// architecture only names a host controller; this sequencer is this design's own.
module host_ctrl
  import sc_cgra_pkg::*;
#(
  parameter int DEPTH = CFG_DEPTH,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW:0]   ii,
  input  logic [31:0]   n_cycles,
  output logic [AW-1:0] slot,
  output logic          ctx_valid,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  state_e      state;
  logic [31:0] cnt;
  logic [AW:0] ii_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      slot  <= '0;
      ii_q  <= (AW + 1)'(1);
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start && n_cycles != 0) begin
          state <= S_RUN;
          cnt   <= '0;
          slot  <= '0;
          ii_q  <= (ii == 0) ? (AW + 1)'(1) : ii;
        end
        S_RUN: begin
          cnt  <= cnt + 1;
          slot <= ((AW + 1)'(slot) + 1 >= ii_q) ? '0 : slot + 1'b1;
          if (cnt + 1 == n_cycles) state <= S_DRAIN;
        end
        S_DRAIN: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ctx_valid = (state == S_RUN);
  assign busy      = (state != S_IDLE);

endmodule
