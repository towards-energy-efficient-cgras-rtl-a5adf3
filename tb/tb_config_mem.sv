// tb_config_mem: reset leaves NOP contexts everywhere; host writes of single PE
// contexts appear in the whole-slot read of that slot only.
module tb_config_mem;
  import sc_cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, we;
  logic [3:0] wslot, wpe, rslot;
  ctx_t wdata;
  ctx_t rdata [16];
  ctx_t shadow [16][16];

  config_mem #(.DEPTH(16), .NPE(16)) dut (.clk, .rst_n, .we, .wslot, .wpe, .wdata, .rslot, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_slot(input int s);
    rslot = 4'(s);
    #1;
    for (int p = 0; p < 16; p++) begin
      checks++;
      if (rdata[p] !== shadow[s][p]) begin
        failures++;
        $display("FAIL slot %0d pe %0d", s, p);
      end
    end
  endtask

  initial begin
    rst_n = 0; we = 0; wslot = 0; wpe = 0; wdata = '0; rslot = 0;
    for (int s = 0; s < 16; s++) for (int p = 0; p < 16; p++) shadow[s][p] = CTX_NOP;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 16; s++) check_slot(s);
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      we = 1; wslot = 4'($urandom); wpe = 4'($urandom);
      wdata = ctx_t'({$urandom, $urandom});
      @(posedge clk);
      shadow[wslot][wpe] = wdata;
      #1 we = 0;
      if (k % 20 == 0) for (int s = 0; s < 16; s++) check_slot(s);
    end
    for (int s = 0; s < 16; s++) check_slot(s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
