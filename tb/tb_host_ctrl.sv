// tb_host_ctrl: for several initiation intervals and run lengths the sequencer must
// issue exactly n_cycles slots in the order 0..ii-1 repeated, then pulse done one
// cycle after the last slot, with busy covering the run and the drain cycle.
module tb_host_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, ctx_valid, busy, done;
  logic [4:0] ii;
  logic [31:0] n_cycles;
  logic [3:0] slot;

  host_ctrl #(.DEPTH(16)) dut (.clk, .rst_n, .start, .ii, .n_cycles, .slot, .ctx_valid, .busy, .done);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int vii, input int n);
    int issued, cyc, eii;
    eii = (vii == 0) ? 1 : vii;
    @(negedge clk);
    start = 1; ii = 5'(vii); n_cycles = n;
    @(negedge clk);
    start = 0;
    issued = 0; cyc = 0;
    while (!done && cyc < 1000) begin
      if (ctx_valid) begin
        checks++;
        if (int'(slot) != issued % eii) begin
          failures++;
          $display("FAIL ii=%0d slot %0d at issue %0d", vii, slot, issued);
        end
        issued++;
      end
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low during run"); end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (issued != n || cyc != n + 1) begin
      failures++;
      $display("FAIL ii=%0d n=%0d: issued %0d, done after %0d cycles", vii, n, issued, cyc);
    end
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("FAIL not idle"); end
  endtask

  initial begin
    rst_n = 0; start = 0; ii = 1; n_cycles = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(1, 5);
    run(2, 9);
    run(3, 12);
    run(4, 33);
    run(16, 40);
    run(0, 3);
    for (int k = 0; k < 20; k++) run(1 + $urandom % 16, 1 + $urandom % 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
