// tb_regfile: reset clears every register; writes land on the next edge and both
// read ports see them; random traffic is checked against a shadow array.
module tb_regfile;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, we;
  logic [1:0] wa, ra0, ra1;
  logic [31:0] wd, rd0, rd1;
  logic [31:0] shadow [4];

  regfile #(.DEPTH(4), .DATA_W(32)) dut (.clk, .rst_n, .we, .wa, .wd, .ra0, .rd0, .ra1, .rd1);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; we = 0; wa = 0; wd = 0; ra0 = 0; ra1 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      shadow[i] = 0;
      ra0 = 2'(i); ra1 = 2'(3 - i);
      #1;
      checks++;
      if (rd0 !== 0 || rd1 !== 0) failures++;
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 2'($urandom); wd = $urandom;
      ra0 = 2'($urandom); ra1 = 2'($urandom);
      #1;
      checks++;
      if (rd0 !== shadow[ra0] || rd1 !== shadow[ra1]) begin
        failures++;
        $display("FAIL read %0d/%0d", ra0, ra1);
      end
      @(posedge clk);
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
