// tb_data_mem: host and row ports write and read the shared memory; asynchronous
// reads see a write from the next cycle; simultaneous writes to one word resolve
// to the highest row port, and the host beats every row.
module tb_data_mem;
  import sc_cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mem_req_t    req   [4];
  logic [31:0] rdata [4];
  logic        h_we;
  logic [9:0]  h_addr;
  logic [31:0] h_wdata, h_rdata;
  logic [31:0] shadow [1024];

  data_mem #(.DEPTH(1024), .NPORT(4)) dut (.clk, .req, .rdata, .h_we, .h_addr, .h_wdata, .h_rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++) req[p] = '0;
    h_we = 0; h_addr = 0; h_wdata = 0;
    // host fills the memory
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      h_we = 1; h_addr = 10'(i); h_wdata = $urandom; shadow[i] = h_wdata;
    end
    @(negedge clk) h_we = 0;
    // random traffic on the four row ports and the host port
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        req[p].req = 1'($urandom); req[p].we = 1'($urandom);
        req[p].addr = 10'($urandom % 16); req[p].wdata = $urandom;
      end
      h_we = ($urandom % 4 == 0); h_addr = 10'($urandom % 16); h_wdata = $urandom;
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rdata[p] !== shadow[req[p].addr]) begin failures++; $display("FAIL port %0d read", p); end
      end
      checks++;
      if (h_rdata !== shadow[h_addr]) begin failures++; $display("FAIL host read"); end
      @(posedge clk);
      for (int p = 0; p < 4; p++) if (req[p].req && req[p].we) shadow[req[p].addr] = req[p].wdata;
      if (h_we) shadow[h_addr] = h_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
