// tb_sc_pe_array: the mesh-plus links, Sobol segment placement and row memory
// ports of the 4x4 array. Every PE first loads a distinct value, then copies it from
// each of its eight link directions in turn (links off the array must read zero);
// a MUL in every PE must match the reference for segment 2*(r%2)+(c%2); memory
// requests of a row go out from the lowest requesting column and several at once
// raise mem_conflict.
module tb_sc_pe_array;
  import sc_cgra_pkg::*;
  import tb_sc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  ctx_t ctx [16];
  mem_req_t row_req [4];
  logic [31:0] row_rdata [4];
  logic [31:0] pe_out [16];
  logic mem_conflict;

  sc_pe_array #(.ROWS(4), .COLS(4)) dut (.clk, .rst_n, .ctx, .row_req, .row_rdata, .pe_out, .mem_conflict);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int val0(input int r, input int c);
    return 1000 + 37 * r + 5 * c;
  endfunction

  // issue one context per PE, then wait until it has executed
  task automatic step();
    @(negedge clk);
    @(negedge clk);
    for (int p = 0; p < 16; p++) ctx[p] = CTX_NOP;
  endtask

  initial begin
    int dr [8] = '{-1, 1, 0, 0, -2, 2, 0, 0};
    int dc [8] = '{0, 0, 1, -1, 0, 0, 2, -2};
    int cur [4][4], nxt [4][4];
    rst_n = 0;
    for (int p = 0; p < 16; p++) ctx[p] = CTX_NOP;
    for (int r = 0; r < 4; r++) row_rdata[r] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // load distinct values
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
      ctx[r*4+c].op = OP_PASS; ctx[r*4+c].src_a = SRC_IMM; ctx[r*4+c].imm = 16'(val0(r, c));
      cur[r][c] = val0(r, c);
    end
    step();
    #1;
    // copy along every link direction
    for (int d = 0; d < 8; d++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        int rr, cc;
        ctx[r*4+c].op = OP_PASS; ctx[r*4+c].src_a = src_e'(d);
        rr = r + dr[d]; cc = c + dc[d];
        nxt[r][c] = (rr >= 0 && rr < 4 && cc >= 0 && cc < 4) ? cur[rr][cc] : 0;
      end
      step();
      #1;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(pe_out[r*4+c]) != nxt[r][c]) begin
          failures++;
          $display("FAIL dir %0d PE(%0d,%0d) got %0d exp %0d", d, r, c, pe_out[r*4+c], nxt[r][c]);
        end
      end
      // reload distinct values for the next direction
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        ctx[r*4+c].op = OP_PASS; ctx[r*4+c].src_a = SRC_IMM; ctx[r*4+c].imm = 16'(val0(r, c) + d + 1);
        cur[r][c] = val0(r, c) + d + 1;
      end
      step();
    end
    // MUL in every PE: own value times an immediate, segment from the position
    for (int t = 0; t < 20; t++) begin
      int im;
      im = int'(16'($urandom)) - 32768;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        ctx[r*4+c].op = OP_PASS; ctx[r*4+c].src_a = SRC_IMM;
        ctx[r*4+c].imm = 16'($urandom);
        cur[r][c] = int'(signed'(ctx[r*4+c].imm));
      end
      step();
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        ctx[r*4+c].op = OP_MUL; ctx[r*4+c].src_a = SRC_SELF; ctx[r*4+c].src_b = SRC_IMM;
        ctx[r*4+c].imm = 16'(im);
      end
      step();
      #1;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        int e;
        e = ref_alu_mul(2 * (r % 2) + (c % 2), cur[r][c], im);
        checks++;
        if (int'(pe_out[r*4+c]) != e) begin
          failures++;
          $display("FAIL mul PE(%0d,%0d) %0d*%0d got %0d exp %0d", r, c, cur[r][c], im, pe_out[r*4+c], e);
        end
      end
    end
    // memory ports: row r has its PEs c >= r load, so column r wins
    for (int r = 0; r < 4; r++) for (int c = r; c < 4; c++) begin
      ctx[r*4+c].op = OP_LD; ctx[r*4+c].src_a = SRC_ZERO; ctx[r*4+c].imm = 16'(100 * r + c);
    end
    @(negedge clk);
    for (int p = 0; p < 16; p++) ctx[p] = CTX_NOP;
    for (int r = 0; r < 4; r++) row_rdata[r] = 32'(5000 + r);
    #1;
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (!row_req[r].req || row_req[r].we || int'(row_req[r].addr) != 100 * r + r) begin
        failures++; $display("FAIL row %0d port addr %0d", r, row_req[r].addr);
      end
    end
    checks++;
    if (!mem_conflict) begin failures++; $display("FAIL conflict not flagged"); end
    @(negedge clk);
    checks++;
    if (int'(pe_out[3*4+3]) != 5003 || int'(pe_out[0]) != 5000) begin failures++; $display("FAIL load data"); end
    // one store per row: no conflict
    for (int r = 0; r < 4; r++) begin
      ctx[r*4+1].op = OP_ST; ctx[r*4+1].src_a = SRC_IMM; ctx[r*4+1].src_b = SRC_W; ctx[r*4+1].imm = 16'(7 + r);
    end
    @(negedge clk);
    for (int p = 0; p < 16; p++) ctx[p] = CTX_NOP;
    #1;
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (!row_req[r].we || int'(row_req[r].addr) != 14 + 2 * r || row_req[r].wdata !== pe_out[r*4]) begin
        failures++; $display("FAIL store row %0d", r);
      end
    end
    checks++;
    if (mem_conflict) begin failures++; $display("FAIL false conflict"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
