// tb_isc_mul_len: the ISC-MUL built with 8, 16, 32 and 64 cells per PE (M = 3..6).
//
// The same random 16-bit signed operand pairs drive four isc_mul instances, one per
// stream length. Every product must equal the reference model's ISC-MUL at that
// length. The mean relative error of each length is measured and must stay within
// 1.5 times the expected figure for that length (24 %, 12 %, 5 % and 3.3 %), and must
// shrink as the stream grows. Combinational, so no clock; the watchdog is a time limit.
module tb_isc_mul_len;
  import sc_cgra_pkg::*;
  import tb_sc_ref_pkg::*;

  localparam int NSAMP = 3000;
  localparam real EXPECTED [4] = '{24.0, 12.0, 5.0, 3.3};

  int checks = 0, failures = 0;

  logic [OP_N-1:0] a_mag, b_mag;
  logic            a_sgn, b_sgn;
  logic signed [MAG_W:0] p [4];

  isc_mul #(.SEG(0), .M(3)) u_m3 (.a_mag, .a_sgn, .b_mag, .b_sgn, .n1s(), .p(p[0]));
  isc_mul #(.SEG(0), .M(4)) u_m4 (.a_mag, .a_sgn, .b_mag, .b_sgn, .n1s(), .p(p[1]));
  isc_mul #(.SEG(0), .M(5)) u_m5 (.a_mag, .a_sgn, .b_mag, .b_sgn, .n1s(), .p(p[2]));
  isc_mul #(.SEG(0), .M(6)) u_m6 (.a_mag, .a_sgn, .b_mag, .b_sgn, .n1s(), .p(p[3]));

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rel [4];
    for (int j = 0; j < 4; j++) rel[j] = 0.0;
    for (int s = 0; s < NSAMP; s++) begin
      a_mag = OP_N'($urandom_range(1, 65535));
      b_mag = OP_N'($urandom_range(1, 65535));
      a_sgn = 1'($urandom);
      b_sgn = 1'($urandom);
      #1;
      for (int j = 0; j < 4; j++) begin
        longint e;
        real ex, pm;
        e = ref_mul(0, int'(a_mag), int'(a_sgn), int'(b_mag), int'(b_sgn), j + 3);
        checks++;
        if (longint'(p[j]) != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d cells: %0d x %0d got %0d exp %0d", 8 << j, a_mag, b_mag, p[j], e);
        end
        ex = real'(a_mag) * real'(b_mag);
        pm = (p[j] < 0) ? -real'(p[j]) : real'(p[j]);
        rel[j] += ((pm > ex) ? pm - ex : ex - pm) / ex;
      end
    end
    for (int j = 0; j < 4; j++) begin
      rel[j] = 100.0 * rel[j] / NSAMP;
      $display("%0d cells per PE: mean relative error %0.2f%% (expected about %0.1f%%)", 8 << j, rel[j], EXPECTED[j]);
      checks++;
      if (rel[j] > 1.5 * EXPECTED[j]) begin
        failures++;
        $display("FAIL %0d cells: error too large", 8 << j);
      end
      if (j > 0) begin
        checks++;
        if (rel[j] >= rel[j-1]) begin
          failures++;
          $display("FAIL error does not shrink from %0d to %0d cells", 4 << j, 8 << j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
