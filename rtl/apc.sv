// apc: parallel counter that turns the AND-ed stochastic bit-stream back into binary.
//
// It counts the ones of a WIDTH-bit stream (N_1s), which is the stochastic product
// scaled by WIDTH. The count is exact: level 0 holds the single bits, and each
// further level adds neighbouring pairs of the level below, so a 32-bit stream
// takes five adder levels. Combinational; count is $clog2(WIDTH)+1 bits wide.
module apc #(
  parameter int WIDTH = 32,
  localparam int CW   = $clog2(WIDTH) + 1,
  localparam int LV   = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] bits,
  output logic [CW-1:0]    count
);

  logic [CW-1:0] s [LV+1][WIDTH];

  always_comb begin
    int n;   // entries used at the level below
    for (int i = 0; i < WIDTH; i++) s[0][i] = CW'(bits[i]);
    n = WIDTH;
    for (int l = 1; l <= LV; l++) begin
      for (int i = 0; i < WIDTH; i++) begin
        if (2 * i + 1 < n)  s[l][i] = s[l-1][2*i] + s[l-1][2*i+1];
        else if (2 * i < n) s[l][i] = s[l-1][2*i];
        else                s[l][i] = '0;
      end
      n = (n + 1) / 2;
    end
    count = s[LV][0];
  end

endmodule
