// lf_adder: WIDTH-bit Ladner-Fisher parallel-prefix adder.
//
// The fixed-point adder of the LNS unit. Bit generate/propagate pairs are
// merged in a minimum-depth prefix tree of clog2(WIDTH) levels: at level l the
// upper half of every 2^(l+1)-bit block takes the group (G,P) of the top bit of
// its lower half, so fan-out doubles per level and every bit has its carry
// after clog2(WIDTH) merge stages. The carry in enters as the generate of a
// virtual bit -1. Purely combinational: sum = a + b + cin, cout the carry out.
// The choice of a Ladner-Fisher adder follows the published architecture; the exact prefix
// arrangement (the minimum-depth variant) is this implementation's choice.
module lf_adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] p0;
  logic [WIDTH-1:0] g [LEVELS+1];
  logic [WIDTH-1:0] p [LEVELS+1];

  assign p0   = a ^ b;
  // Fold the carry in into bit 0's generate.
  assign g[0] = (a & b) | {{(WIDTH-1){1'b0}}, p0[0] & cin};
  assign p[0] = p0;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar k = 0; k < WIDTH; k++) begin : g_bit
      if (((k >> l) & 1) == 1) begin : g_merge
        // Top bit of the lower half of this 2^(l+1) block.
        localparam int SRC = ((k >> l) << l) - 1;
        assign g[l+1][k] = g[l][k] | (p[l][k] & g[l][SRC]);
        assign p[l+1][k] = p[l][k] & p[l][SRC];
      end else begin : g_pass
        assign g[l+1][k] = g[l][k];
        assign p[l+1][k] = p[l][k];
      end
    end
  end

  // carry into bit k is the group generate of bits k-1..0 (with cin).
  assign sum  = p0 ^ {g[LEVELS][WIDTH-2:0], cin};
  assign cout = g[LEVELS][WIDTH-1];
endmodule
