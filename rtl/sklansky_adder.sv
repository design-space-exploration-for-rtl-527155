// W-bit Sklansky parallel-prefix adder core.
//
// Each bit forms a generate g = a&b and a propagate p = a^b; the carry-in is
// folded into bit 0's generate. A prefix tree of $clog2(W) levels then
// combines (g,p) pairs with the operator (g1,p1)o(g0,p0) = (g1 | p1&g0, p1&p0).
// At level l every bit whose index has bit l set combines with the last bit of
// the 2^l-bit group just below it, the divide-and-conquer pattern of the
// Sklansky adder: logarithmic depth, with fan-out doubling at each level.
// After the last level gp[i] is the carry out of bit i. Purely combinational.
module sklansky_adder #(
  parameter int unsigned W = 32   // digit width of the sequential adder
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] p0;
  logic [W-1:0] gl [LEVELS+1];   // generate after each level
  logic [W-1:0] pl [LEVELS+1];   // propagate after each level

  assign p0     = a ^ b;
  assign pl[0]  = p0;
  assign gl[0]  = (a & b) | {{(W-1){1'b0}}, p0[0] & cin};

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (((i >> l) & 1) == 1) begin : g_combine
        localparam int unsigned J = ((i >> l) << l) - 1;
        assign gl[l+1][i] = gl[l][i] | (pl[l][i] & gl[l][J]);
        assign pl[l+1][i] = pl[l][i] & pl[l][J];
      end else begin : g_pass
        assign gl[l+1][i] = gl[l][i];
        assign pl[l+1][i] = pl[l][i];
      end
    end
  end

  // gl[LEVELS][i] is the carry out of bit i, cin included.
  assign sum  = p0 ^ {gl[LEVELS][W-2:0], cin};
  assign cout = gl[LEVELS][W-1];

endmodule
