// W-bit ripple-carry adder core.
//
// A chain of W full adders written as explicit gates: each bit's sum is
// a ^ b ^ carry-in and its carry-out is a&b | carry-in&(a^b), so the carry
// ripples from bit 0 to bit W-1. Purely combinational: sum and cout settle
// one full chain delay after a, b or cin change. The gate-level form is the
// ripple-carry member of the adder design space; its carry chain length grows
// with W, which is why this core gets slower as the digit widens.
module rca_adder #(
  parameter int unsigned W = 32   // digit width of the sequential adder
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;   // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    logic p;
    assign p          = a[i] ^ b[i];
    assign sum[i]     = p ^ c[i];
    assign c[i+1]     = (a[i] & b[i]) | (p & c[i]);
  end

  assign cout = c[W];

endmodule
