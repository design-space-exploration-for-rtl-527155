// W-bit adder core described at the behavioural level.
//
// The sum is written with the '+' operator alone, with no structure imposed,
// so the synthesis tool is free to map it onto whatever it does best (on an
// FPGA, the dedicated carry chain). Purely combinational. Same ports as the
// gate-level cores, so the sequential adder can swap them freely.
module behavioral_adder #(
  parameter int unsigned W = 32   // digit width of the sequential adder
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  assign {cout, sum} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};

endmodule
