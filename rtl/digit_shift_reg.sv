// N-bit shift register that moves W bits (one digit) per clock.
//
// Used three times in the sequential adder: twice as an operand register
// (loaded in parallel, digits leave least significant first at ser_out) and
// once as the result register (digits enter at the top through ser_in, and
// after N/W shifts the whole word is at par_out).
//
// Timing: on a rising edge with load high the register takes par_in; else
// with shift high it moves one digit towards bit 0 and ser_in enters at the
// top. load wins over shift. ser_out is the current lowest digit, par_out the
// current contents. Asynchronous active-low reset clears it; the reset style
// is this design's choice.
module digit_shift_reg #(
  parameter int unsigned N = 192,  // word width
  parameter int unsigned W = 32    // digit width; N must be a multiple of W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [N-1:0] par_in,
  input  logic [W-1:0] ser_in,
  output logic [N-1:0] par_out,
  output logic [W-1:0] ser_out
);

  logic [N-1:0]   q;
  logic [N+W-1:0] q_ext;   // ser_in above the current contents

  assign q_ext = {ser_in, q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (load)   q <= par_in;
    else if (shift)  q <= q_ext[N+W-1:W];
  end

  assign par_out = q;
  assign ser_out = q[W-1:0];

  initial begin
    assert (N % W == 0)
      else $error("digit_shift_reg: N (%0d) must be a multiple of W (%0d)", N, W);
  end

endmodule
