// N-bit sequential adder with a W-bit adder core.
//
// An N-bit addition (N = 192, the operand size of a common elliptic-curve
// field) is done one W-bit digit per clock: two operand shift registers hand
// the core one digit of each operand per cycle, least significant first; a
// carry flip-flop links consecutive digits; the core's sum digit is shifted
// into a result shift register; and a counter stops the operation after N/W
// cycles. The core architecture is chosen by ARCH (ripple-carry,
// carry-select, Sklansky, or the behavioural '+'), the digit width by W;
// N, the four architectures, the digit widths 8/16/32/64, the three shift
// registers and the counter follow the described design. The carry
// flip-flop, the start/done handshake and the reset are this design's own.
//
// Interface and timing: while busy is low, a one-cycle start pulse loads a
// and b and clears the carry. The next N/W rising edges add one digit each.
// done is a one-cycle pulse in the cycle after the last digit, i.e. N/W
// cycles after the start edge; sum and cout then hold the result until the
// next start. start while busy is ignored.
module seq_adder
  import dse_pkg::*;
#(
  parameter int unsigned N    = 192,
  parameter int unsigned W    = 32,
  parameter adder_arch_e ARCH = ARCH_BEHAVIORAL
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         busy,
  output logic         done
);

  localparam int unsigned DIGITS = N / W;

  logic         load;
  logic         last;
  logic [W-1:0] a_dig, b_dig, s_dig;
  logic         carry_q, carry_d;

  assign load = start && !busy;

  digit_counter #(.COUNT(DIGITS)) u_cnt (
    .clk, .rst_n, .start(load), .busy, .last, .count()
  );

  digit_shift_reg #(.N(N), .W(W)) u_sr_a (
    .clk, .rst_n, .load, .shift(busy), .par_in(a), .ser_in('0),
    .par_out(), .ser_out(a_dig)
  );

  digit_shift_reg #(.N(N), .W(W)) u_sr_b (
    .clk, .rst_n, .load, .shift(busy), .par_in(b), .ser_in('0),
    .par_out(), .ser_out(b_dig)
  );

  adder_core #(.W(W), .ARCH(ARCH)) u_core (
    .a(a_dig), .b(b_dig), .cin(carry_q), .sum(s_dig), .cout(carry_d)
  );

  digit_shift_reg #(.N(N), .W(W)) u_sr_s (
    .clk, .rst_n, .load(1'b0), .shift(busy), .par_in('0), .ser_in(s_dig),
    .par_out(sum), .ser_out()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry_q <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= last;
      if (load)      carry_q <= 1'b0;
      else if (busy) carry_q <= carry_d;
    end
  end

  assign cout = carry_q;

  initial begin
    assert (N % W == 0)
      else $error("seq_adder: N (%0d) must be a multiple of W (%0d)", N, W);
  end

endmodule
