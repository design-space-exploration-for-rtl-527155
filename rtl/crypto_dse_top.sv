// Generated cryptographic building blocks, side by side.
//
// Two independent examples of generated cryptographic hardware:
//
//  * the N-bit sequential adder (N = 192, digit width W), instantiated once
//    for each of the four adder-core architectures (ripple-carry,
//    carry-select, Sklansky, behavioural '+'). All four share the operand and
//    start inputs, and each brings out its own sum, carry, busy and done, so
//    the architectures of the adder design space can be compared on the same
//    operands. All finish after N/W cycles with the same result.
//
//  * the 17-state Moore FSM that sequences an AES-128 datapath, instantiated
//    in its Comb architecture (output function on the state register) and its
//    Sync architecture (output register fed by a look-ahead output function).
//    Both take the same inputs and bring out their control words and states.
//
// Placing every architecture in one top is this design's own choice, made so
// that one build covers the whole design space; a single configuration is
// had by instantiating seq_adder or aes_ctrl_fsm alone. Clock and
// asynchronous active-low reset are shared.
module crypto_dse_top
  import dse_pkg::*;
  import aes_fsm_pkg::*;
#(
  parameter int unsigned N = 192,  // adder operand width
  parameter int unsigned W = 32    // adder digit width (8, 16, 32 or 64)
) (
  input  logic         clk,
  input  logic         rst_n,

  // sequential adder, all four architectures (index: adder_arch_e)
  input  logic         add_start,
  input  logic [N-1:0] add_a,
  input  logic [N-1:0] add_b,
  output logic [N-1:0] add_sum  [NUM_ARCH],
  output logic         add_cout [NUM_ARCH],
  output logic         add_busy [NUM_ARCH],
  output logic         add_done [NUM_ARCH],

  // AES control FSM, Comb and Sync architectures
  input  aes_fsm_in_t  fsm_in,
  output aes_ctrl_t    fsm_ctrl_comb,
  output aes_ctrl_t    fsm_ctrl_sync,
  output aes_state_e   fsm_state_comb,
  output aes_state_e   fsm_state_sync
);

  for (genvar k = 0; k < NUM_ARCH; k++) begin : g_adder
    seq_adder #(.N(N), .W(W), .ARCH(adder_arch_e'(k))) u_adder (
      .clk, .rst_n,
      .start(add_start), .a(add_a), .b(add_b),
      .sum(add_sum[k]), .cout(add_cout[k]), .busy(add_busy[k]), .done(add_done[k])
    );
  end

  aes_ctrl_fsm #(.SYNC_OUTPUTS(1'b0)) u_fsm_comb (
    .clk, .rst_n, .in(fsm_in), .ctrl(fsm_ctrl_comb), .state(fsm_state_comb)
  );

  aes_ctrl_fsm #(.SYNC_OUTPUTS(1'b1)) u_fsm_sync (
    .clk, .rst_n, .in(fsm_in), .ctrl(fsm_ctrl_sync), .state(fsm_state_sync)
  );

endmodule
