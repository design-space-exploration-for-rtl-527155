// Moore FSM controlling an AES-128 datapath, in two architectures.
//
// SYNC_OUTPUTS = 0 ("Comb"): the classic Moore machine. The transition
// function computes the next state from the inputs and the state register;
// the state register takes it on the rising clock edge; the output function
// decodes the registered state, so the outputs are combinational logic behind
// the state flip-flops.
//
// SYNC_OUTPUTS = 1 ("Sync"): the same machine with an output register. To
// avoid an extra cycle of delay the outputs are computed by a look-ahead
// output function, the output function applied to the next state (the input
// of the state register) instead of the current one, and registered on the
// same edge as the state. The outputs then come straight from flip-flops
// (glitch free, and decoupled from the logic the FSM drives) while showing,
// cycle for cycle, exactly what the Comb version shows.
//
// Both architectures follow the described design; the states and control
// word are defined in aes_fsm_pkg. Interface: in is sampled on each rising
// edge; ctrl is the Moore output of the current state; state is exposed for
// observation. Asynchronous active-low reset to S_IDLE (the reset style is
// this design's choice).
module aes_ctrl_fsm
  import aes_fsm_pkg::*;
#(
  parameter bit SYNC_OUTPUTS = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  aes_fsm_in_t in,
  output aes_ctrl_t   ctrl,
  output aes_state_e  state
);

  aes_state_e state_q, state_d;

  assign state_d = aes_next_state(state_q, in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= S_IDLE;
    else        state_q <= state_d;
  end

  assign state = state_q;

  if (SYNC_OUTPUTS) begin : g_sync
    aes_ctrl_t ctrl_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ctrl_q <= aes_output(S_IDLE);
      else        ctrl_q <= aes_output(state_d);   // look-ahead output function
    end
    assign ctrl = ctrl_q;
  end else begin : g_comb
    assign ctrl = aes_output(state_q);
  end

endmodule
