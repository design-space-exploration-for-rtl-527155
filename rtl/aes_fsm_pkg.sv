// States, inputs, outputs, transition function and output function of the
// 17-state Moore FSM that sequences an iterative AES-128 encryption datapath.
//
// Both FSM architectures in aes_ctrl_fsm use these two functions, so the
// high-level description is written once and each architecture only decides
// where the state and output registers sit. The state type is an enum with no
// explicit encoding, leaving the encoding (binary, one-hot, Gray) to the
// synthesis tool's FSM extraction.
//
// The state count (17) follows the described controller. The state graph and
// the control signals below are this design's own reading of what an AES-128
// controller with 17 states does: idle, load, the initial AddRoundKey,
// rounds 1 to 9 (SubBytes, ShiftRows, MixColumns, AddRoundKey), the final
// round 10 (no MixColumns), and four states that hand out the 128-bit
// ciphertext as four 32-bit words, each waiting for out_ready.
package aes_fsm_pkg;

  typedef enum logic [4:0] {
    S_IDLE,
    S_LOAD,
    S_ARK0,
    S_RND1, S_RND2, S_RND3, S_RND4, S_RND5, S_RND6, S_RND7, S_RND8, S_RND9,
    S_RND10,
    S_OUT0, S_OUT1, S_OUT2, S_OUT3
  } aes_state_e;

  localparam int unsigned NUM_STATES = 17;

  typedef struct packed {
    logic start;      // begin an encryption (sampled in S_IDLE)
    logic out_ready;  // the consumer takes the current output word
  } aes_fsm_in_t;

  typedef struct packed {
    logic       busy;       // not idle
    logic       load_en;    // load plaintext and cipher key into the datapath
    logic       sub_en;     // SubBytes and ShiftRows this cycle
    logic       mix_en;     // MixColumns this cycle
    logic       ark_en;     // AddRoundKey this cycle
    logic       key_en;     // advance the key schedule to the next round key
    logic [3:0] round;      // round number 0..10
    logic       out_valid;  // an output word is presented
    logic [1:0] out_sel;    // which 32-bit ciphertext word is presented
  } aes_ctrl_t;

  // Transition function: next state from the current state and the inputs.
  function automatic aes_state_e aes_next_state(aes_state_e s, aes_fsm_in_t in);
    unique case (s)
      S_IDLE:  return in.start     ? S_LOAD : S_IDLE;
      S_OUT0:  return in.out_ready ? S_OUT1 : S_OUT0;
      S_OUT1:  return in.out_ready ? S_OUT2 : S_OUT1;
      S_OUT2:  return in.out_ready ? S_OUT3 : S_OUT2;
      S_OUT3:  return in.out_ready ? S_IDLE : S_OUT3;
      S_RND10: return S_OUT0;
      default: return aes_state_e'(s + 5'd1);   // S_LOAD .. S_RND9 run straight on
    endcase
  endfunction

  // Output function: control word from the state alone (Moore).
  function automatic aes_ctrl_t aes_output(aes_state_e s);
    aes_ctrl_t o;
    o      = '0;
    o.busy = (s != S_IDLE);
    unique case (s)
      S_IDLE: ;
      S_LOAD: o.load_en = 1'b1;
      S_ARK0: o.ark_en  = 1'b1;
      S_RND10: begin
        o.sub_en = 1'b1;
        o.ark_en = 1'b1;
        o.key_en = 1'b1;
        o.round  = 4'd10;
      end
      S_OUT0, S_OUT1, S_OUT2, S_OUT3: begin
        o.out_valid = 1'b1;
        o.out_sel   = 2'(s - S_OUT0);
      end
      default: begin   // S_RND1 .. S_RND9
        o.sub_en = 1'b1;
        o.mix_en = 1'b1;
        o.ark_en = 1'b1;
        o.key_en = 1'b1;
        o.round  = 4'(s - S_ARK0);
      end
    endcase
    return o;
  endfunction

endpackage
