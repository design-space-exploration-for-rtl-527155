// Self-checking testbench for aes_ctrl_fsm, both architectures.
//
// A Comb instance (SYNC_OUTPUTS = 0) and a Sync instance (SYNC_OUTPUTS = 1)
// get the same inputs. The testbench keeps its own model of the controller,
// the state as a number 0..16, written without the package's functions, and
// each cycle checks both instances' state and every field of the control
// word against it. Because the Sync version's outputs come from a register
// fed by the look-ahead output function, they must match the Comb version in
// the same cycle, with no extra delay. Inputs: start pulses (also while busy,
// where they must be ignored) and a random out_ready that stalls the output
// states. Also checks that an encryption takes 13 cycles from the start edge
// to the first output word, and that every one of the 17 states is visited.
module tb_aes_ctrl_fsm;

  import aes_fsm_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  aes_fsm_in_t in;
  aes_ctrl_t   ctrl_comb, ctrl_sync;
  aes_state_e  state_comb, state_sync;

  aes_ctrl_fsm                      u_comb (.clk, .rst_n, .in, .ctrl(ctrl_comb), .state(state_comb));
  aes_ctrl_fsm #(.SYNC_OUTPUTS(1'b1)) u_sync (.clk, .rst_n, .in, .ctrl(ctrl_sync), .state(state_sync));

  always #5 clk = ~clk;

  // Reference model: 0 idle, 1 load, 2 initial AddRoundKey, 3..12 rounds
  // 1..10, 13..16 output words 0..3.
  int ref_state;
  int visits [17];

  function automatic aes_ctrl_t ref_out(int s);
    aes_ctrl_t o;
    o.busy      = (s != 0);
    o.load_en   = (s == 1);
    o.sub_en    = (s >= 3 && s <= 12);
    o.mix_en    = (s >= 3 && s <= 11);
    o.ark_en    = (s >= 2 && s <= 12);
    o.key_en    = (s >= 3 && s <= 12);
    o.round     = (s >= 3 && s <= 12) ? 4'(s - 2) : 4'd0;
    o.out_valid = (s >= 13);
    o.out_sel   = (s >= 13) ? 2'(s - 13) : 2'd0;
    return o;
  endfunction

  function automatic int ref_next(int s, logic start, logic out_ready);
    if (s == 0)  return start ? 1 : 0;
    if (s >= 13) return out_ready ? ((s == 16) ? 0 : s + 1) : s;
    return s + 1;
  endfunction

  task automatic compare();
    aes_ctrl_t e;
    e = ref_out(ref_state);
    checks += 4;
    if (int'(state_comb) != ref_state) begin
      failures++;
      $display("FAIL comb state %s, expected %0d", state_comb.name(), ref_state);
    end
    if (int'(state_sync) != ref_state) begin
      failures++;
      $display("FAIL sync state %s, expected %0d", state_sync.name(), ref_state);
    end
    if (ctrl_comb !== e) begin
      failures++;
      $display("FAIL comb ctrl %p in state %0d, expected %p", ctrl_comb, ref_state, e);
    end
    if (ctrl_sync !== e) begin
      failures++;
      $display("FAIL sync ctrl %p in state %0d, expected %p", ctrl_sync, ref_state, e);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int start_cycle, cycle, stalls, ignored_starts, latency_checks;

  initial begin
    for (int s = 0; s < 17; s++) visits[s] = 0;
    stalls = 0; ignored_starts = 0; latency_checks = 0; cycle = 0; start_cycle = -1;
    rst_n = 1'b0; in = '0; ref_state = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      compare();
      visits[ref_state]++;
      // latency from the start edge to the first output word
      if (ref_state == 13 && start_cycle >= 0) begin
        checks++;
        latency_checks++;
        if (cycle - start_cycle != 13) begin
          failures++;
          $display("FAIL first output word %0d cycles after start, expected 13", cycle - start_cycle);
        end
        start_cycle = -1;
      end
      in.start     = ($urandom % 4) == 0;
      in.out_ready = ($urandom % 3) != 0;
      if (ref_state == 0 && in.start) start_cycle = cycle;
      if (ref_state != 0 && in.start) ignored_starts++;
      if (ref_state >= 13 && !in.out_ready) stalls++;
      ref_state = ref_next(ref_state, in.start, in.out_ready);
      @(negedge clk);
      cycle++;
    end
    for (int s = 0; s < 17; s++) begin
      checks++;
      if (visits[s] == 0) begin
        failures++;
        $display("FAIL state %0d never visited", s);
      end
    end
    checks += 3;
    if (stalls == 0)         begin failures++; $display("FAIL no output stall"); end
    if (ignored_starts == 0) begin failures++; $display("FAIL no start while busy"); end
    if (latency_checks == 0) begin failures++; $display("FAIL no complete encryption"); end
    $display("encryptions %0d, output stalls %0d, ignored starts %0d",
             latency_checks, stalls, ignored_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
