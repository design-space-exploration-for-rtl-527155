// End-to-end testbench for crypto_dse_top at its default parameters
// (N = 192, W = 32).
//
// Adder side: a stream of 192-bit additions goes to all four architectures at
// once. For each, the testbench checks {cout, sum} against its own 193-bit
// sum and the latency of N/W = 6 cycles from the start edge to done, and that
// a start pulse while busy is ignored.
//
// FSM side: random start and out_ready drive the Comb and Sync controllers;
// a reference model in the testbench gives the expected state and control
// word each cycle, and the two architectures must agree cycle for cycle.
//
// Every mechanism must occur at least once, else it counts as a failure:
// an addition completed by each architecture, a carry crossing a digit
// boundary, a carry out of the full word, an ignored start on the adder,
// an encryption from start to the last output word, an output stall
// (out_ready low in an output state), an ignored start on the FSM, and a
// visit to each of the 17 states.
module tb_crypto_dse_top;

  import dse_pkg::*;
  import aes_fsm_pkg::*;

  localparam int unsigned N = 192;
  localparam int unsigned W = 32;
  localparam int unsigned D = N / W;

  int checks   = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         add_start;
  logic [N-1:0] add_a, add_b;
  logic [N-1:0] add_sum  [NUM_ARCH];
  logic         add_cout [NUM_ARCH];
  logic         add_busy [NUM_ARCH];
  logic         add_done [NUM_ARCH];
  aes_fsm_in_t  fsm_in;
  aes_ctrl_t    fsm_ctrl_comb, fsm_ctrl_sync;
  aes_state_e   fsm_state_comb, fsm_state_sync;

  crypto_dse_top dut (.*);

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- counters
  int adds_done [NUM_ARCH];
  int digit_carries, word_carries, add_ignored;
  int encryptions, stalls, fsm_ignored;
  int visits [17];

  // ------------------------------------------------------------- FSM model
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

  int ref_state;

  always @(negedge clk) begin
    if (rst_n) begin
      aes_ctrl_t e;
      e = ref_out(ref_state);
      visits[ref_state]++;
      checks += 4;
      if (int'(fsm_state_comb) != ref_state || int'(fsm_state_sync) != ref_state) begin
        failures++;
        $display("FAIL FSM states %s/%s, expected %0d", fsm_state_comb.name(),
                 fsm_state_sync.name(), ref_state);
      end
      if (fsm_ctrl_comb !== e) begin
        failures++;
        $display("FAIL comb ctrl %p, expected %p", fsm_ctrl_comb, e);
      end
      if (fsm_ctrl_sync !== e) begin
        failures++;
        $display("FAIL sync ctrl %p, expected %p", fsm_ctrl_sync, e);
      end
      if (fsm_ctrl_comb !== fsm_ctrl_sync) begin
        failures++;
        $display("FAIL comb and sync outputs differ");
      end
      fsm_in.start     = ($urandom % 4) == 0;
      fsm_in.out_ready = ($urandom % 3) != 0;
      if (ref_state != 0 && fsm_in.start)            fsm_ignored++;
      if (ref_state >= 13 && !fsm_in.out_ready)      stalls++;
      if (ref_state == 16 && fsm_in.out_ready)       encryptions++;
      ref_state = ref_next(ref_state, fsm_in.start, fsm_in.out_ready);
    end
  end

  // ----------------------------------------------------------- adder checks
  logic [N:0] expected;
  int         lat;

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] r;
    for (int i = 0; i < N / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic add(input logic [N-1:0] x, input logic [N-1:0] y, input bit poke);
    bit seen [NUM_ARCH];
    for (int k = 0; k < NUM_ARCH; k++) seen[k] = 1'b0;
    expected = {1'b0, x} + {1'b0, y};
    // carries into digit boundaries, worked out digit by digit
    begin
      logic c;
      c = 1'b0;
      for (int d = 0; d < D; d++) begin
        logic [W:0] part;
        part = {1'b0, x[d*W +: W]} + {1'b0, y[d*W +: W]} + (W+1)'(c);
        c = part[W];
        if (c && d < D - 1) digit_carries++;
      end
      if (c) word_carries++;
    end
    add_a = x; add_b = y; add_start = 1'b1;
    @(negedge clk);
    add_start = 1'b0;
    lat = 0;
    for (int t = 1; t <= D + 2; t++) begin
      if (poke && t == 2) begin
        add_a = rand_word(); add_start = 1'b1;   // all busy: must be ignored
        add_ignored++;
      end
      @(negedge clk);
      add_start = 1'b0; add_a = x;
      for (int k = 0; k < NUM_ARCH; k++) begin
        if (add_done[k]) begin
          checks += 2;
          seen[k] = 1'b1;
          adds_done[k]++;
          if (t != int'(D)) begin
            failures++;
            $display("FAIL %s: done after %0d cycles, expected %0d",
                     adder_arch_e'(k), t, D);
          end
          if ({add_cout[k], add_sum[k]} !== expected) begin
            failures++;
            $display("FAIL %s: sum %h expected %h", adder_arch_e'(k),
                     {add_cout[k], add_sum[k]}, expected);
          end
        end
      end
    end
    for (int k = 0; k < NUM_ARCH; k++) begin
      checks++;
      if (!seen[k]) begin
        failures++;
        $display("FAIL %s: no done", adder_arch_e'(k));
      end
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NUM_ARCH; k++) adds_done[k] = 0;
    for (int s = 0; s < 17; s++) visits[s] = 0;
    digit_carries = 0; word_carries = 0; add_ignored = 0;
    encryptions = 0; stalls = 0; fsm_ignored = 0;
    rst_n = 1'b0; add_start = 1'b0; add_a = '0; add_b = '0; fsm_in = '0; ref_state = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    add('1, {{(N-1){1'b0}}, 1'b1}, 1'b0);
    add('1, '1, 1'b1);
    for (int t = 0; t < 200; t++) add(rand_word(), rand_word(), (t % 7) == 3);
    // mechanism coverage
    for (int k = 0; k < NUM_ARCH; k++) begin
      checks++;
      if (adds_done[k] == 0) begin failures++; $display("FAIL %s never added", adder_arch_e'(k)); end
    end
    for (int s = 0; s < 17; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("FAIL FSM state %0d never visited", s); end
    end
    checks += 6;
    if (digit_carries == 0) begin failures++; $display("FAIL no carry between digits"); end
    if (word_carries  == 0) begin failures++; $display("FAIL no carry out"); end
    if (add_ignored   == 0) begin failures++; $display("FAIL no ignored adder start"); end
    if (encryptions   == 0) begin failures++; $display("FAIL no complete encryption"); end
    if (stalls        == 0) begin failures++; $display("FAIL no output stall"); end
    if (fsm_ignored   == 0) begin failures++; $display("FAIL no ignored FSM start"); end
    $display("additions per architecture %0d/%0d/%0d/%0d, digit carries %0d, carry outs %0d, ignored adder starts %0d",
             adds_done[0], adds_done[1], adds_done[2], adds_done[3], digit_carries, word_carries, add_ignored);
    $display("encryptions %0d, output stalls %0d, ignored FSM starts %0d", encryptions, stalls, fsm_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
