// Self-checking testbench for seq_adder (N = 192).
//
// Sixteen instances cover the whole set of generated adders: each of the four
// core architectures at digit widths 8, 16, 32 and 64. All receive the same
// operands and start pulse. Each instance's checker verifies that the
// addition takes exactly N/W cycles from the start edge to done, that done is
// a single-cycle pulse with busy low, and that {cout, sum} equals the 193-bit
// sum computed by the testbench. Operands include carries that must cross
// every digit boundary, and a start pulse while busy that must be ignored.
module tb_seq_adder;

  import dse_pkg::*;

  localparam int unsigned N   = 192;
  localparam int unsigned NI  = 16;
  // the whole generated set: every architecture at every digit width
  localparam int unsigned WS    [NI] = '{8, 8, 8, 8, 16, 16, 16, 16, 32, 32, 32, 32, 64, 64, 64, 64};
  localparam adder_arch_e ARCHS [NI] = '{ARCH_RCA, ARCH_CSA, ARCH_SKLANSKY, ARCH_BEHAVIORAL,
                                         ARCH_RCA, ARCH_CSA, ARCH_SKLANSKY, ARCH_BEHAVIORAL,
                                         ARCH_RCA, ARCH_CSA, ARCH_SKLANSKY, ARCH_BEHAVIORAL,
                                         ARCH_RCA, ARCH_CSA, ARCH_SKLANSKY, ARCH_BEHAVIORAL};

  logic         clk = 1'b0;
  logic         rst_n;
  logic         start;
  logic [N-1:0] a, b;
  logic [N:0]   expected;

  int checks_i   [NI];
  int failures_i [NI];
  int done_seen  [NI];
  int failures_main = 0;

  always #5 clk = ~clk;

  for (genvar k = 0; k < NI; k++) begin : g_inst
    logic [N-1:0] sum;
    logic         cout, busy, done;
    int           lat;
    bit           running;

    seq_adder #(.N(N), .W(WS[k]), .ARCH(ARCHS[k])) dut (
      .clk, .rst_n, .start, .a, .b, .sum, .cout, .busy, .done
    );

    always @(posedge clk) begin
      if (start && !busy) begin
        lat     <= 0;
        running <= 1'b1;
      end else if (running) begin
        lat <= lat + 1;
      end
    end

    always @(negedge clk) begin
      if (rst_n && done) begin
        checks_i[k] += 3;
        done_seen[k]++;
        if (lat != int'(N / WS[k])) begin
          failures_i[k]++;
          $display("FAIL inst %0d (W=%0d %s): latency %0d cycles, expected %0d",
                   k, WS[k], ARCHS[k].name(), lat, N / WS[k]);
        end
        if ({cout, sum} !== expected) begin
          failures_i[k]++;
          $display("FAIL inst %0d (W=%0d %s): got %h, expected %h",
                   k, WS[k], ARCHS[k].name(), {cout, sum}, expected);
        end
        if (busy) begin
          failures_i[k]++;
          $display("FAIL inst %0d: busy high with done", k);
        end
        running = 1'b0;
      end
    end
  end

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] r;
    for (int i = 0; i < N / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  int checks, failures;

  task automatic finish_report();
    checks   = 0;
    failures = failures_main;
    for (int k = 0; k < NI; k++) begin
      checks   += checks_i[k];
      failures += failures_i[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures_main++;
    $display("FAIL watchdog expired");
    finish_report();
  end

  // One addition on all instances; optionally pulse start again mid-way.
  task automatic add(input logic [N-1:0] x, input logic [N-1:0] y, input bit poke);
    int done_before [NI];
    for (int k = 0; k < NI; k++) done_before[k] = done_seen[k];
    a = x; b = y; expected = {1'b0, x} + {1'b0, y};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    if (poke) begin
      @(negedge clk);
      a = rand_word(); b = rand_word(); start = 1'b1;   // ignored: all busy
      @(negedge clk);
      start = 1'b0; a = x; b = y;
    end
    repeat (N / 8 + 2) @(negedge clk);   // the slowest instance has 8-bit digits
    for (int k = 0; k < NI; k++) begin
      if (done_seen[k] != done_before[k] + 1) begin
        failures_main++;
        $display("FAIL inst %0d: %0d done pulses for one addition", k, done_seen[k] - done_before[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < NI; k++) begin
      checks_i[k] = 0; failures_i[k] = 0; done_seen[k] = 0;
    end
    rst_n = 1'b0; start = 1'b0; a = '0; b = '0; expected = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    add('1, {{(N-1){1'b0}}, 1'b1}, 1'b0);        // carry through every digit, carry out
    add('1, '1, 1'b0);
    add('0, '0, 1'b0);
    add({N/2{2'b01}}, {N/2{2'b10}}, 1'b1);       // no carries at all
    for (int t = 0; t < 30; t++) add(rand_word(), rand_word(), (t % 5) == 0);
    finish_report();
  end

endmodule
