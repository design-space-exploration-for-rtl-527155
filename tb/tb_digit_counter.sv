// Self-checking testbench for digit_counter.
//
// Two instances: the default COUNT = 6 (192-bit words in 32-bit digits) and
// COUNT = 24 (8-bit digits). For each, a start pulse must raise busy on the
// next edge, last must be high in exactly one cycle, the COUNT-th busy cycle,
// busy must stay high for exactly COUNT cycles, count must step 0..COUNT-1,
// and a start while busy must be ignored.
module tb_digit_counter;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n;
  logic start;

  logic       busy6,  last6;   logic [2:0] count6;
  logic       busy24, last24;  logic [4:0] count24;

  digit_counter               u_c6  (.clk, .rst_n, .start, .busy(busy6),  .last(last6),  .count(count6));
  digit_counter #(.COUNT(24)) u_c24 (.clk, .rst_n, .start, .busy(busy24), .last(last24), .count(count24));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe one operation of an instance from the start pulse on.
  task automatic run(input int count, input bit restart_while_busy);
    int busy_cycles = 0;
    int last_cycles = 0;
    int last_at     = -1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int c = 0; c < count + 3; c++) begin
      logic b, l;
      int   cnt;
      b   = (count == 6) ? busy6  : busy24;
      l   = (count == 6) ? last6  : last24;
      cnt = (count == 6) ? int'(count6) : int'(count24);
      if (b) begin
        busy_cycles++;
        checks++;
        if (cnt != c) begin
          failures++;
          $display("FAIL COUNT=%0d: count=%0d in busy cycle %0d", count, cnt, c);
        end
      end
      if (l) begin
        last_cycles++;
        last_at = c;
      end
      if (restart_while_busy && c == 2) start = 1'b1;   // must be ignored
      @(negedge clk);
      start = 1'b0;
    end
    checks += 3;
    if (busy_cycles != count) begin
      failures++;
      $display("FAIL COUNT=%0d: busy for %0d cycles", count, busy_cycles);
    end
    if (last_cycles != 1) begin
      failures++;
      $display("FAIL COUNT=%0d: last high in %0d cycles", count, last_cycles);
    end
    if (last_at != count - 1) begin
      failures++;
      $display("FAIL COUNT=%0d: last in cycle %0d, expected %0d", count, last_at, count - 1);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (busy6 || busy24 || last6 || last24) begin
      failures++;
      $display("FAIL busy or last after reset");
    end
    @(negedge clk);
    run(6, 1'b0);
    run(6, 1'b1);
    repeat (30) @(negedge clk);   // let the long counter finish
    run(24, 1'b0);
    run(24, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
