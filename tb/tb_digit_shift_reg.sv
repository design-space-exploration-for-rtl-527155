// Self-checking testbench for digit_shift_reg (N = 192, W = 32).
//
// Loads random words and checks that the digits come out at ser_out least
// significant first, one per shift; shifts random digits in and checks that
// par_out holds them in order after N/W shifts; checks that the register
// holds when neither load nor shift is high, and that load wins over shift.
// A shadow copy of the register kept by the testbench is the reference.
module tb_digit_shift_reg;

  localparam int unsigned N = 192;
  localparam int unsigned W = 32;
  localparam int unsigned D = N / W;

  int checks   = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         load, shift;
  logic [N-1:0] par_in, par_out, shadow;
  logic [W-1:0] ser_in, ser_out;

  digit_shift_reg dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] r;
    for (int i = 0; i < N / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic check(input string what);
    checks++;
    if (par_out !== shadow || ser_out !== shadow[W-1:0]) begin
      failures++;
      $display("FAIL %s: par_out=%h expected %h", what, par_out, shadow);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; shift = 1'b0; par_in = '0; ser_in = '0;
    shadow = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("after reset");
    for (int t = 0; t < 50; t++) begin
      // parallel load
      par_in = rand_word(); load = 1'b1; shift = (t % 2 == 1);  // load wins over shift
      @(negedge clk);
      shadow = par_in; load = 1'b0; shift = 1'b0;
      check("load");
      // hold
      @(negedge clk);
      check("hold");
      // shift out D digits while shifting random digits in
      for (int d = 0; d < D; d++) begin
        logic [W-1:0] expect_out;
        expect_out = shadow[W-1:0];
        checks++;
        if (ser_out !== expect_out) begin
          failures++;
          $display("FAIL digit %0d out: %h expected %h", d, ser_out, expect_out);
        end
        ser_in = W'($urandom); shift = 1'b1;
        @(negedge clk);
        shadow = {ser_in, shadow[N-1:W]};
        shift = 1'b0;
        check("shift");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
