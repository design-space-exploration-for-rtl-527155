// Self-checking testbench for sklansky_adder.
//
// Drives three instances (8, 32 and 64-bit digits) with corner cases (zero,
// all ones with and without carry-in, alternating bits, a lone carry that
// must ripple across the whole digit) and random digits, and compares sum and
// carry-out with a reference computed in the testbench with wider integer
// arithmetic. The core is combinational, so each vector is checked after a
// settling delay.
module tb_sklansky_adder;

  int checks   = 0;
  int failures = 0;

  logic [7:0]  a8,  b8,  s8;   logic c8_in,  c8_out;
  logic [31:0] a32, b32, s32;  logic c32_in, c32_out;
  logic [63:0] a64, b64, s64;  logic c64_in, c64_out;

  sklansky_adder #(.W(8))  u_w8  (.a(a8),  .b(b8),  .cin(c8_in),  .sum(s8),  .cout(c8_out));
  sklansky_adder           u_w32 (.a(a32), .b(b32), .cin(c32_in), .sum(s32), .cout(c32_out));
  sklansky_adder #(.W(64)) u_w64 (.a(a64), .b(b64), .cin(c64_in), .sum(s64), .cout(c64_out));

  task automatic apply(input logic [63:0] a, input logic [63:0] b, input logic cin);
    logic [64:0] r64;
    logic [32:0] r32;
    logic [8:0]  r8;
    a8  = a[7:0];   b8  = b[7:0];   c8_in  = cin;
    a32 = a[31:0];  b32 = b[31:0];  c32_in = cin;
    a64 = a;        b64 = b;        c64_in = cin;
    #1;
    r8  = 9'(a[7:0])   + 9'(b[7:0])   + 9'(cin);
    r32 = 33'(a[31:0]) + 33'(b[31:0]) + 33'(cin);
    r64 = 65'(a)       + 65'(b)       + 65'(cin);
    checks += 3;
    if ({c8_out, s8} !== r8) begin
      failures++;
      $display("FAIL W=8  a=%h b=%h cin=%b got %b_%h exp %h", a8, b8, cin, c8_out, s8, r8);
    end
    if ({c32_out, s32} !== r32) begin
      failures++;
      $display("FAIL W=32 a=%h b=%h cin=%b got %b_%h exp %h", a32, b32, cin, c32_out, s32, r32);
    end
    if ({c64_out, s64} !== r64) begin
      failures++;
      $display("FAIL W=64 a=%h b=%h cin=%b got %b_%h exp %h", a64, b64, cin, c64_out, s64, r64);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);                       // carry ripples through every bit
    apply('1, '1, 1'b0);
    apply('1, '1, 1'b1);
    apply(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA, 1'b1);
    apply(64'h0000_0000_0000_0001, 64'hFFFF_FFFF_FFFF_FFFF, 1'b0);
    for (int k = 0; k < 64; k++) apply(64'(1) << k, 64'(1) << k, 1'b0);
    for (int k = 0; k < 2000; k++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
