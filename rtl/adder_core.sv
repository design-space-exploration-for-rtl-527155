// W-bit adder core selector.
//
// Instantiates exactly one of the four adder cores according to ARCH, so
// that the sequential adder can be generated in any of the four
// architectures from one description. All cores share the same ports: two
// W-bit digits and a carry-in in, a W-bit sum and a carry-out out, all
// combinational.
module adder_core
  import dse_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter adder_arch_e ARCH = ARCH_BEHAVIORAL
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  if (ARCH == ARCH_RCA) begin : g_rca
    rca_adder #(.W(W)) u_add (.a, .b, .cin, .sum, .cout);
  end else if (ARCH == ARCH_CSA) begin : g_csa
    csa_adder #(.W(W)) u_add (.a, .b, .cin, .sum, .cout);
  end else if (ARCH == ARCH_SKLANSKY) begin : g_skl
    sklansky_adder #(.W(W)) u_add (.a, .b, .cin, .sum, .cout);
  end else begin : g_beh
    behavioral_adder #(.W(W)) u_add (.a, .b, .cin, .sum, .cout);
  end

endmodule
