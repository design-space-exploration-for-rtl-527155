// Shared types of the sequential adder family.
//
// adder_arch_e names the four W-bit adder cores that can sit inside the
// sequential adder: a ripple-carry adder, a carry-select adder and a Sklansky
// parallel-prefix adder, all three written out of explicit gates, and a core
// written with the '+' operator whose structure is left to synthesis. The four
// names are the architecture set of the adder design space; the numbering is
// this design's own.
package dse_pkg;

  typedef enum logic [1:0] {
    ARCH_RCA        = 2'd0,
    ARCH_CSA        = 2'd1,
    ARCH_SKLANSKY   = 2'd2,
    ARCH_BEHAVIORAL = 2'd3
  } adder_arch_e;

  // Number of architectures, for arrays indexed by adder_arch_e.
  localparam int unsigned NUM_ARCH = 4;

endpackage
