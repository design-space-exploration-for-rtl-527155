// W-bit carry-select adder core.
//
// The digit is cut into blocks of BLOCK bits. The lowest block is a plain
// ripple-carry adder fed by cin. Every higher block holds two ripple-carry
// adders that add the same bits assuming a carry-in of 0 and of 1; once the
// real carry out of the block below is known, a multiplexer selects the
// matching sum and carry. The carry therefore crosses each block through one
// multiplexer instead of BLOCK full adders. Purely combinational.
//
// The block size is this design's choice (uniform blocks of 4 bits); W must
// be a multiple of BLOCK.
module csa_adder #(
  parameter int unsigned W     = 32,  // digit width of the sequential adder
  parameter int unsigned BLOCK = 4    // bits per carry-select block
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NBLK = W / BLOCK;

  logic [NBLK:0] bc;   // bc[k] is the carry into block k

  assign bc[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    logic [BLOCK-1:0] a_k, b_k;
    assign a_k = a[k*BLOCK +: BLOCK];
    assign b_k = b[k*BLOCK +: BLOCK];

    if (k == 0) begin : g_first
      rca_adder #(.W(BLOCK)) u_rca (
        .a(a_k), .b(b_k), .cin(bc[0]),
        .sum(sum[k*BLOCK +: BLOCK]), .cout(bc[1])
      );
    end else begin : g_select
      logic [BLOCK-1:0] s0, s1;
      logic             c0, c1;
      rca_adder #(.W(BLOCK)) u_rca0 (.a(a_k), .b(b_k), .cin(1'b0), .sum(s0), .cout(c0));
      rca_adder #(.W(BLOCK)) u_rca1 (.a(a_k), .b(b_k), .cin(1'b1), .sum(s1), .cout(c1));
      assign sum[k*BLOCK +: BLOCK] = bc[k] ? s1 : s0;
      assign bc[k+1]               = bc[k] ? c1 : c0;
    end
  end

  assign cout = bc[NBLK];

  initial begin
    assert (W % BLOCK == 0)
      else $error("csa_adder: W (%0d) must be a multiple of BLOCK (%0d)", W, BLOCK);
  end

endmodule
