// Cycle counter of the sequential adder.
//
// Keeps track of the N/W clock cycles one addition takes. A start pulse while
// idle raises busy and clears the count; each following cycle counts one
// digit. last is high in the cycle that handles the final digit (count ==
// COUNT-1), and on the edge that ends that cycle busy falls. A start while
// busy is ignored. Asynchronous active-low reset; the reset style and the
// start/busy handshake are this design's choices.
module digit_counter #(
  parameter int unsigned COUNT = 6   // cycles per operation (192/32)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  output logic                              busy,
  output logic                              last,
  output logic [$clog2(COUNT+1)-1:0]        count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      count <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        count <= '0;
      end
    end else if (last) begin
      busy  <= 1'b0;
    end else begin
      count <= count + 1'b1;
    end
  end

  assign last = busy && (count == ($clog2(COUNT+1))'(COUNT - 1));

endmodule
