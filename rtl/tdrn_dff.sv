// tdrn_dff: resettable D-type negative-edge flip-flop (W bits wide).
// Q takes D at each falling edge of clk and holds it until the next one;
// QB is the complement of Q. RB is an active-low reset that clears Q
// (QB = 1). The falling edge and the active-low clear follow the library
// cell's description; making the reset asynchronous and the width a
// parameter are this design's choices.
module tdrn_dff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rb,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] qb
);
  always_ff @(negedge clk or negedge rb) begin
    if (!rb) q <= '0;
    else     q <= d;
  end
  assign qb = ~q;
endmodule
