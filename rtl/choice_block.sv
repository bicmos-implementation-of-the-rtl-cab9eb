// choice_block: W (sixteen on the test chip) 2-to-1 multiplexers that put
// the test outputs of one of the two neurons on the shared output pads:
// choice = 0 selects in_n1 (TSPC neuron), choice = 1 selects in_n2 (UCDCS
// neuron). The polarity of `choice` is this design's choice.
// Combinational.
module choice_block #(
  parameter int unsigned W = 16
) (
  input  logic         choice,
  input  logic [W-1:0] in_n1,
  input  logic [W-1:0] in_n2,
  output logic [W-1:0] out
);
  always_comb begin
    for (int unsigned i = 0; i < W; i++) out[i] = choice ? in_n2[i] : in_n1[i];
  end
endmodule
