// parallel_subtractor3: the single functional block of the single block
// neuron. It merges the 3-input parallel counter, the start-value
// multiplexer and the subtractor:
//   result = (sel ? {0, threshold} : feedback) - popcount(act)
// with 19 inputs (3 AND outputs, 7 threshold bits, 8 fed-back bits, the
// selection bit) and 8 outputs, R7 being the sign bit. In silicon this is
// one merged NMOS switching tree evaluated by dynamic logic; here it is
// the same Boolean function. Combinational: the output latch (TSPC or
// UCDCS) closes the loop in single_block_neuron. The zero-extension of the
// positive 7-bit threshold is this design's reading.
module parallel_subtractor3 #(
  parameter int unsigned N_IN  = 3,
  parameter int unsigned THR_W = hype_pkg::THR_W,
  parameter int unsigned VAL_W = hype_pkg::VAL_W
) (
  input  logic [N_IN-1:0]  act,
  input  logic [THR_W-1:0] threshold,
  input  logic [VAL_W-1:0] feedback,
  input  logic             sel,
  output logic [VAL_W-1:0] result
);
  logic [VAL_W-1:0] start;
  logic [VAL_W-1:0] count;
  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < N_IN; i++) count = count + VAL_W'(act[i]);
    start  = sel ? VAL_W'(threshold) : feedback;
    result = start - count;
  end
endmodule
