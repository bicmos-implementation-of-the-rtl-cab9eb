// slow_counter4: gate-level 4-input parallel counter of the slow 8-input
// neuron. Output is the number of ones (0..4) on 3 bits. Two half adders
// count the pairs (a0+a1, a2+a3); the pair sums are then combined:
//   bit0 = s01 ^ s23, bit1 = c01 ^ c23 ^ (s01 & s23), bit2 = both pairs full.
// The original minimised this block with a K-map; this gate form is
// this design's own. Combinational.
module slow_counter4 (
  input  logic [3:0] in_bits,
  output logic [2:0] count
);
  logic s01, c01, s23, c23;
  always_comb begin
    s01 = in_bits[0] ^ in_bits[1];
    c01 = in_bits[0] & in_bits[1];
    s23 = in_bits[2] ^ in_bits[3];
    c23 = in_bits[2] & in_bits[3];
    count[0] = s01 ^ s23;
    count[1] = c01 ^ c23 ^ (s01 & s23);
    count[2] = c01 & c23;
  end
endmodule
