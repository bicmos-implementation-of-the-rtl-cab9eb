// slow_counter8: the area-minimised 8-bit parallel counter.
// Inputs 3..0 and 7..4 go to two slow 4-bit counters; their 3-bit results
// (Q2..Q0) are added by a 3-3 adder into R3..R0. Combinational.
// The split into two counters and an adder follows the original design; which
// inputs go to which counter is this design's choice.
module slow_counter8 (
  input  logic [7:0] in_bits,
  output logic [3:0] count
);
  logic [2:0] q_lo, q_hi;
  slow_counter4 u_cnt_lo (.in_bits(in_bits[3:0]), .count(q_lo));
  slow_counter4 u_cnt_hi (.in_bits(in_bits[7:4]), .count(q_hi));
  adder_3_3     u_add    (.a(q_lo), .b(q_hi), .sum(count));
endmodule
