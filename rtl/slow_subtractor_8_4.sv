// slow_subtractor_8_4: area-minimised 8-4 subtractor, diff = value - count.
// A 3-3 subtractor handles bits 2..0 and passes its borrow to a 5-1-c
// subtractor handling bits 7..3. The two-block structure follows the
// original design; the bit split is inferred from the block names.
// Combinational.
module slow_subtractor_8_4 (
  input  logic [7:0] value,
  input  logic [3:0] count,
  output logic [7:0] diff
);
  logic borrow;
  sub_3_3   u_lo (.a(value[2:0]), .b(count[2:0]), .diff(diff[2:0]), .borrow(borrow));
  sub_5_1_c u_hi (.a(value[7:3]), .b(count[3]), .borrow_in(borrow), .diff(diff[7:3]));
endmodule
