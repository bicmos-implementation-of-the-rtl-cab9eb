// sub_5_1_c: high part of the slow 8-4 subtractor. Subtracts the count's
// bit 3 and the borrow of the 3-3 subtractor from value bits 7..3, giving
// R7..R3 (R7 is the sign bit). Combinational; the final borrow is dropped
// (two's complement wrap).
module sub_5_1_c (
  input  logic [4:0] a,          // value bits 7..3
  input  logic       b,          // count bit 3
  input  logic       borrow_in,  // carrier from sub_3_3
  output logic [4:0] diff        // R7..R3
);
  always_comb diff = a - 5'(b) - 5'(borrow_in);
endmodule
