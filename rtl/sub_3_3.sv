// sub_3_3: low part of the slow 8-4 subtractor. Subtracts the 3-bit count
// bits from the 3 low value bits, giving R2..R0 and a borrow (the
// "carrier") that the 5-1-c subtractor consumes. Combinational.
module sub_3_3 (
  input  logic [2:0] a,       // value bits 2..0
  input  logic [2:0] b,       // count bits 2..0
  output logic [2:0] diff,    // R2..R0
  output logic       borrow   // 1 when a < b
);
  logic [3:0] full;
  always_comb begin
    full   = {1'b0, a} - {1'b0, b};
    diff   = full[2:0];
    borrow = full[3];
  end
endmodule
