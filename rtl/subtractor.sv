// subtractor: the 8-4 (CNT_W=4) or 8-3 (CNT_W=3) subtractor of the
// pipelined neuron. diff = value - count, where value is the two's
// complement threshold or fed-back running value (R7 = sign bit) and count
// is the unsigned parallel counter result. The original builds it from a
// minimised gate netlist or a switching tree; here it is an arithmetic
// subtraction. Combinational; wraps modulo 2^VAL_W.
module subtractor #(
  parameter int unsigned VAL_W = 8,
  parameter int unsigned CNT_W = 4
) (
  input  logic [VAL_W-1:0] value,
  input  logic [CNT_W-1:0] count,
  output logic [VAL_W-1:0] diff
);
  always_comb diff = value - VAL_W'(count);
endmodule
