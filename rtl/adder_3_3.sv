// adder_3_3: adds two 3-bit counts into a 4-bit result R3..R0.
// Used by the slow 8-bit parallel counter to add the results of its two
// 4-bit counters (each 0..4, so the sum is 0..8). Ripple-carry full-adder
// chain; combinational. The original exploits the never-occurring input
// values 5..7 for minimisation, which this RTL does not need to.
module adder_3_3 (
  input  logic [2:0] a,
  input  logic [2:0] b,
  output logic [3:0] sum
);
  logic c1, c2, c3;
  always_comb begin
    sum[0] = a[0] ^ b[0];
    c1     = a[0] & b[0];
    sum[1] = a[1] ^ b[1] ^ c1;
    c2     = (a[1] & b[1]) | (c1 & (a[1] ^ b[1]));
    sum[2] = a[2] ^ b[2] ^ c2;
    c3     = (a[2] & b[2]) | (c2 & (a[2] ^ b[2]));
    sum[3] = c3;
  end
endmodule
