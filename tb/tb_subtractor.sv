// tb_subtractor: exhaustive check of the 8-4 and 8-3 subtractors. The
// expected value is the integer difference taken modulo 256; the sign bit
// (R7) is also compared with "difference < 0" over the range where the
// neuron uses it (value in 0..127).
module tb_subtractor;
  int checks = 0, failures = 0;
  logic [7:0] value; logic [3:0] c4; logic [2:0] c3;
  logic [7:0] d4, d3;
  subtractor                dut4 (.value(value), .count(c4), .diff(d4));
  subtractor #(.CNT_W(3))   dut3 (.value(value), .count(c3), .diff(d3));
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 256; v++)
      for (int c = 0; c < 16; c++) begin
        value = 8'(v); c4 = 4'(c); c3 = 3'(c);
        #1;
        checks++; if (int'(d4) != ((v - c) & 255)) failures++;
        checks++; if (int'(d3) != ((v - (c & 7)) & 255)) failures++;
        if (v < 128) begin
          checks++; if (d4[7] != (v - c < 0)) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
