// tb_slow_subtractor_8_4: exhaustive check of the slow 8-4 subtractor
// (value - count modulo 256) over all 4096 input pairs.
module tb_slow_subtractor_8_4;
  int checks = 0, failures = 0;
  logic [7:0] value, diff; logic [3:0] count;
  slow_subtractor_8_4 dut (.value(value), .count(count), .diff(diff));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 256; v++)
      for (int c = 0; c < 16; c++) begin
        value = 8'(v); count = 4'(c);
        #1;
        checks++;
        if (int'(diff) != ((v - c) & 255)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
