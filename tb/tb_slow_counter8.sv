// tb_slow_counter8: exhaustive check of the slow 8-bit parallel counter.
module tb_slow_counter8;
  int checks = 0, failures = 0;
  logic [7:0] in_bits; logic [3:0] count;
  slow_counter8 dut (.in_bits(in_bits), .count(count));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 256; v++) begin
      int exp_n;
      exp_n = 0;
      in_bits = 8'(v);
      for (int i = 0; i < 8; i++) exp_n += (v >> i) & 1;
      #1;
      checks++;
      if (int'(count) != exp_n) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
