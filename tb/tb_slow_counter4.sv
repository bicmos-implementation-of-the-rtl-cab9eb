// tb_slow_counter4: exhaustive check of the gate-level 4-input counter.
module tb_slow_counter4;
  int checks = 0, failures = 0;
  logic [3:0] in_bits; logic [2:0] count;
  slow_counter4 dut (.in_bits(in_bits), .count(count));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      int exp_n;
      in_bits = 4'(v);
      exp_n = int'(in_bits[0]) + int'(in_bits[1]) + int'(in_bits[2]) + int'(in_bits[3]);
      #1;
      checks++;
      if (int'(count) != exp_n) begin
        failures++;
        $display("slow_counter4 %b -> %0d, expected %0d", in_bits, count, exp_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
