// tb_adder_3_3: exhaustive check of the 3-3 adder over all 64 input pairs.
module tb_adder_3_3;
  int checks = 0, failures = 0;
  logic [2:0] a, b; logic [3:0] sum;
  adder_3_3 dut (.a(a), .b(b), .sum(sum));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a = 3'(i); b = 3'(j);
        #1;
        checks++;
        if (int'(sum) != i + j) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
