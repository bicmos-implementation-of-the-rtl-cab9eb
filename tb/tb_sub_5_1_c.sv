// tb_sub_5_1_c: exhaustive check of the 5-1-c subtractor (a - b - borrow).
module tb_sub_5_1_c;
  int checks = 0, failures = 0;
  logic [4:0] a, diff; logic b, bin;
  sub_5_1_c dut (.a(a), .b(b), .borrow_in(bin), .diff(diff));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 4; j++) begin
        a = 5'(i); b = j[0]; bin = j[1];
        #1;
        checks++;
        if (int'(diff) != ((i - (j & 1) - ((j >> 1) & 1)) & 31)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
