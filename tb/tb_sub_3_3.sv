// tb_sub_3_3: exhaustive check of the 3-3 subtractor's difference and
// borrow ("carrier").
module tb_sub_3_3;
  int checks = 0, failures = 0;
  logic [2:0] a, b, diff; logic borrow;
  sub_3_3 dut (.a(a), .b(b), .diff(diff), .borrow(borrow));
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
        checks++; if (int'(diff) != ((i - j) & 7)) failures++;
        checks++; if (borrow != (i < j)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
