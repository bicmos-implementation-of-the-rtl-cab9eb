// tb_mux2_bank: random data on both inputs, both selections: C = 1 must
// pass D0 and C = 0 must pass D1.
module tb_mux2_bank;
  int checks = 0, failures = 0;
  logic [7:0] d0, d1, r; logic c;
  mux2_bank dut (.d0(d0), .d1(d1), .c(c), .r(r));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 200; k++) begin
      d0 = 8'($urandom); d1 = 8'($urandom); c = k[0];
      #1;
      checks++;
      if (r !== (k[0] ? d0 : d1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
