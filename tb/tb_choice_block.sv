// tb_choice_block: random data from both neurons; choice = 0 must route
// neuron 1's sixteen outputs, choice = 1 neuron 2's.
module tb_choice_block;
  int checks = 0, failures = 0;
  logic choice; logic [15:0] a, b, o;
  choice_block dut (.choice(choice), .in_n1(a), .in_n2(b), .out(o));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 200; k++) begin
      a = 16'($urandom); b = 16'($urandom); choice = k[0];
      #1;
      checks++;
      if (o != (k[0] ? b : a)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
