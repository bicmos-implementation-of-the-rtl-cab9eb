// tb_and_gate_array: exhaustive check of the neuron input AND gates at
// N_IN = 3 (every combination of C, F, E) and random vectors at N_IN = 8.
// Each output bit is compared with the bit-wise expectation computed here.
module tb_and_gate_array;
  int checks = 0, failures = 0;
  logic [2:0] c3, f3, e3, u3, l3;
  logic [7:0] c8, f8, e8, u8, l8;

  and_gate_array #(.N_IN(3)) dut3 (.conn(c3), .fire(f3), .regular(e3), .act_upper(u3), .act_lower(l3));
  and_gate_array             dut8 (.conn(c8), .fire(f8), .regular(e8), .act_upper(u8), .act_lower(l8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {c3, f3, e3} = 9'(v);
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (u3[i] !== (c3[i] && f3[i])) failures++;
        checks++;
        if (l3[i] !== (c3[i] && f3[i] && e3[i])) failures++;
      end
    end
    for (int k = 0; k < 200; k++) begin
      c8 = 8'($urandom); f8 = 8'($urandom); e8 = 8'($urandom);
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (u8[i] !== (c8[i] && f8[i])) failures++;
        checks++;
        if (l8[i] !== (c8[i] && f8[i] && e8[i])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
