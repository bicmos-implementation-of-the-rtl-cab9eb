// tb_activity_block: all eight input combinations against the firing rule
// (upper sign alone, or both signs for a beta regular neuron).
module tb_activity_block;
  int checks = 0, failures = 0;
  logic su, beta, sl, act;
  activity_block dut (.sign_upper(su), .beta_regular(beta), .sign_lower(sl), .activity(act));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {su, beta, sl} = 3'(v);
      #1;
      checks++;
      if (act != (beta ? (su && sl) : su)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
