// tb_parallel_subtractor3: exhaustive over the 3 AND inputs and the
// selection bit, with every threshold (sel = 1) and every feedback value
// (sel = 0): result must be start - (number of active inputs) mod 256,
// with start = zero-extended threshold or the feedback.
module tb_parallel_subtractor3;
  int checks = 0, failures = 0;
  logic [2:0] act; logic [6:0] thr; logic [7:0] fb, res; logic sel;
  parallel_subtractor3 dut (.act(act), .threshold(thr), .feedback(fb), .sel(sel), .result(res));
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < 8; a++)
      for (int v = 0; v < 256; v++) begin
        int n;
        n = (a & 1) + ((a >> 1) & 1) + ((a >> 2) & 1);
        act = 3'(a); thr = 7'(v); fb = 8'(v ^ 32'h5a);
        sel = 1'b1; #1;
        checks++; if (int'(res) != (((v & 127) - n) & 255)) failures++;
        sel = 1'b0; #1;
        checks++; if (int'(res) != (((v ^ 32'h5a) - n) & 255)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
