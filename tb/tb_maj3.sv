// tb_maj3: exhaustive check of the three-input majority gate against the sum-of-inputs
// rule (output 1 when at least two inputs are 1).
module tb_maj3;
  logic a, b, c, f;
  int checks = 0, failures = 0;

  maj3 dut (.a(a), .b(b), .c(c), .f(f));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (f !== (int'(a) + int'(b) + int'(c) >= 2)) begin
        failures++;
        $display("FAIL maj(%b,%b,%b)=%b", a, b, c, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
