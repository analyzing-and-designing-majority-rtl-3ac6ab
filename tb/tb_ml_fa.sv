// tb_ml_fa: exhaustive check of the exact majority-logic full adder against a + b + cin,
// plus the total error distance over the eight inputs (0 for the exact adder, 2 for
// each approximate cell, i.e. a mean error distance of 0.25).
module tb_ml_fa;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;
  int unsigned ed_total = 0;

  ml_fa dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int unsigned x, y, z, expv, got;
      {a, b, cin} = 3'(i);
      x = a; y = b; z = cin;
      #1;
      expv = int'(x) + int'(y) + int'(z);
      got  = {cout, s};
      ed_total += tb_afa_ref_pkg::abs_diff(got, x + y + z);
      checks++;
      if (got != expv) begin
        failures++;
        $display("FAIL %b%b%b: got %0d expected %0d", a, b, cin, got, expv);
      end
    end
    checks++;
    if (ed_total != ("ml_fa" == "ml_fa" ? 0 : 2)) begin
      failures++;
      $display("FAIL total error distance %0d", ed_total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
