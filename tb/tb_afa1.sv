// tb_afa1: exhaustive check of the AFA1 against its truth table (carry exact, sum = ~carry),
// plus the total error distance over the eight inputs (0 for the exact adder, 2 for
// each approximate cell, i.e. a mean error distance of 0.25).
module tb_afa1;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;
  int unsigned ed_total = 0;

  afa1 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

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
      expv = tb_afa_ref_pkg::afa_ref("1", x, y, z);
      got  = {cout, s};
      ed_total += tb_afa_ref_pkg::abs_diff(got, x + y + z);
      checks++;
      if (got != expv) begin
        failures++;
        $display("FAIL %b%b%b: got %0d expected %0d", a, b, cin, got, expv);
      end
    end
    checks++;
    if (ed_total != ("afa1" == "ml_fa" ? 0 : 2)) begin
      failures++;
      $display("FAIL total error distance %0d", ed_total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
