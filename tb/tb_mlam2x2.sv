// tb_mlam2x2: exhaustive check of the 2 x 2 multiplier unit in its three forms.
//
// Complement-bit form (SWAP = 0 and 1): out = {a1*b1, cross term, a0*b0} and
// out + 2*comp must equal a*b for all 16 inputs. OR form (USE_COMP = 0): out1 is the OR
// of the cross terms, comp is 0, and the result differs from a*b only for 3 x 3 (7).
module tb_mlam2x2;
  logic [1:0] a, b;
  logic [2:0] out_c, out_s, out_o;
  logic       comp_c, comp_s, comp_o;
  int checks = 0, failures = 0;
  int n_wrong_or = 0;

  mlam2x2                                 dut_c (.a(a), .b(b), .out(out_c), .comp(comp_c));
  mlam2x2 #(.SWAP(1'b1))                  dut_s (.a(a), .b(b), .out(out_s), .comp(comp_s));
  mlam2x2 #(.USE_COMP(1'b0))              dut_o (.a(a), .b(b), .out(out_o), .comp(comp_o));

  task automatic expect_eq(int got, int expv, string what);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d: got %0d expected %0d", what, a, b, got, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int prod, p00, p01, p10, p11;
      a = 2'(i >> 2);
      b = 2'(i);
      #1;
      p00 = a[0] & b[0]; p01 = a[0] & b[1]; p10 = a[1] & b[0]; p11 = a[1] & b[1];
      prod = int'(a) * int'(b);
      expect_eq(int'(out_c), 4 * p11 + 2 * p01 + p00, "out (SWAP=0)");
      expect_eq(int'(comp_c), p10, "comp (SWAP=0)");
      expect_eq(int'(out_c) + 2 * int'(comp_c), prod, "product (SWAP=0)");
      expect_eq(int'(out_s), 4 * p11 + 2 * p10 + p00, "out (SWAP=1)");
      expect_eq(int'(comp_s), p01, "comp (SWAP=1)");
      expect_eq(int'(out_o), 4 * p11 + 2 * (p01 | p10) + p00, "out (OR form)");
      expect_eq(int'(comp_o), 0, "comp (OR form)");
      if (int'(out_o) != prod) n_wrong_or++;
    end
    // Only 3 x 3 is wrong in the OR form, and it gives 7.
    expect_eq(n_wrong_or, 1, "OR-form wrong count");
    a = 2'd3; b = 2'd3; #1;
    expect_eq(int'(out_o), 7, "OR form 3x3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
