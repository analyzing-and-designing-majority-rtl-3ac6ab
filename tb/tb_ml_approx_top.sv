// tb_ml_approx_top: end-to-end test of the top at its default parameters (AFA1212-2121
// adder, 8 x 8 multiplier with every complement bit).
//
// A clock paces the test: on each edge a new operand set is applied to both units and
// the previous results are checked. The adder runs through all 2^17 (a, b, cin)
// patterns and is compared with the cell-level reference; its mean error distance must
// come out at 46.82 as published. The multiplier runs through all 2^16 operand pairs and
// must give a*b. Events counted, each of which must occur at least once: adder result
// exact, adder result too high, adder result too low, adder carry out set, multiplier
// product using a complement bit (some digit pair with a1*b0 = 1).
module tb_ml_approx_top;
  logic        clk = 1'b0;
  logic [7:0]  add_a, add_b, add_s;
  logic        add_cin, add_cout;
  logic [7:0]  mul_a, mul_b;
  logic [15:0] mul_p;
  int checks = 0, failures = 0;
  int n_exact = 0, n_high = 0, n_low = 0, n_cout = 0, n_comp = 0;
  longint ed_total = 0;

  ml_approx_top dut (
    .add_a(add_a), .add_b(add_b), .add_cin(add_cin), .add_s(add_s), .add_cout(add_cout),
    .mul_a(mul_a), .mul_b(mul_b), .mul_p(mul_p)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit uses_comp(logic [7:0] x, logic [7:0] y);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (x[2*i+1] & y[2*j]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check_cycle(int i);
    int unsigned exact, got, expv;
    exact = int'(add_a) + int'(add_b) + int'(add_cin);
    got   = int'({add_cout, add_s});
    expv  = tb_afa_ref_pkg::afa_ref("12122121", int'(add_a), int'(add_b), int'(add_cin));
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 20) $display("FAIL adder %0d+%0d+%0d: got %0d expected %0d",
                                  add_a, add_b, add_cin, got, expv);
    end
    ed_total += longint'(tb_afa_ref_pkg::abs_diff(got, exact));
    if (got == exact) n_exact++;
    else if (got > exact) n_high++;
    else n_low++;
    if (add_cout) n_cout++;
    if (i < 65536) begin
      checks++;
      if (int'(mul_p) != int'(mul_a) * int'(mul_b)) begin
        failures++;
        if (failures < 20) $display("FAIL mult %0d*%0d: got %0d", mul_a, mul_b, mul_p);
      end
      if (uses_comp(mul_a, mul_b)) n_comp++;
    end
  endtask

  initial begin
    int med100;
    for (int i = 0; i < (1 << 17); i++) begin
      @(negedge clk);
      {add_a, add_b, add_cin} = 17'(i);
      {mul_a, mul_b} = 16'(i);
      @(posedge clk);
      #1 check_cycle(i);
    end
    med100 = int'((ed_total * 100 + 65536) / 131072);
    $display("adder: exact %0d, too high %0d, too low %0d, carry out %0d, MED x100 %0d",
             n_exact, n_high, n_low, n_cout, med100);
    $display("multiplier: products using complement bits %0d of 65536", n_comp);
    checks++;
    if (med100 != 4682) failures++;
    checks += 5;
    if (n_exact == 0) failures++;
    if (n_high == 0) failures++;
    if (n_low == 0) failures++;
    if (n_cout == 0) failures++;
    if (n_comp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
