// tb_mlam: checks the N x N multiplier built from 2 x 2 units.
//
// - N = 4 and N = 8 (default) with every complement bit kept: exhaustive, the product
//   must equal a*b.
// - N = 4 and N = 8 with some complement bits dropped: the product must equal a*b minus
//   the dropped complement bits, a1*b0 of each digit pair (i, j) at weight
//   2^(2(i+j)+1), worked out here from the operands; the count of inputs where the
//   result is then wrong is also recorded and must be non-zero.
module tb_mlam;
  localparam logic [3:0]  MASK4 = 4'b1110;               // drop the (0,0) bit
  localparam logic [15:0] MASK8 = 16'b0111_1111_1110_1010; // drop (0,0),(0,2),(3,3)

  logic [3:0] a4, b4;
  logic [7:0] a8, b8;
  logic [7:0]  p4, p4m;
  logic [15:0] p8, p8m;
  int checks = 0, failures = 0;
  int approx4 = 0, approx8 = 0;

  mlam #(.N(4))                    dut4  (.a(a4), .b(b4), .p(p4));
  mlam #(.N(4), .COMP_MASK(MASK4)) dut4m (.a(a4), .b(b4), .p(p4m));
  mlam                             dut8  (.a(a8), .b(b8), .p(p8));
  mlam #(.N(8), .COMP_MASK(MASK8)) dut8m (.a(a8), .b(b8), .p(p8m));

  // Value of the complement bits that a mask drops.
  function automatic int dropped(int n, int unsigned mask, int unsigned x, int unsigned y);
    int u = n / 2;
    int d = 0;
    for (int i = 0; i < u; i++)
      for (int j = 0; j < u; j++)
        if (((mask >> (i * u + j)) & 1) == 0)
          d += int'(((x >> (2 * i + 1)) & 1) & ((y >> (2 * j)) & 1)) << (2 * (i + j) + 1);
    return d;
  endfunction

  task automatic expect_eq(int got, int expv, string what);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, expv);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      a8 = 8'(i >> 8);
      b8 = 8'(i);
      a4 = 4'(i >> 4);
      b4 = 4'(i);
      #1;
      if (i < 256) begin
        expect_eq(int'(p4), int'(a4) * int'(b4), "4x4 all complement bits");
        expect_eq(int'(p4m), int'(a4) * int'(b4) - dropped(4, MASK4, a4, b4), "4x4 masked");
        if (int'(p4m) != int'(a4) * int'(b4)) approx4++;
      end
      expect_eq(int'(p8), int'(a8) * int'(b8), "8x8 all complement bits");
      expect_eq(int'(p8m), int'(a8) * int'(b8) - dropped(8, MASK8, a8, b8), "8x8 masked");
      if (int'(p8m) != int'(a8) * int'(b8)) approx8++;
    end
    $display("inputs with an approximate product: 4x4 masked %0d/256, 8x8 masked %0d/65536",
             approx4, approx8);
    checks += 2;
    if (approx4 == 0) failures++;
    if (approx8 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
