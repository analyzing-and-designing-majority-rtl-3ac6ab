// tb_ml_rca: checks the ripple-carry adder of majority-logic full adders against
// integer addition: exhaustively at W = 4 and on random plus corner operands at the
// default W = 16.
module tb_ml_rca;
  logic [3:0]  a4, b4, s4;
  logic [15:0] a16, b16, s16;
  logic        c4, co4, c16, co16;
  int checks = 0, failures = 0;

  ml_rca #(.W(4)) dut4  (.a(a4), .b(b4), .cin(c4), .s(s4), .cout(co4));
  ml_rca          dut16 (.a(a16), .b(b16), .cin(c16), .s(s16), .cout(co16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {a4, b4, c4} = 9'(i);
      #1;
      checks++;
      if (int'({co4, s4}) != int'(a4) + int'(b4) + int'(c4)) begin
        failures++;
        $display("FAIL W=4 %0d+%0d+%0d = %0d", a4, b4, c4, {co4, s4});
      end
    end
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0: begin a16 = 16'hffff; b16 = 16'h0000; c16 = 1'b1; end
        1: begin a16 = 16'hffff; b16 = 16'hffff; c16 = 1'b1; end
        2: begin a16 = 16'h0000; b16 = 16'h0000; c16 = 1'b0; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom); end
      endcase
      #1;
      checks++;
      if (int'({co16, s16}) != int'(a16) + int'(b16) + int'(c16)) begin
        failures++;
        $display("FAIL W=16 %0d+%0d+%0d = %0d", a16, b16, c16, {co16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
