// tb_ml_csa_reduce: random rows (plus all-ones rows) are reduced at the default size
// (32 rows of 16 bits) and at 3 rows of 8 bits; sum_o + carry_o must equal the sum of
// the rows modulo 2^W.
module tb_ml_csa_reduce;
  logic [31:0][15:0] rows;
  logic [15:0]       s_o, c_o;
  logic [2:0][7:0]   rows3;
  logic [7:0]        s3, c3;
  int checks = 0, failures = 0;

  ml_csa_reduce                    dut  (.rows(rows), .sum_o(s_o), .carry_o(c_o));
  ml_csa_reduce #(.W(8), .ROWS(3)) dut3 (.rows(rows3), .sum_o(s3), .carry_o(c3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int unsigned total, total3;
      total = 0;
      total3 = 0;
      for (int r = 0; r < 32; r++) begin
        rows[r] = (t == 0) ? 16'hffff : 16'($urandom);
        total += int'(rows[r]);
      end
      for (int r = 0; r < 3; r++) begin
        rows3[r] = (t == 0) ? 8'hff : 8'($urandom);
        total3 += int'(rows3[r]);
      end
      #1;
      checks += 2;
      if (16'(int'(s_o) + int'(c_o)) != 16'(total)) begin
        failures++;
        $display("FAIL 32x16: %0d + %0d != %0d mod 2^16", s_o, c_o, total);
      end
      if (8'(int'(s3) + int'(c3)) != 8'(total3)) begin
        failures++;
        $display("FAIL 3x8: %0d + %0d != %0d mod 2^8", s3, c3, total3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
