// tb_mlafa2: checks the 2-bit approximate adders, all four variants side by side.
//
// 1. Every input pattern (a, b, cin) is applied; each variant's {cout, s} is compared
//    with a reference built from the one-bit cell truth tables (tb_afa_ref_pkg).
// 2. The error distance |result - (a+b+cin)| is summed over all patterns per variant and
//    compared with the exact total worked out separately, and the mean error distance
//    is compared with the published two-decimal figure (within 0.01) (Table 3 lists MED 0.75, 0.75, 0.625, 0.625).
// 3. The input/output pairs shown in the published simulation waveforms are replayed.
module tb_mlafa2;
  import mlaa_pkg::*;

  localparam int W = 2;
  localparam int NV = 4;
  localparam string CELLS [NV] = '{"11", "22", "12", "21"};
  localparam longint TOTAL [NV] = '{24, 24, 20, 20};
  localparam int MED1000 [NV] = '{750, 750, 625, 625};

  logic [W-1:0] a, b;
  logic         cin;
  logic [W:0]   res [NV];
  int checks = 0, failures = 0;
  longint ed_total [NV];

  mlafa2 #(.VARIANT(AFA11)) dut0 (.a(a), .b(b), .cin(cin), .s(res[0][W-1:0]), .cout(res[0][W]));
  mlafa2 #(.VARIANT(AFA22)) dut1 (.a(a), .b(b), .cin(cin), .s(res[1][W-1:0]), .cout(res[1][W]));
  mlafa2 #(.VARIANT(AFA12)) dut2 (.a(a), .b(b), .cin(cin), .s(res[2][W-1:0]), .cout(res[2][W]));
  mlafa2 #(.VARIANT(AFA21)) dut3 (.a(a), .b(b), .cin(cin), .s(res[3][W-1:0]), .cout(res[3][W]));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] ta, logic [W-1:0] tb, logic tc);
    a = ta; b = tb; cin = tc;
    #1;
  endtask

  task automatic check_vec(int v, logic [W:0] expv, string name);
    checks++;
    if (res[v] !== expv) begin
      failures++;
      $display("FAIL %s a=%b b=%b: got %b expected %b", name, a, b, res[v], expv);
    end
  endtask

  initial begin
    int unsigned exact, expv;
    for (int v = 0; v < NV; v++) ed_total[v] = 0;
    for (int i = 0; i < (1 << (2 * W + 1)); i++) begin
      apply(W'(i >> (W + 1)), W'(i >> 1), i[0]);
      exact = int'(a) + int'(b) + int'(cin);
      for (int v = 0; v < NV; v++) begin
        expv = tb_afa_ref_pkg::afa_ref(CELLS[v], int'(a), int'(b), int'(cin));
        ed_total[v] += longint'(tb_afa_ref_pkg::abs_diff(int'(res[v]), exact));
        checks++;
        if (int'(res[v]) != expv) begin
          failures++;
          if (failures < 20)
            $display("FAIL variant %s a=%0d b=%0d cin=%0d: got %0d expected %0d",
                     CELLS[v], a, b, cin, res[v], expv);
        end
      end
    end
    for (int v = 0; v < NV; v++) begin
      longint med1000;
      med1000 = (ed_total[v] * 1000) / (longint'(1) << (2 * W + 1));
      $display("variant %s: total error distance %0d, MED x1000 = %0d", CELLS[v], ed_total[v], med1000);
      checks += 2;
      if (ed_total[v] != TOTAL[v]) begin
        failures++;
        $display("FAIL variant %s total error distance %0d expected %0d", CELLS[v], ed_total[v], TOTAL[v]);
      end
      if (med1000 < longint'(MED1000[v]) - 10 || med1000 > longint'(MED1000[v]) + 10) begin
        failures++;
        $display("FAIL variant %s MED x1000 %0d, published %0d", CELLS[v], med1000, MED1000[v]);
      end
    end
    apply(2'b10, 2'b01, 1'b0);
    check_vec(0, 3'b011, "AFA11");
    apply(2'b10, 2'b01, 1'b0);
    check_vec(1, 3'b011, "AFA22");
    apply(2'b01, 2'b11, 1'b0);
    check_vec(3, 3'b011, "AFA21");
    apply(2'b11, 2'b10, 1'b0);
    check_vec(2, 3'b011, "AFA12");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
