// tb_adder_latency: times every approximate adder and the exact full adder with a delay
// of one unit step per majority gate and none per inverter, the way a QCA clocking zone
// (a quarter clock) is charged per majority gate.
//
// All variants share random operands. After each operand change the testbench steps
// through time one unit at a time and records when each result last moved.
// The longest time seen, counted in majority gates, must equal the published delay
// (D, in clocks, times 4): 1 for AFA1 and AFA2, 2 for the exact adder; 2,1,2,1 for
// AFA11/22/12/21; 3,2,3,2 for AFA1212/2121/2112/1221; 5,4,5,4 for AFA1212-1212,
// AFA2121-2121, AFA2121-1212 and AFA1212-2121. Settled results are compared with the
// cell-level reference model as well.
module tb_adder_latency;
  import mlaa_pkg::*;

  localparam int unsigned MV = 10;   // time units per majority gate
  localparam int NV = 15;
  localparam string CELLS [NV] = '{"1", "2", "",
                                   "11", "22", "12", "21",
                                   "1212", "2121", "2112", "1221",
                                   "12121212", "21212121", "21211212", "12122121"};
  localparam int ZONES [NV] = '{1, 1, 2, 2, 1, 2, 1, 3, 2, 3, 2, 5, 4, 5, 4};

  logic [7:0] a, b;
  logic       cin;
  logic [NV-1:0][8:0] res;
  logic [NV-1:0][8:0] prev;
  int         last_change [NV];
  longint     max_lat [NV];
  int checks = 0, failures = 0;

  afa1  #(.MV_DELAY(MV)) d_afa1 (.a(a[0]), .b(b[0]), .cin(cin), .s(res[0][0]), .cout(res[0][1]));
  afa2  #(.MV_DELAY(MV)) d_afa2 (.a(a[0]), .b(b[0]), .cin(cin), .s(res[1][0]), .cout(res[1][1]));
  ml_fa #(.MV_DELAY(MV)) d_fa   (.a(a[0]), .b(b[0]), .cin(cin), .s(res[2][0]), .cout(res[2][1]));
  assign res[0][8:2] = '0;
  assign res[1][8:2] = '0;
  assign res[2][8:2] = '0;

  for (genvar v = 0; v < 4; v++) begin : g_w2
    mlafa2 #(.VARIANT(afa2_variant_e'(v)), .MV_DELAY(MV)) dut (
      .a(a[1:0]), .b(b[1:0]), .cin(cin), .s(res[3+v][1:0]), .cout(res[3+v][2]));
    assign res[3+v][8:3] = '0;
  end
  for (genvar v = 0; v < 4; v++) begin : g_w4
    mlafa4 #(.VARIANT(afa4_variant_e'(v)), .MV_DELAY(MV)) dut (
      .a(a[3:0]), .b(b[3:0]), .cin(cin), .s(res[7+v][3:0]), .cout(res[7+v][4]));
    assign res[7+v][8:5] = '0;
  end
  for (genvar v = 0; v < 4; v++) begin : g_w8
    mlafa8 #(.VARIANT(afa8_variant_e'(v)), .MV_DELAY(MV)) dut (
      .a(a), .b(b), .cin(cin), .s(res[11+v][7:0]), .cout(res[11+v][8]));
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; cin = 1'b0;
    for (int v = 0; v < NV; v++) max_lat[v] = 0;
    #(20 * MV);
    for (int t = 0; t < 20000; t++) begin
      a = 8'($urandom);
      b = 8'($urandom);
      cin = 1'($urandom);
      // Step through time one unit at a time and note when each result last moved.
      for (int v = 0; v < NV; v++) last_change[v] = 0;
      prev = res;
      for (int step = 1; step <= 8 * int'(MV); step++) begin
        #1;
        for (int v = 0; v < NV; v++)
          if (res[v] != prev[v]) last_change[v] = step;
        prev = res;
      end
      for (int v = 0; v < NV; v++) begin
        int unsigned expv, w;
        if (longint'(last_change[v]) > max_lat[v]) max_lat[v] = longint'(last_change[v]);
        if (v == 2) begin
          expv = int'(a[0]) + int'(b[0]) + int'(cin);
        end else begin
          w = CELLS[v].len();
          expv = tb_afa_ref_pkg::afa_ref(CELLS[v], int'(a) & ((1 << w) - 1),
                                         int'(b) & ((1 << w) - 1), int'(cin));
        end
        checks++;
        if (int'(res[v]) != expv) begin
          failures++;
          if (failures < 20) $display("FAIL %s: settled %0d expected %0d", CELLS[v], res[v], expv);
        end
      end
    end
    for (int v = 0; v < NV; v++) begin
      $display("%-9s longest settle: %0d majority gates (%0d.%02d clocks), expected %0d",
               v == 2 ? "exact FA" : CELLS[v], max_lat[v] / longint'(MV),
               max_lat[v] / longint'(4 * MV), 25 * ((max_lat[v] / longint'(MV)) % 4), ZONES[v]);
      checks++;
      // A change is seen on the time step it happens or on the next one.
      if (max_lat[v] / longint'(MV) != longint'(ZONES[v])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
