// csa_tree_tb: drives carry-save trees of 2, 3, 6 and 9 rows with random
// rows (plus all-ones rows, which carry in every column) and checks that
// sum + carry equals the sum of the rows modulo 2^W, computed with integer
// arithmetic. The first case is the 4x4 two's complement example
// 1101 x 0101 = -15, whose four sign-extended partial products are reduced.
module csa_tree_tb;
  int checks = 0;
  int failures = 0;

  logic [7:0]  r4 [4];
  logic [7:0]  s4, k4;
  logic [15:0] r2 [2];
  logic [15:0] s2, k2;
  logic [15:0] r3 [3];
  logic [15:0] s3, k3;
  logic [16:0] r6 [6];
  logic [16:0] s6, k6;
  logic [19:0] r9 [9];
  logic [19:0] s9, k9;

  csa_tree #(.ROWS(4), .W(8))  dut4 (.rows(r4), .sum(s4), .carry(k4));
  csa_tree #(.ROWS(2), .W(16)) dut2 (.rows(r2), .sum(s2), .carry(k2));
  csa_tree #(.ROWS(3), .W(16)) dut3 (.rows(r3), .sum(s3), .carry(k3));
  csa_tree #(.ROWS(6), .W(17)) dut6 (.rows(r6), .sum(s6), .carry(k6));
  csa_tree #(.ROWS(9), .W(20)) dut9 (.rows(r9), .sum(s9), .carry(k9));

  task automatic check(string name, longint got, longint want, int w);
    longint m;
    m = (longint'(1) << w) - 1;
    checks++;
    if ((got & m) != (want & m)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", name, got & m, want & m);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    longint acc;
    // multiplicand 1101 (-3), multiplier 0101: rows -3, 0, -3<<2, 0
    r4[0] = 8'b11111101;
    r4[1] = 8'b00000000;
    r4[2] = 8'b11110100;
    r4[3] = 8'b00000000;
    #1;
    check("example", longint'(s4) + longint'(k4), -15, 8);
    for (int it = 0; it < 20000; it++) begin
      for (int i = 0; i < 4; i++) r4[i] = 8'($urandom);
      for (int i = 0; i < 2; i++) r2[i] = (it < 4) ? '1 : 16'($urandom);
      for (int i = 0; i < 3; i++) r3[i] = (it < 4) ? '1 : 16'($urandom);
      for (int i = 0; i < 6; i++) r6[i] = (it < 4) ? '1 : 17'($urandom);
      for (int i = 0; i < 9; i++) r9[i] = (it < 4) ? '1 : 20'($urandom);
      #1;
      acc = 0; for (int i = 0; i < 4; i++) acc += longint'(r4[i]);
      check("rows=4", longint'(s4) + longint'(k4), acc, 8);
      acc = 0; for (int i = 0; i < 2; i++) acc += longint'(r2[i]);
      check("rows=2", longint'(s2) + longint'(k2), acc, 16);
      acc = 0; for (int i = 0; i < 3; i++) acc += longint'(r3[i]);
      check("rows=3", longint'(s3) + longint'(k3), acc, 16);
      acc = 0; for (int i = 0; i < 6; i++) acc += longint'(r6[i]);
      check("rows=6", longint'(s6) + longint'(k6), acc, 17);
      acc = 0; for (int i = 0; i < 9; i++) acc += longint'(r9[i]);
      check("rows=9", longint'(s9) + longint'(k9), acc, 20);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
