// smb2_recoder_tb: self-checking testbench of the S-MB2 recoder.
//
// Instances at N = 8, 7, 4, 3 and 2 (even and odd widths) are driven with
// every pair of operands. For each pair it checks that every digit lies in
// -2..+2 (the even-width top digit in -1..+1) and that sum_j y_j * 4^j equals
// A + B, computed by the testbench with integer arithmetic. At N = 8 it also
// checks the digit sequences of the published simulation examples, and counts
// how often each digit value appeared.
module smb2_recoder_tb;
  import fam_pkg::*;

  int checks = 0;
  int failures = 0;
  int seen [5];   // occurrences of digit values -2..+2
  logic [7:0] a8, b8;
  mb_triple_t y8 [5];
  smb2_recoder #(.N(8)) dut8 (.a(a8), .b(b8), .y(y8));
  logic [6:0] a7, b7;
  mb_triple_t y7 [4];
  smb2_recoder #(.N(7)) dut7 (.a(a7), .b(b7), .y(y7));
  logic [3:0] a4, b4;
  mb_triple_t y4 [3];
  smb2_recoder #(.N(4)) dut4 (.a(a4), .b(b4), .y(y4));
  logic [2:0] a3, b3;
  mb_triple_t y3 [2];
  smb2_recoder #(.N(3)) dut3 (.a(a3), .b(b3), .y(y3));
  logic [1:0] a2, b2;
  mb_triple_t y2 [2];
  smb2_recoder #(.N(2)) dut2 (.a(a2), .b(b2), .y(y2));

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int acc, d, expv;
    bit ok;
    for (int i = 0; i < 256; i++) begin
      for (int k = 0; k < 256; k++) begin
        a8 = 8'(i);
        b8 = 8'(k);
        #1;
        acc = 0;
        ok = 1;
        for (int j = 4; j >= 0; j--) begin
          d = triple_value(y8[j]);
          if (d < -2 || d > 2) ok = 0;
          if (1 && j == 4 && (d < -1 || d > 1)) ok = 0;
          acc = acc * 4 + d;
          seen[d+2]++;
        end
        expv = int'($signed(a8)) + int'($signed(b8));
        checks++;
        if (!ok || acc != expv) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=8 a=%0d b=%0d digits sum=%0d expected=%0d", $signed(a8), $signed(b8), acc, expv);
        end
      end
    end
    for (int i = 0; i < 128; i++) begin
      for (int k = 0; k < 128; k++) begin
        a7 = 7'(i);
        b7 = 7'(k);
        #1;
        acc = 0;
        ok = 1;
        for (int j = 3; j >= 0; j--) begin
          d = triple_value(y7[j]);
          if (d < -2 || d > 2) ok = 0;
          if (0 && j == 3 && (d < -1 || d > 1)) ok = 0;
          acc = acc * 4 + d;
          seen[d+2]++;
        end
        expv = int'($signed(a7)) + int'($signed(b7));
        checks++;
        if (!ok || acc != expv) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=7 a=%0d b=%0d digits sum=%0d expected=%0d", $signed(a7), $signed(b7), acc, expv);
        end
      end
    end
    for (int i = 0; i < 16; i++) begin
      for (int k = 0; k < 16; k++) begin
        a4 = 4'(i);
        b4 = 4'(k);
        #1;
        acc = 0;
        ok = 1;
        for (int j = 2; j >= 0; j--) begin
          d = triple_value(y4[j]);
          if (d < -2 || d > 2) ok = 0;
          if (1 && j == 2 && (d < -1 || d > 1)) ok = 0;
          acc = acc * 4 + d;
          seen[d+2]++;
        end
        expv = int'($signed(a4)) + int'($signed(b4));
        checks++;
        if (!ok || acc != expv) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=4 a=%0d b=%0d digits sum=%0d expected=%0d", $signed(a4), $signed(b4), acc, expv);
        end
      end
    end
    for (int i = 0; i < 8; i++) begin
      for (int k = 0; k < 8; k++) begin
        a3 = 3'(i);
        b3 = 3'(k);
        #1;
        acc = 0;
        ok = 1;
        for (int j = 1; j >= 0; j--) begin
          d = triple_value(y3[j]);
          if (d < -2 || d > 2) ok = 0;
          if (0 && j == 1 && (d < -1 || d > 1)) ok = 0;
          acc = acc * 4 + d;
          seen[d+2]++;
        end
        expv = int'($signed(a3)) + int'($signed(b3));
        checks++;
        if (!ok || acc != expv) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=3 a=%0d b=%0d digits sum=%0d expected=%0d", $signed(a3), $signed(b3), acc, expv);
        end
      end
    end
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k < 4; k++) begin
        a2 = 2'(i);
        b2 = 2'(k);
        #1;
        acc = 0;
        ok = 1;
        for (int j = 1; j >= 0; j--) begin
          d = triple_value(y2[j]);
          if (d < -2 || d > 2) ok = 0;
          if (1 && j == 1 && (d < -1 || d > 1)) ok = 0;
          acc = acc * 4 + d;
          seen[d+2]++;
        end
        expv = int'($signed(a2)) + int'($signed(b2));
        checks++;
        if (!ok || acc != expv) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=2 a=%0d b=%0d digits sum=%0d expected=%0d", $signed(a2), $signed(b2), acc, expv);
        end
      end
    end
    a8 = 8'd8;
    b8 = 8'd2;
    #1;
    checks++;
    if (triple_value(y8[0]) != -2) begin
      failures++;
      $display("FAIL example a=8 b=2: digit 0 = %0d, expected -2", triple_value(y8[0]));
    end
    checks++;
    if (triple_value(y8[1]) != -1) begin
      failures++;
      $display("FAIL example a=8 b=2: digit 1 = %0d, expected -1", triple_value(y8[1]));
    end
    checks++;
    if (triple_value(y8[2]) != 1) begin
      failures++;
      $display("FAIL example a=8 b=2: digit 2 = %0d, expected 1", triple_value(y8[2]));
    end
    checks++;
    if (triple_value(y8[3]) != 0) begin
      failures++;
      $display("FAIL example a=8 b=2: digit 3 = %0d, expected 0", triple_value(y8[3]));
    end
    checks++;
    if (triple_value(y8[4]) != 0) begin
      failures++;
      $display("FAIL example a=8 b=2: digit 4 = %0d, expected 0", triple_value(y8[4]));
    end
    for (int v = 0; v < 5; v++) begin
      checks++;
      if (seen[v] == 0) begin
        failures++;
        $display("FAIL digit value %0d never produced", v - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
