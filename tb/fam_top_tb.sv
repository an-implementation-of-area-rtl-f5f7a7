// fam_top_tb: end-to-end testbench of the three fused add-multiply units at
// their default size (N = 8). It applies every sum A + B in the range (all
// 65536 (A, B) pairs, each with a random X) and a sweep of X for fixed
// operands, and checks each product against X * (A + B) computed with integer
// arithmetic and the three products against each other.
//
// It also counts how often each mechanism of the datapath was exercised, per
// scheme, and fails if one never was:
//   - each digit value -2, -1, 0, +1, +2 (negative digits invert a row and
//     need the +1 of the correction term; +-2 digits select 2X),
//   - a non-zero top signed digit (sum beyond the k plain MB digits),
//   - the -0 triple 111 (a negative-sign digit whose row selects nothing),
//   - a negative top digit, whose +1 collides with the sign-extension
//     constant at bit N inside the correction term,
//   - recoded digits that differ between schemes for the same operands.
module fam_top_tb;
  import fam_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0]  x, a, b;
  logic [16:0] z1, z2, z3;
  mb_triple_t  y1 [5];
  mb_triple_t  y2 [5];
  mb_triple_t  y3 [5];

  int digit_seen [3][5];
  int sd_nonzero [3];
  int minus_zero [3];
  int top_negative [3];
  int schemes_differ;

  fam_top dut (
    .x(x), .a(a), .b(b),
    .z_smb1(z1), .z_smb2(z2), .z_smb3(z3),
    .y_smb1(y1), .y_smb2(y2), .y_smb3(y3)
  );

  task automatic count_digits(int s, const ref mb_triple_t y [5]);
    for (int j = 0; j < 5; j++) begin
      digit_seen[s][triple_value(y[j]) + 2]++;
      if (y[j] == 3'b111) minus_zero[s]++;
    end
    if (triple_value(y[4]) != 0) sd_nonzero[s]++;
    if (triple_value(y[4]) < 0) top_negative[s]++;
  endtask

  task automatic apply(logic [7:0] xv, logic [7:0] av, logic [7:0] bv);
    longint want;
    x = xv; a = av; b = bv;
    #1;
    want = longint'($signed(x)) * (longint'($signed(a)) + longint'($signed(b)));
    checks++;
    if (longint'($signed(z1)) != want || longint'($signed(z2)) != want
        || longint'($signed(z3)) != want) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%0d a=%0d b=%0d: z = %0d / %0d / %0d, expected %0d", $signed(x),
                 $signed(a), $signed(b), $signed(z1), $signed(z2), $signed(z3), want);
    end
    count_digits(0, y1);
    count_digits(1, y2);
    count_digits(2, y3);
    if (y1 != y3 || y1 != y2) schemes_differ++;
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 256; i++)
      for (int k = 0; k < 256; k++)
        apply(8'($urandom), 8'(i), 8'(k));
    for (int i = 0; i < 256; i++) begin
      apply(8'(i), 8'h80, 8'h80);
      apply(8'(i), 8'h7f, 8'h7f);
      apply(8'(i), 8'd4, 8'd2);
    end
    for (int s = 0; s < 3; s++) begin
      $display("S-MB%0d: digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d, top digit non-zero %0d (negative %0d), -0 triples %0d",
               s + 1, digit_seen[s][0], digit_seen[s][1], digit_seen[s][2], digit_seen[s][3],
               digit_seen[s][4], sd_nonzero[s], top_negative[s], minus_zero[s]);
      for (int v = 0; v < 5; v++) begin
        checks++;
        if (digit_seen[s][v] == 0) begin
          failures++;
          $display("FAIL S-MB%0d never produced digit %0d", s + 1, v - 2);
        end
      end
      checks += 3;
      if (sd_nonzero[s] == 0) begin failures++; $display("FAIL S-MB%0d top digit never non-zero", s + 1); end
      if (top_negative[s] == 0) begin failures++; $display("FAIL S-MB%0d top digit never negative", s + 1); end
      if (minus_zero[s] == 0) begin failures++; $display("FAIL S-MB%0d never produced -0", s + 1); end
    end
    $display("digit sets differing between schemes: %0d", schemes_differ);
    checks++;
    if (schemes_differ == 0) begin failures++; $display("FAIL schemes never differed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
