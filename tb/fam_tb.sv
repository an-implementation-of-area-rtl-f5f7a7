// fam_tb: end-to-end check of the fused add-multiply unit with each of the
// three recoding schemes, at an odd width (N = 5, all 32768 operand triples),
// at N = 4 (all triples) and at N = 8 (random operands, the extreme values,
// and the five published simulation examples, such as 10 * (8 + 4) = 120).
// Every product is compared with X * (A + B) computed with integer arithmetic.
module fam_tb;
  import fam_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [4:0]  x5, a5, b5;
  logic [3:0]  x4, a4, b4;
  logic [7:0]  x8, a8, b8;
  logic [10:0] z5 [3];
  logic [8:0]  z4 [3];
  logic [16:0] z8 [3];
  mb_triple_t  y5 [3][3];
  mb_triple_t  y4 [3][3];
  mb_triple_t  y8 [3][5];

  fam #(.N(5), .SCHEME(SMB1)) f5_1 (.x(x5), .a(a5), .b(b5), .z(z5[0]), .y(y5[0]));
  fam #(.N(5), .SCHEME(SMB2)) f5_2 (.x(x5), .a(a5), .b(b5), .z(z5[1]), .y(y5[1]));
  fam #(.N(5), .SCHEME(SMB3)) f5_3 (.x(x5), .a(a5), .b(b5), .z(z5[2]), .y(y5[2]));
  fam #(.N(4), .SCHEME(SMB1)) f4_1 (.x(x4), .a(a4), .b(b4), .z(z4[0]), .y(y4[0]));
  fam #(.N(4), .SCHEME(SMB2)) f4_2 (.x(x4), .a(a4), .b(b4), .z(z4[1]), .y(y4[1]));
  fam #(.N(4), .SCHEME(SMB3)) f4_3 (.x(x4), .a(a4), .b(b4), .z(z4[2]), .y(y4[2]));
  fam #(.N(8), .SCHEME(SMB1)) f8_1 (.x(x8), .a(a8), .b(b8), .z(z8[0]), .y(y8[0]));
  fam #(.N(8), .SCHEME(SMB2)) f8_2 (.x(x8), .a(a8), .b(b8), .z(z8[1]), .y(y8[1]));
  fam #(.N(8), .SCHEME(SMB3)) f8_3 (.x(x8), .a(a8), .b(b8), .z(z8[2]), .y(y8[2]));

  task automatic check(string name, int s, longint got, longint want, int w);
    longint m;
    m = (longint'(1) << w) - 1;
    checks++;
    if ((got & m) != (want & m)) begin
      failures++;
      if (failures < 10) $display("FAIL %s S-MB%0d: z=%0h expected %0h", name, s + 1, got & m, want & m);
    end
  endtask

  task automatic run8(int xv, int av, int bv);
    x8 = 8'(xv); a8 = 8'(av); b8 = 8'(bv);
    #1;
    for (int s = 0; s < 3; s++)
      check("N=8", s, longint'(z8[s]),
            longint'($signed(x8)) * (longint'($signed(a8)) + longint'($signed(b8))), 17);
  endtask

  initial begin : watchdog
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 32768; i++) begin
      {x5, a5, b5} = 15'(i);
      {x4, a4, b4} = 12'(i);
      #1;
      for (int s = 0; s < 3; s++) begin
        check("N=5", s, longint'(z5[s]),
              longint'($signed(x5)) * (longint'($signed(a5)) + longint'($signed(b5))), 11);
        if (i < 4096)
          check("N=4", s, longint'(z4[s]),
                longint'($signed(x4)) * (longint'($signed(a4)) + longint'($signed(b4))), 9);
      end
    end
    // published examples: X, A, B and the product shown with them
    run8(10, 8, 4);  checks++; if (z8[0] != 17'd120) failures++;
    run8(10, 5, 3);  checks++; if (z8[0] != 17'd80)  failures++;
    run8(10, 5, 8);  checks++; if (z8[0] != 17'd130) failures++;
    run8(15, 8, 2);  checks++; if (z8[1] != 17'd150) failures++;
    run8(21, 4, 2);  checks++; if (z8[2] != 17'd126) failures++;
    // extremes
    run8(-128, -128, -128);
    run8(-128, 127, 127);
    run8(127, -128, -128);
    run8(127, 127, 127);
    run8(-1, -1, -1);
    for (int it = 0; it < 50000; it++) run8(int'($urandom), int'($urandom), int'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
