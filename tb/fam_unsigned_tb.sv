// fam_unsigned_tb: runs unsigned 8-bit operands through the three fused
// add-multiply units. The datapath is two's complement, so unsigned 8-bit
// values are zero-extended into a 9-bit instance (an odd width, which also
// exercises the FA** top cells). It checks the published examples
// 10*(8+4), 15*(8+2) and 21*(4+2), every (A, B) pair with a random X, and the
// largest case 255*(255+255), against integer arithmetic.
module fam_unsigned_tb;
  import fam_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [8:0]  x, a, b;
  logic [18:0] z [3];
  mb_triple_t  y [3][5];

  fam_top #(.N(9)) dut (
    .x(x), .a(a), .b(b),
    .z_smb1(z[0]), .z_smb2(z[1]), .z_smb3(z[2]),
    .y_smb1(y[0]), .y_smb2(y[1]), .y_smb3(y[2])
  );

  task automatic apply(int xv, int av, int bv);
    x = {1'b0, 8'(xv)};
    a = {1'b0, 8'(av)};
    b = {1'b0, 8'(bv)};
    #1;
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (longint'(z[s]) != longint'(x) * (longint'(a) + longint'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL S-MB%0d %0d*(%0d+%0d) = %0d", s + 1, x, a, b, z[s]);
      end
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
    apply(10, 8, 4);
    apply(15, 8, 2);
    apply(21, 4, 2);
    apply(255, 255, 255);
    for (int i = 0; i < 256; i++)
      for (int k = 0; k < 256; k++)
        apply(int'($urandom_range(0, 255)), i, k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
