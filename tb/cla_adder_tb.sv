// cla_adder_tb: checks the carry-lookahead adder exhaustively at W = 4 and
// W = 6 (one full and one partly used lookahead block) and with random and
// carry-chain operands at W = 17 and W = 16: sum and carry out must equal
// a + b + cin computed with integer arithmetic.
module cla_adder_tb;
  int checks = 0;
  int failures = 0;

  logic [3:0]  a4, b4, s4;
  logic [5:0]  a6, b6, s6;
  logic [16:0] a17, b17, s17;
  logic [15:0] a16, b16, s16;
  logic        ci, co4, co6, co17, co16;

  cla_adder #(.W(4))  dut4  (.a(a4),  .b(b4),  .cin(ci), .sum(s4),  .cout(co4));
  cla_adder #(.W(6))  dut6  (.a(a6),  .b(b6),  .cin(ci), .sum(s6),  .cout(co6));
  cla_adder #(.W(17)) dut17 (.a(a17), .b(b17), .cin(ci), .sum(s17), .cout(co17));
  cla_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(ci), .sum(s16), .cout(co16));

  task automatic check(string name, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", name, got, want);
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
    for (int i = 0; i < 64; i++)
      for (int k = 0; k < 64; k++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(i); b4 = 4'(k); a6 = 6'(i); b6 = 6'(k); ci = 1'(c);
          a17 = '1; b17 = '0; a16 = '1; b16 = '0;
          #1;
          if (i < 16 && k < 16) check("W=4", {co4, s4}, longint'(i + k + c));
          check("W=6", {co6, s6}, longint'(i + k + c));
        end
    for (int it = 0; it < 20000; it++) begin
      a17 = 17'($urandom); b17 = 17'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      ci = 1'($urandom);
      if (it < 2) begin
        // full-length carry chain through every block
        a17 = '1; b17 = '0; a16 = '1; b16 = '0; ci = 1'b1;
      end
      #1;
      check("W=17", {co17, s17}, longint'(a17) + longint'(b17) + longint'(ci));
      check("W=16", {co16, s16}, longint'(a16) + longint'(b16) + longint'(ci));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
