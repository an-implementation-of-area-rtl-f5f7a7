// correction_term_tb: applies every combination of digit carry bits at N = 8
// and N = 7 and checks the correction-term row against
// (-(sum_j 2^(N+2j)) + sum_j carry[j]*4^j) mod 2^(2N+1), computed with
// integer arithmetic.
module correction_term_tb;
  int checks = 0;
  int failures = 0;

  logic [4:0]  k8;
  logic [16:0] ct8;
  logic [3:0]  k7;
  logic [14:0] ct7;

  correction_term #(.N(8)) dut8 (.carry(k8), .ct(ct8));
  correction_term #(.N(7)) dut7 (.carry(k7), .ct(ct7));

  function automatic longint expected_ct(int n, int nd, longint carries);
    longint v;
    v = 0;
    for (int j = 0; j < nd; j++) begin
      v = v - (longint'(1) << (n + 2 * j));
      if (carries[j]) v = v + (longint'(1) << (2 * j));
    end
    return v & ((longint'(1) << (2 * n + 1)) - 1);
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 32; i++) begin
      k8 = 5'(i);
      k7 = 4'(i);
      #1;
      checks++;
      if (longint'(ct8) != expected_ct(8, 5, longint'(i))) begin
        failures++;
        $display("FAIL N=8 carries %05b: ct %h", k8, ct8);
      end
      checks++;
      if (longint'(ct7) != expected_ct(7, 4, longint'(i & 15))) begin
        failures++;
        $display("FAIL N=7 carries %04b: ct %h", k7, ct7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
