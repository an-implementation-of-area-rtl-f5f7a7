// pp_generator_tb: checks the partial product rows at N = 8 and N = 7.
// Random multiplicands and random digit codes (every one of the codes the
// encoder can produce) are applied. Each row must equal, computed with
// integer arithmetic, (v + 2^N) mod 2^(N+1) shifted left by 2j, where v is
// d*X for a non-negative digit d, -(|d|*X) - 1 for a negative one (the +1
// comes from the correction term), and 0 for a zero digit.
module pp_generator_tb;
  import fam_pkg::*;

  int checks = 0;
  int failures = 0;

  // codes {sign, one, two, carry} the encoder produces
  localparam logic [3:0] CODES [8] = '{
    4'b0000, 4'b0100, 4'b0010, 4'b1011, 4'b1101, 4'b1000, 4'b0100, 4'b1101
  };

  logic [7:0]  x8;
  mb_code_t    c8 [5];
  logic [16:0] r8 [5];
  logic [6:0]  x7;
  mb_code_t    c7 [4];
  logic [14:0] r7 [4];

  pp_generator #(.N(8)) dut8 (.x(x8), .code(c8), .row(r8));
  pp_generator #(.N(7)) dut7 (.x(x7), .code(c7), .row(r7));

  function automatic longint expected_row(int n, int w, int j, longint xv, mb_code_t c);
    longint mag, v, r;
    mag = longint'(c.one) + 2 * longint'(c.two);
    if (mag == 0) v = 0;
    else if (c.sign) v = -(mag * xv) - 1;
    else v = mag * xv;
    r = (v + (longint'(1) << n)) & ((longint'(1) << (n + 1)) - 1);
    return (r << (2 * j)) & ((longint'(1) << w) - 1);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int it = 0; it < 20000; it++) begin
      x8 = 8'($urandom);
      x7 = 7'($urandom);
      if (it < 256) x8 = 8'(it);
      for (int j = 0; j < 5; j++) c8[j] = mb_code_t'(CODES[$urandom_range(0, 7)]);
      for (int j = 0; j < 4; j++) c7[j] = mb_code_t'(CODES[$urandom_range(0, 7)]);
      #1;
      for (int j = 0; j < 5; j++) begin
        checks++;
        if (longint'(r8[j]) != expected_row(8, 17, j, longint'($signed(x8)), c8[j])) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 x=%0d row %0d code %04b: %h", $signed(x8), j, c8[j], r8[j]);
        end
      end
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (longint'(r7[j]) != expected_row(7, 15, j, longint'($signed(x7)), c7[j])) begin
          failures++;
          if (failures < 10) $display("FAIL N=7 x=%0d row %0d code %04b: %h", $signed(x7), j, c7[j], r7[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
