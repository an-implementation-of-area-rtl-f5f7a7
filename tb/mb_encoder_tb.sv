// mb_encoder_tb: checks the Modified Booth encoder against the encoding
// table (sign, one, two, carry for each of the eight digit triples), and
// checks that the code's signed magnitude equals the triple's value.
module mb_encoder_tb;
  import fam_pkg::*;

  int checks = 0;
  int failures = 0;

  mb_triple_t digit;
  mb_code_t   code;

  mb_encoder dut (.digit(digit), .code(code));

  // expected {sign, one, two, carry} for triple 000 .. 111
  localparam logic [3:0] TABLE [8] = '{
    4'b0000, 4'b0100, 4'b0100, 4'b0010,
    4'b1011, 4'b1101, 4'b1101, 4'b1000
  };

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int mag;
    for (int t = 0; t < 8; t++) begin
      digit = mb_triple_t'(3'(t));
      #1;
      checks++;
      if (code != mb_code_t'(TABLE[t])) begin
        failures++;
        $display("FAIL triple %03b: code %04b expected %04b", 3'(t), code, TABLE[t]);
      end
      mag = int'(code.one) + 2 * int'(code.two);
      checks++;
      if ((code.sign ? -mag : mag) != triple_value(digit)) begin
        failures++;
        $display("FAIL triple %03b: signed magnitude differs from value %0d", 3'(t), triple_value(digit));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
