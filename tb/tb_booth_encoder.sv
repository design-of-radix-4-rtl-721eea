// Self-checking testbench of booth_encoder.
//
// Applies all eight 3-bit patterns and compares the decoded digit with the
// radix-4 recoding d = -2*b2 + b1 + b0 worked out here, and checks that the
// select lines are one-hot-or-zero and that zero never carries neg.
module tb_booth_encoder;
  import fir_booth_pkg::*;

  logic [2:0]   bits;
  booth_digit_t digit;
  int checks   = 0;
  int failures = 0;

  booth_encoder dut (.bits(bits), .digit(digit));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int exp_d;
      bits  = 3'(v);
      #1;
      exp_d = -2 * int'(bits[2]) + int'(bits[1]) + int'(bits[0]);
      checks++;
      if (digit_value(digit) != exp_d) begin
        failures++;
        $display("FAIL bits=%b digit=%0d expected %0d", bits, digit_value(digit), exp_d);
      end
      checks++;
      if ((digit.one && digit.two) || (exp_d == 0 && digit.neg)) begin
        failures++;
        $display("FAIL bits=%b malformed digit %b", bits, digit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
