// Self-checking testbench of booth_pp_gen.
//
// For every 8-bit multiplicand and every digit in {-2..+2} checks that the
// signed row plus its neg bit equals digit * x, computed here with integer
// arithmetic, and that neg follows the digit's sign.
module tb_booth_pp_gen;
  import fir_booth_pkg::*;
  localparam int unsigned L = 8;

  logic [L-1:0] x;
  booth_digit_t digit;
  logic [L:0]   pp;
  logic         neg;
  int checks   = 0;
  int failures = 0;

  booth_pp_gen #(.L(L)) dut (.x(x), .digit(digit), .pp(pp), .neg(neg));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < (1 << L); xv++) begin
      for (int d = -2; d <= 2; d++) begin
        int exp_v;
        int got;
        x         = L'(xv);
        digit.neg = (d < 0);
        digit.one = (d == 1) || (d == -1);
        digit.two = (d == 2) || (d == -2);
        #1;
        exp_v = d * int'(signed'(x));
        got   = int'(signed'(pp)) + int'(neg);
        checks++;
        if (got != exp_v || neg != (d < 0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%0d d=%0d pp=%b neg=%b got %0d expected %0d",
                     signed'(x), d, pp, neg, got, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
