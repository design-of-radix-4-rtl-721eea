// Self-checking testbench of booth_multiplier.
//
// Exhaustive at the default 8 bits: all 65536 signed operand pairs are
// multiplied and compared with the integer product computed here. A 4-bit
// and a 12-bit instance (other even widths) are checked exhaustively and
// with random operands respectively.
module tb_booth_multiplier;
  localparam int unsigned L  = 8;
  localparam int unsigned L4 = 4;
  localparam int unsigned LB = 12;

  logic [L-1:0]    x, y;
  logic [2*L-1:0]  p;
  logic [L4-1:0]   x4, y4;
  logic [2*L4-1:0] p4;
  logic [LB-1:0]   xb, yb;
  logic [2*LB-1:0] pb;
  int checks   = 0;
  int failures = 0;

  booth_multiplier #(.L(L))  dut  (.x(x),  .y(y),  .p(p));
  booth_multiplier #(.L(L4)) dut4 (.x(x4), .y(y4), .p(p4));
  booth_multiplier #(.L(LB)) dutb (.x(xb), .y(yb), .p(pb));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x4 = '0; y4 = '0; xb = '0; yb = '0;
    for (int xv = 0; xv < (1 << L); xv++) begin
      for (int yv = 0; yv < (1 << L); yv++) begin
        int e;
        x = L'(xv);
        y = L'(yv);
        #1;
        e = int'(signed'(x)) * int'(signed'(y));
        checks++;
        if (int'(signed'(p)) != e) begin
          failures++;
          if (failures < 10) $display("FAIL L=8 %0d*%0d = %0d expected %0d", signed'(x), signed'(y), signed'(p), e);
        end
      end
    end
    for (int xv = 0; xv < (1 << L4); xv++) begin
      for (int yv = 0; yv < (1 << L4); yv++) begin
        int e;
        x4 = L4'(xv);
        y4 = L4'(yv);
        #1;
        e = int'(signed'(x4)) * int'(signed'(y4));
        checks++;
        if (int'(signed'(p4)) != e) begin
          failures++;
          if (failures < 10) $display("FAIL L=4 %0d*%0d = %0d expected %0d", signed'(x4), signed'(y4), signed'(p4), e);
        end
      end
    end
    for (int t = 0; t < 20000; t++) begin
      int e;
      xb = (t == 0) ? {1'b1, {(LB-1){1'b0}}} : LB'($urandom);
      yb = (t == 0) ? {1'b1, {(LB-1){1'b0}}} : LB'($urandom);
      #1;
      e = int'(signed'(xb)) * int'(signed'(yb));
      checks++;
      if (int'(signed'(pb)) != e) begin
        failures++;
        if (failures < 10) $display("FAIL L=12 %0d*%0d = %0d expected %0d", signed'(xb), signed'(yb), signed'(pb), e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
