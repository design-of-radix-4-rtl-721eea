// Self-checking testbench of cla_adder.
//
// Checks the default 16-bit adder and an 18-bit one (a width that is not a
// multiple of the 4-bit look-ahead group) against a + b + cin computed here:
// long carry chains (all-ones plus one), corner values and random operands.
module tb_cla_adder;
  localparam int unsigned W1 = 16;
  localparam int unsigned W2 = 18;

  logic [W1-1:0] a1, b1, s1;
  logic [W2-1:0] a2, b2, s2;
  logic          cin, co1, co2;
  int checks   = 0;
  int failures = 0;

  cla_adder #(.W(W1)) dut1 (.a(a1), .b(b1), .cin(cin), .s(s1), .cout(co1));
  cla_adder #(.W(W2)) dut2 (.a(a2), .b(b2), .cin(cin), .s(s2), .cout(co2));

  task automatic check();
    logic [W1:0] e1;
    logic [W2:0] e2;
    #1;
    e1 = {1'b0, a1} + {1'b0, b1} + (W1+1)'(cin);
    e2 = {1'b0, a2} + {1'b0, b2} + (W2+1)'(cin);
    checks++;
    if ({co1, s1} != e1) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d %h+%h+%b = %h expected %h", W1, a1, b1, cin, {co1, s1}, e1);
    end
    checks++;
    if ({co2, s2} != e2) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d %h+%h+%b = %h expected %h", W2, a2, b2, cin, {co2, s2}, e2);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Full carry propagation and corners.
    a1 = '1; b1 = '0; a2 = '1; b2 = '0; cin = 1'b1; check();
    a1 = '1; b1 = '1; a2 = '1; b2 = '1; cin = 1'b1; check();
    a1 = '0; b1 = '0; a2 = '0; b2 = '0; cin = 1'b0; check();
    a1 = 16'h7fff; b1 = 16'h0001; a2 = 18'h1ffff; b2 = 18'h00001; cin = 1'b0; check();
    for (int t = 0; t < 20000; t++) begin
      a1  = W1'($urandom);
      b1  = W1'($urandom);
      a2  = W2'($urandom);
      b2  = W2'($urandom);
      cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
