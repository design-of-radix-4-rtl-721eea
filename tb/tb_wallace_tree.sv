// Self-checking testbench of wallace_tree.
//
// Drives random rows into the default tree (5 rows of 16 bits) and into a
// larger instance (9 rows of 20 bits, four layers), and checks that
// sum + carry equals the sum of the rows modulo 2^W, computed here.
module tb_wallace_tree;
  localparam int unsigned W1 = 16, N1 = 5;
  localparam int unsigned W2 = 20, N2 = 9;

  logic [N1-1:0][W1-1:0] rows1;
  logic [W1-1:0]         s1, c1;
  logic [N2-1:0][W2-1:0] rows2;
  logic [W2-1:0]         s2, c2;
  int checks   = 0;
  int failures = 0;

  wallace_tree #(.W(W1), .N(N1)) dut1 (.rows(rows1), .sum(s1), .carry(c1));
  wallace_tree #(.W(W2), .N(N2)) dut2 (.rows(rows2), .sum(s2), .carry(c2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [W1-1:0] e1;
      logic [W2-1:0] e2;
      e1 = '0;
      e2 = '0;
      for (int r = 0; r < N1; r++) begin
        rows1[r] = (t < 4) ? (t[0] ? '1 : '0) : W1'($urandom);
        e1 += rows1[r];
      end
      for (int r = 0; r < N2; r++) begin
        rows2[r] = (t < 4) ? (t[1] ? '1 : '0) : W2'($urandom);
        e2 += rows2[r];
      end
      #1;
      checks++;
      if (W1'(s1 + c1) != e1) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d got %h expected %h", N1, W1'(s1 + c1), e1);
      end
      checks++;
      if (W2'(s2 + c2) != e2) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d got %h expected %h", N2, W2'(s2 + c2), e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
