// Self-checking testbench of delay_line.
//
// Resets the default 3-stage, 8-bit line, then shifts in random samples with
// en randomly held low on some cycles. A model history kept here says what
// each stage must hold after every clock edge; reset clearing and holding
// while en = 0 are both checked.
module tb_delay_line;
  localparam int unsigned L = 8, DEPTH = 3;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b1;
  logic                    en;
  logic [L-1:0]            d;
  logic [DEPTH-1:0][L-1:0] q;
  logic [DEPTH-1:0][L-1:0] model;
  int checks   = 0;
  int failures = 0;
  int holds    = 0;

  delay_line #(.L(L), .DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (q !== model) begin
      failures++;
      if (failures < 10) $display("FAIL q=%h expected %h", q, model);
    end
  endtask

  initial begin
    #1;
    rst_n = 1'b0;
    en    = 1'b0;
    d     = '0;
    model = '0;
    #12;
    compare();
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      d  = L'($urandom);
      @(posedge clk);
      if (en) begin
        for (int k = DEPTH - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = d;
      end else begin
        holds++;
      end
      #1;
      compare();
    end
    // Asynchronous reset in the middle of a clock period.
    @(negedge clk);
    #2 rst_n = 1'b0;
    #1;
    model = '0;
    compare();
    checks++;
    if (holds == 0) begin
      failures++;
      $display("FAIL en was never low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
