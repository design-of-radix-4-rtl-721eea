// End-to-end self-checking testbench of fir_booth_top, at its default size
// (8-bit samples and coefficients, 4 taps).
//
// A reference model kept here holds the sample history and computes
// y[n] = sum h[k]*x[n-k] with integer arithmetic. The test runs:
//   - an impulse response (reads the coefficients back out, in order),
//   - a step response,
//   - worst-case magnitudes (all -128, which needs the output's extra bits),
//   - random samples with random coefficients, with en held low on some
//     clocks (stalls) and one asynchronous reset in the middle of the stream.
// y_n is checked before every clock edge. It also counts how often each
// mechanism happened: each Booth digit value (-2..+2) in the coefficients,
// stalls, the mid-stream reset and outputs beyond the 16-bit product range;
// a mechanism that never happened counts as a failure.
module tb_fir_booth_top;
  import fir_booth_pkg::*;
  localparam int unsigned L    = DEFAULT_L;
  localparam int unsigned TAPS = DEFAULT_TAPS;
  localparam int unsigned YW   = 2 * L + $clog2(TAPS);

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b1;
  logic                   en;
  logic [L-1:0]           x_n;
  logic [TAPS-1:0][L-1:0] coef;
  logic [YW-1:0]          y_n;

  int hist [TAPS];  // hist[k] = x[n-k] as the model sees it
  int checks   = 0;
  int failures = 0;
  int digit_seen [5];  // index d+2
  int stalls     = 0;
  int mid_resets = 0;
  int wide_out   = 0;
  int samples    = 0;

  fir_booth_top dut (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .x_n  (x_n),
    .coef (coef),
    .y_n  (y_n)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count the radix-4 digits of the coefficients, recoded here independently.
  function automatic void count_digits();
    for (int k = 0; k < TAPS; k++) begin
      logic [L:0] yb;
      yb = {coef[k], 1'b0};
      for (int i = 0; i < L / 2; i++) begin
        int d;
        d = -2 * int'(yb[2*i+2]) + int'(yb[2*i+1]) + int'(yb[2*i]);
        digit_seen[d+2]++;
      end
    end
  endfunction

  function automatic int model_y();
    int s;
    s = int'(signed'(coef[0])) * int'(signed'(x_n));
    for (int k = 1; k < TAPS; k++) s += int'(signed'(coef[k])) * hist[k];
    return s;
  endfunction

  // Present one sample, check y_n, then clock it in (or stall).
  task automatic step(input logic [L-1:0] x, input logic enable);
    int e;
    @(negedge clk);
    x_n = x;
    en  = enable;
    #1;
    e = model_y();
    checks++;
    if (int'(signed'(y_n)) != e) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t x=%0d y=%0d expected %0d", $time, signed'(x), signed'(y_n), e);
    end
    if (e > 32767 || e < -32768) wide_out++;
    @(posedge clk);
    if (enable) begin
      for (int k = TAPS - 1; k > 1; k--) hist[k] = hist[k-1];
      hist[1] = int'(signed'(x));
      samples++;
    end else begin
      stalls++;
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    en    = 1'b0;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    #2;
    rst_n = 1'b1;
  endtask

  initial begin
    for (int i = 0; i < 5; i++) digit_seen[i] = 0;
    en   = 1'b0;
    x_n  = '0;
    coef = '0;
    #1;
    do_reset();

    // Impulse response: y must read back h[0], h[1], ... in turn.
    coef[0] = 8'sd3;  coef[1] = -8'sd7;  coef[2] = 8'sd100;  coef[3] = -8'sd128;
    count_digits();
    step(8'd1, 1'b1);
    for (int i = 0; i < TAPS + 2; i++) step(8'd0, 1'b1);

    // Step response.
    coef = {8'sd11, 8'sd22, -8'sd33, 8'sd44};
    count_digits();
    for (int i = 0; i < 2 * TAPS; i++) step(8'sd5, 1'b1);

    // Worst-case magnitude: every product is (-128)*(-128).
    coef = {TAPS{8'h80}};
    count_digits();
    for (int i = 0; i < TAPS + 1; i++) step(8'h80, 1'b1);
    coef = {TAPS{8'h7f}};
    count_digits();
    for (int i = 0; i < TAPS + 1; i++) step(8'h80, 1'b1);

    // Random stream with stalls and one reset in the middle.
    for (int blk = 0; blk < 200; blk++) begin
      for (int k = 0; k < TAPS; k++) coef[k] = L'($urandom);
      count_digits();
      for (int i = 0; i < 50; i++) step(L'($urandom), ($urandom % 5) != 0);
      if (blk == 100) begin
        // Pulse reset between two clock edges.
        @(negedge clk);
        #1;
        do_reset();
        mid_resets++;
      end
    end

    $display("mechanisms: digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d stalls:%0d resets:%0d wide outputs:%0d samples:%0d",
             digit_seen[0], digit_seen[1], digit_seen[2], digit_seen[3], digit_seen[4],
             stalls, mid_resets, wide_out, samples);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (digit_seen[i] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never used", i - 2);
      end
    end
    checks++;
    if (stalls == 0)     begin failures++; $display("FAIL no stall");            end
    checks++;
    if (mid_resets == 0) begin failures++; $display("FAIL no mid-stream reset"); end
    checks++;
    if (wide_out == 0)   begin failures++; $display("FAIL no wide output");      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
