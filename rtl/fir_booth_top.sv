// Direct-form FIR filter built on radix-4 modified Booth multipliers.
//
// Computes y[n] = sum_{k=0}^{TAPS-1} h[k] * x[n-k] for two's-complement
// L-bit samples and coefficients. The direct form keeps the past samples in a
// D flip-flop delay line, multiplies the current sample and each delayed
// sample by its coefficient in a modified Booth multiplier of its own, and
// adds the products in a chain of carry look-ahead adders. The direct form is
// chosen over the transposed form because it needs fewer and narrower delay
// registers (L-bit samples instead of full-width partial sums); the price is
// the long combinational path from the input through a multiplier and the
// adder chain to the output, which this design does not pipeline.
//
// Interface and timing:
//   x_n   current sample x[n]; y_n follows it combinationally.
//   coef  h[0..TAPS-1]; h[0] multiplies x[n], h[k] multiplies x[n-k].
//   en    on a rising clk edge with en = 1 the delay line takes x_n, so the
//         next sample presented sees it as x[n-1]. With en held at 1 the
//         filter accepts one sample per clock.
//   rst_n active-low asynchronous reset, clears the sample history.
//   y_n   full-precision sum, 2L + clog2(TAPS) bits, so it never overflows.
// The tap count, coefficients as ports, full-precision output, reset and
// sample enable are this design's own choices; the filter structure and the
// 8-bit word length follow the description it implements.
module fir_booth_top
  import fir_booth_pkg::*;
#(
  parameter int unsigned L    = DEFAULT_L,    // sample and coefficient width (even)
  parameter int unsigned TAPS = DEFAULT_TAPS, // number of taps, at least 2
  localparam int unsigned PW  = 2 * L,                 // product width
  localparam int unsigned YW  = 2 * L + $clog2(TAPS)   // output width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [L-1:0]           x_n,
  input  logic [TAPS-1:0][L-1:0] coef,
  output logic [YW-1:0]          y_n
);

  logic [TAPS-2:0][L-1:0] xd;    // xd[k] = x[n-1-k]
  logic [TAPS-1:0][L-1:0] taps;  // taps[k] = x[n-k]
  logic [TAPS-1:0][PW-1:0] prod;
  logic [TAPS-1:0][YW-1:0] acc;  // acc[k] = sum of products 0..k
  logic [TAPS-1:0]         cout_unused;

  if (TAPS < 2) begin : g_bad_taps
    $error("fir_booth_top: TAPS = %0d, must be at least 2", TAPS);
  end

  delay_line #(.L(L), .DEPTH(TAPS - 1)) u_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .d    (x_n),
    .q    (xd)
  );

  assign taps = {xd, x_n};

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    booth_multiplier #(.L(L)) u_mult (
      .x(taps[k]),
      .y(coef[k]),
      .p(prod[k])
    );
  end

  // Adder chain: acc[k] = acc[k-1] + sign-extended prod[k].
  assign acc[0]         = YW'(signed'(prod[0]));
  assign cout_unused[0] = 1'b0;

  for (genvar k = 1; k < TAPS; k++) begin : g_add
    cla_adder #(.W(YW)) u_add (
      .a   (acc[k-1]),
      .b   (YW'(signed'(prod[k]))),
      .cin (1'b0),
      .s   (acc[k]),
      .cout(cout_unused[k])
    );
  end

  assign y_n = acc[TAPS-1];

endmodule
