// Tapped delay line of D flip-flops for the direct-form FIR filter.
//
// DEPTH registers of L bits in a chain. On a rising clock edge with en = 1
// the chain shifts: q[0] takes the new sample d and q[k] takes q[k-1]. So,
// after the edge that accepted sample x[n], q[k] holds x[n-k]; seen from the
// next sample x[n+1] on d, q[k] is x[(n+1)-1-k]. An active-low asynchronous
// reset clears every stage, so the filter starts from a zero history. The
// delay chain itself follows the direct-form filter; the reset and the shift
// enable are this design's own additions.
module delay_line #(
  parameter int unsigned L     = 8,  // sample width
  parameter int unsigned DEPTH = 3   // number of delay stages (taps - 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [L-1:0]          d,
  output logic [DEPTH-1:0][L-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (en) begin
      q[0] <= d;
      for (int k = 1; k < DEPTH; k++) q[k] <= q[k-1];
    end
  end

endmodule
