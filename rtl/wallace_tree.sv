// Wallace tree compressor.
//
// Reduces N rows of W bits to two rows (sum and carry) whose sum equals the
// sum of all inputs modulo 2^W. Each layer takes the rows of the layer above
// in groups of three and replaces every group with the two outputs of a 3:2
// carry-save adder; the one or two rows left over pass straight down. A layer
// of n rows thus leaves 2*(n/3) + n%3 rows, and layers are added until two
// remain. With the default 5 rows (four Booth rows of an 8x8 product and one
// row of negation bits) this takes three layers. The full-adder layering is
// this design's own reading of the compressor, which is given by name only.
//
// Purely combinational; the final carry-propagate addition is left to the
// carry look-ahead adder.
module wallace_tree #(
  parameter int unsigned W = 16,  // row width
  parameter int unsigned N = 5    // number of input rows, at least 2
) (
  input  logic [N-1:0][W-1:0] rows,
  output logic [W-1:0]        sum,
  output logic [W-1:0]        carry
);

  // Rows left after `k` layers.
  function automatic int unsigned rows_after(int unsigned k);
    int unsigned n;
    n = N;
    for (int unsigned i = 0; i < k; i++) begin
      if (n > 2) n = 2 * (n / 3) + n % 3;
    end
    return n;
  endfunction

  // Number of layers needed to get down to two rows.
  function automatic int unsigned num_layers();
    int unsigned n;
    int unsigned k;
    n = N;
    k = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      k++;
    end
    return k;
  endfunction

  localparam int unsigned LAYERS = num_layers();

  // lv[k] holds the rows after k layers; only its first rows_after(k) entries are used.
  logic [N-1:0][W-1:0] lv [LAYERS+1];

  assign lv[0] = rows;

  for (genvar k = 0; k < LAYERS; k++) begin : g_layer
    localparam int unsigned NIN    = rows_after(k);
    localparam int unsigned GROUPS = NIN / 3;
    localparam int unsigned NOUT   = rows_after(k + 1);

    for (genvar g = 0; g < GROUPS; g++) begin : g_csa
      csa_3to2 #(.W(W)) u_csa (
        .a    (lv[k][3*g]),
        .b    (lv[k][3*g+1]),
        .c    (lv[k][3*g+2]),
        .sum  (lv[k+1][2*g]),
        .carry(lv[k+1][2*g+1])
      );
    end

    // Leftover rows pass to the next layer unchanged.
    for (genvar r = 3 * GROUPS; r < NIN; r++) begin : g_pass
      assign lv[k+1][2*GROUPS + r - 3*GROUPS] = lv[k][r];
    end

    // Unused entries are tied to zero so that nothing is left undriven.
    for (genvar u = NOUT; u < N; u++) begin : g_unused
      assign lv[k+1][u] = '0;
    end
  end

  assign sum   = lv[LAYERS][0];
  assign carry = lv[LAYERS][1];

endmodule
