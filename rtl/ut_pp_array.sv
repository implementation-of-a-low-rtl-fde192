// ut_pp_array: the AND-gate row of the Urdhva Tiryakbhyam multiplier.
//
// Forms every bit product of the two operands at once, one two-input AND
// gate per pair: pp[i][j] = a[i] & b[j], which carries weight 2^(i+j). For
// WIDTH = 4 these are the sixteen AND gates of the architecture; the
// multiplier groups them into product columns by i+j. The gate array
// follows the published architecture; indexing the outputs as a
// WIDTH x WIDTH array (instead of the gates' physical order) is this
// design's choice.
//
// Interface: a, b are WIDTH-bit unsigned operands; pp is a WIDTH x WIDTH
// packed array. Timing: purely combinational, one gate delay.
module ut_pp_array #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0]            a,
  input  logic [WIDTH-1:0]            b,
  output logic [WIDTH-1:0][WIDTH-1:0] pp   // pp[i][j] = a[i] & b[j]
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++)
      for (int j = 0; j < WIDTH; j++)
        pp[i][j] = a[i] & b[j];
  end

endmodule
