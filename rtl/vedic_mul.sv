// vedic_mul: unsigned WIDTH x WIDTH multiplier after the Urdhva Tiryakbhyam
// ("vertically and crosswise") rule.
//
// The product is formed column by column, the way the rule multiplies
// decimal numbers by hand: column k collects every bit product a[i]&b[j]
// with i+j = k (the "vertical" and "crosswise" pairs), adds the carry left
// over from column k-1, keeps the sum's LSB as product bit r[k] and passes
// the rest of the sum on as a (possibly multi-bit) carry to column k+1.
// All bit products come from one row of AND gates (ut_pp_array), so every
// column is ready at once and only the carry ripples from column to column.
//
// Structure for the published 4-bit size: 16 AND gates; r0 straight from
// a0&b0; six column adders (ut_column_adder) for columns 1..6 holding
// 2,3,4,3,2,1 bit products; carry buses of 1,2,2,2,2 bits between them; the
// carry out of the last column is the top product bit c (C6). This
// follows the published architecture. Unsigned operands, the carry-bus
// widths (the smallest that can hold each column's worst case, from
// vedic_pkg) and generalising to any WIDTH are this design's choices.
//
// Interface: a, b (WIDTH bits, unsigned) in; r (2*WIDTH-1 bits, product
// bits 0 .. 2*WIDTH-2) and c (product bit 2*WIDTH-1) out, so {c, r} = a*b.
// Timing: purely combinational, no clock and no reset; the longest path is
// one AND gate plus the carry ripple through all column adders.
module vedic_mul #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-2:0] r,
  output logic               c
);

  import vedic_pkg::*;

  localparam int NCOL = 2 * WIDTH - 1;               // product columns
  localparam int CWM  = carry_w_max(int'(WIDTH));    // widest carry bus

  logic [WIDTH-1:0][WIDTH-1:0] pp;
  logic [CWM-1:0]              carry [NCOL];         // carry leaving column k

  ut_pp_array #(.WIDTH(WIDTH)) u_pp (
    .a (a),
    .b (b),
    .pp(pp)
  );

  // Column 0 holds a single bit product: no adder, no carry.
  assign r[0]     = pp[0][0];
  assign carry[0] = '0;

  for (genvar k = 1; k < NCOL; k++) begin : g_col
    localparam int NP   = col_pp(k, int'(WIDTH));
    localparam int I0   = (k < int'(WIDTH)) ? 0 : k - int'(WIDTH) + 1;
    localparam int CINW = carry_w(k - 1, int'(WIDTH));
    localparam int COW  = carry_w(k, int'(WIDTH));

    logic [NP-1:0]   col;    // bit products of this column
    logic [COW-1:0]  cout;

    for (genvar n = 0; n < NP; n++) begin : g_pp
      assign col[n] = pp[I0 + n][k - I0 - n];
    end

    ut_column_adder #(
      .N_PP  (NP),
      .CIN_W (CINW),
      .COUT_W(COW)
    ) u_add (
      .pp  (col),
      .cin (carry[k-1][CINW-1:0]),
      .s   (r[k]),
      .cout(cout)
    );

    assign carry[k] = CWM'(cout);
  end

  assign c = carry[NCOL-1][0];

  // The full product fits in 2*WIDTH bits, so the last carry never exceeds 1.
  always_comb begin
    assert ((carry[NCOL-1] >> 1) == '0)
      else $error("vedic_mul: carry out of the last column exceeds one bit");
  end

endmodule
