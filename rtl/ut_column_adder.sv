// ut_column_adder: adds one product column of the Urdhva Tiryakbhyam
// multiplier.
//
// The column's N_PP bit products and the CIN_W-bit carry from the column
// to its right are summed. The sum's least significant bit is the result
// bit of this column (s); the remaining bits form the carry bus handed to
// the next column on the left (cout). The architecture only shows each
// column adder as a box with a multi-bit carry bus between neighbours; how
// the box is built is this design's choice: a plain word-level sum of the
// set bits and the carry, which synthesis maps to whatever adder tree suits
// the target. COUT_W must be wide enough for (N_PP + max(cin)) >> 1; the
// multiplier sizes it with vedic_pkg::carry_w.
//
// Interface: pp[N_PP-1:0], cin[CIN_W-1:0] in; s, cout[COUT_W-1:0] out.
// Timing: purely combinational.
module ut_column_adder #(
  parameter int unsigned N_PP   = 4,
  parameter int unsigned CIN_W  = 2,
  parameter int unsigned COUT_W = 2
) (
  input  logic [N_PP-1:0]   pp,
  input  logic [CIN_W-1:0]  cin,
  output logic              s,
  output logic [COUT_W-1:0] cout
);

  localparam int unsigned TW = COUT_W + 1;   // width of the column total

  logic [TW-1:0] total;

  always_comb begin
    total = TW'(cin);
    for (int i = 0; i < int'(N_PP); i++) total = total + TW'(pp[i]);
  end

  assign s    = total[0];
  assign cout = total[TW-1:1];

endmodule
