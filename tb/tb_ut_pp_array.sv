// tb_ut_pp_array: exhaustive self-checking test of the AND-gate row.
//
// Drives every pair of 4-bit operands and checks each of the sixteen bit
// products against a[i] & b[j] worked out here. A watchdog ends the run
// with a failure if the sweep has not finished in time.
module tb_ut_pp_array;

  localparam int unsigned W = 4;

  logic [W-1:0]        a, b;
  logic [W-1:0][W-1:0] pp;
  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;

  ut_pp_array #(.WIDTH(W)) dut (.a(a), .b(b), .pp(pp));

  always #5 clk = ~clk;

  initial begin
    for (int x = 0; x < (1 << W); x++) begin
      for (int y = 0; y < (1 << W); y++) begin
        a = W'(x);
        b = W'(y);
        @(posedge clk);
        for (int i = 0; i < int'(W); i++)
          for (int j = 0; j < int'(W); j++) begin
            checks++;
            if (pp[i][j] !== (((x >> i) & (y >> j) & 1) == 1)) begin
              failures++;
              $display("FAIL a=%0d b=%0d pp[%0d][%0d]=%b", x, y, i, j, pp[i][j]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
