// tb_vedic_mul: end-to-end self-checking test of the 4-bit Urdhva
// Tiryakbhyam multiplier at its default size.
//
// First applies the published worked example, 1110 x 1101 (14 x 13), in
// both operand orders and checks the product 1011_0110 (182) bit by bit.
// Then sweeps all 256 operand pairs and checks {c, r} against a*b worked
// out here. A column-by-column reference of the rule (sum the column's bit
// products and the incoming carry) runs alongside to count how often the
// design's mechanisms are exercised: a carry of two or more passed between
// columns (multi-bit carry bus) and a set final carry c. Each must occur at
// least once. A watchdog ends the run with a failure if the sweep stalls.
module tb_vedic_mul;

  localparam int W = 4;

  logic [W-1:0]   a, b;
  logic [2*W-2:0] r;
  logic           c;
  int checks = 0, failures = 0;
  int n_multibit_carry = 0, n_final_carry = 0;
  logic clk;
  initial clk = 1'b0;

  vedic_mul dut (.a(a), .b(b), .r(r), .c(c));

  always #5 clk = ~clk;

  // Largest carry passed between columns when multiplying x by y.
  function automatic int max_col_carry(int x, int y);
    int cy = 0, m = 0, t;
    for (int k = 0; k <= 2 * W - 2; k++) begin
      t = cy;
      for (int i = 0; i < W; i++)
        if (k - i >= 0 && k - i < W) t += ((x >> i) & (y >> (k - i)) & 1);
      cy = t >> 1;
      if (cy > m) m = cy;
    end
    return m;
  endfunction

  task automatic apply_and_check(int x, int y);
    int want;
    a = W'(x);
    b = W'(y);
    @(posedge clk);
    want = x * y;
    checks++;
    if ({c, r} !== (2*W)'(want)) begin
      failures++;
      $display("FAIL %0d x %0d: got %0d, want %0d", x, y, {c, r}, want);
    end
    if (max_col_carry(x, y) >= 2) n_multibit_carry++;
    if (c) n_final_carry++;
  endtask

  initial begin
    // Published example: a = 1110, b = 1101, product 1011_0110.
    apply_and_check(32'b1110, 32'b1101);
    checks++;
    if ({c, r} !== 8'b1011_0110) begin
      failures++;
      $display("FAIL example 1110 x 1101: got %b", {c, r});
    end
    apply_and_check(32'b1101, 32'b1110);
    checks++;
    if (c !== 1'b1 || r !== 7'b011_0110) begin
      failures++;
      $display("FAIL example 1101 x 1110: c=%b r=%b", c, r);
    end

    for (int x = 0; x < (1 << W); x++)
      for (int y = 0; y < (1 << W); y++)
        apply_and_check(x, y);

    $display("mechanisms: multi-bit column carry=%0d final carry c=%0d",
             n_multibit_carry, n_final_carry);
    checks++;
    if (n_multibit_carry == 0) begin
      failures++;
      $display("FAIL no multi-bit column carry was exercised");
    end
    checks++;
    if (n_final_carry == 0) begin
      failures++;
      $display("FAIL final carry c was never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
