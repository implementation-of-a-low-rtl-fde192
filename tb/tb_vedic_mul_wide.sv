// tb_vedic_mul_wide: checks that the column scheme of the multiplier holds
// at sizes beyond the published 4 bits.
//
// Builds the multiplier at 8 and 16 bits (wider carry buses between the
// columns), applies the corner cases 0, 1 and all-ones plus random operand
// pairs from $urandom, and checks {c, r} against a*b worked out here. A
// watchdog ends the run with a failure if it stalls.
module tb_vedic_mul_wide;

  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  a8,  b8;   logic [14:0] r8;   logic c8;
  logic [15:0] a16, b16;  logic [30:0] r16;  logic c16;

  vedic_mul #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .r(r8),  .c(c8));
  vedic_mul #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .r(r16), .c(c16));

  task automatic run(logic [15:0] x, logic [15:0] y);
    logic [31:0] want16;
    logic [15:0] want8;
    a8 = x[7:0];  b8 = y[7:0];
    a16 = x;      b16 = y;
    @(posedge clk);
    want8  = 16'(x[7:0]) * 16'(y[7:0]);
    want16 = 32'(x) * 32'(y);
    checks += 2;
    if ({c8, r8} !== want8) begin
      failures++;
      $display("FAIL w8 %0d x %0d: got %0d want %0d", x[7:0], y[7:0], {c8, r8}, want8);
    end
    if ({c16, r16} !== want16) begin
      failures++;
      $display("FAIL w16 %0d x %0d: got %0d want %0d", x, y, {c16, r16}, want16);
    end
  endtask

  initial begin
    run(16'h0000, 16'hffff);
    run(16'h0001, 16'hffff);
    run(16'hffff, 16'hffff);
    run(16'h00ff, 16'h00ff);
    for (int n = 0; n < 5000; n++) run(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
