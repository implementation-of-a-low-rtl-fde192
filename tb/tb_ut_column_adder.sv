// tb_ut_column_adder: self-checking test of the column adder.
//
// Four instances cover the column shapes of the 4-bit multiplier: four
// products with a 2-bit carry (the middle column), two products with a
// 1-bit carry, three products with a 1-bit carry, and one product with a
// 2-bit carry (the last column). Every product pattern and every carry
// value the column can receive is applied; the expected result bit and
// carry come from counting the set bits here. A watchdog ends the run with
// a failure if the sweep has not finished in time.
module tb_ut_column_adder;

  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  // Column: 4 products, 2-bit carry in, 2-bit carry out (default shape).
  logic [3:0] pp4;  logic [1:0] ci4;  logic s4;  logic [1:0] co4;
  ut_column_adder dut4 (.pp(pp4), .cin(ci4), .s(s4), .cout(co4));

  // Column: 2 products, 1-bit carry in and out.
  logic [1:0] pp2;  logic [0:0] ci2;  logic s2;  logic [0:0] co2;
  ut_column_adder #(.N_PP(2), .CIN_W(1), .COUT_W(1))
    dut2 (.pp(pp2), .cin(ci2), .s(s2), .cout(co2));

  // Column: 3 products, 1-bit carry in, 2-bit carry out.
  logic [2:0] pp3;  logic [0:0] ci3;  logic s3;  logic [1:0] co3;
  ut_column_adder #(.N_PP(3), .CIN_W(1), .COUT_W(2))
    dut3 (.pp(pp3), .cin(ci3), .s(s3), .cout(co3));

  // Column: 1 product, 2-bit carry in (at most 2), 1-bit carry out.
  logic [0:0] pp1;  logic [1:0] ci1;  logic s1;  logic [0:0] co1;
  ut_column_adder #(.N_PP(1), .CIN_W(2), .COUT_W(1))
    dut1 (.pp(pp1), .cin(ci1), .s(s1), .cout(co1));

  function automatic int ones(int v);
    int n = 0;
    for (int i = 0; i < 8; i++) n += (v >> i) & 1;
    return n;
  endfunction

  task automatic check(string tag, int p, int ci, int s, int co);
    int t = ones(p) + ci;
    checks++;
    if (s != (t & 1) || co != (t >> 1)) begin
      failures++;
      $display("FAIL %s pp=%0h cin=%0d: s=%0d cout=%0d, want s=%0d cout=%0d",
               tag, p, ci, s, co, t & 1, t >> 1);
    end
  endtask

  initial begin
    for (int p = 0; p < 16; p++)
      for (int ci = 0; ci < 4; ci++) begin
        pp4 = 4'(p);  ci4 = 2'(ci);
        pp2 = 2'(p);  ci2 = 1'(ci);
        pp3 = 3'(p);  ci3 = 1'(ci);
        pp1 = 1'(p);  ci1 = 2'((ci > 2) ? 2 : ci);
        @(posedge clk);
        check("n4", p, ci, int'(s4), int'(co4));
        if (p < 4 && ci < 2) check("n2", p, ci, int'(s2), int'(co2));
        if (p < 8 && ci < 2) check("n3", p, ci, int'(s3), int'(co3));
        if (p < 2 && ci < 3) check("n1", p, ci, int'(s1), int'(co1));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
