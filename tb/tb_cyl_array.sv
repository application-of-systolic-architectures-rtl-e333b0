// tb_cyl_array: self-checking test of the cylindrical array, at the 2 x 2
// size of the document's example and at 3 x 3 to exercise the general
// wrap-around wiring. Each size is driven by a cyl_array_check instance.
module tb_cyl_array;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c2, f2, c3, f3;
  logic d2, d3;
  int checks, failures;

  cyl_array_check #(.P(2)) u_p2 (.clk(clk), .checks(c2), .failures(f2), .done(d2));
  cyl_array_check #(.P(3)) u_p3 (.clk(clk), .checks(c3), .failures(f3), .done(d3));

  initial begin
    wait (d2 === 1'b1 && d3 === 1'b1);
    checks = c2 + c3;
    failures = f2 + f3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3, f2 + f3 + 1);
    $finish;
  end
endmodule
