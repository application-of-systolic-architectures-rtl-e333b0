// tb_sc_clkgen: self-checking test of the two-phase switch clock generator
// with HALF = 4, DEAD = 1. Checks, over many periods, that O1 and O2 are never
// high together, that each is high for HALF - DEAD master clocks per period,
// that both repeat every 2*HALF master clocks, and that O2 rises HALF clocks
// after O1.
module tb_sc_clkgen;
  localparam int HALF = 4;
  localparam int DEAD = 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, phi1, phi2, p1_d, p2_d;
  int cyc = 0, r1 = -1, r2 = -1, hi1 = 0, hi2 = 0, n1 = 0, n2 = 0;
  int checks = 0, failures = 0;

  sc_clkgen #(.HALF(HALF), .DEAD(DEAD)) dut (.clk(clk), .rst_n(rst_n), .phi1(phi1), .phi2(phi2));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 chk(!phi1 && !phi2, "switches open in reset");
    rst_n = 1'b1;
    p1_d = 1'b0; p2_d = 1'b0;
    repeat (400) begin
      @(posedge clk);
      #1;
      cyc++;
      chk(!(phi1 && phi2), "overlap");
      if (phi1) hi1++;
      if (phi2) hi2++;
      if (phi1 && !p1_d) begin
        if (r1 >= 0) chk(cyc - r1 == 2 * HALF, "O1 period");
        r1 = cyc; n1++;
      end
      if (phi2 && !p2_d) begin
        if (r2 >= 0) chk(cyc - r2 == 2 * HALF, "O2 period");
        if (r1 >= 0) chk(cyc - r1 == HALF, "O2 follows O1 by T/2");
        r2 = cyc; n2++;
      end
      if (!phi1 && p1_d) begin chk(hi1 == HALF - DEAD, "O1 width"); hi1 = 0; end
      if (!phi2 && p2_d) begin chk(hi2 == HALF - DEAD, "O2 width"); hi2 = 0; end
      p1_d = phi1; p2_d = phi2;
    end
    chk(n1 >= 40 && n2 >= 40, "pulse count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
