// tb_sc_element: self-checking test of the switched-capacitor element model.
// The element is switched by sc_clkgen. For several pairs of node voltages
// it checks that the capacitor follows V1 while O1 is closed and V2 while O2
// is closed, that each period moves the charge C (V1 - V2) into V2, and hence
// that the average current equals (V1 - V2) / R with R = T / C.
module tb_sc_element;
  localparam real C_F = 2.0e-12;
  localparam int  HALF = 4;
  localparam real T_S = 2.0 * HALF * 10.0e-9;   // 10 ns master clock

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, phi1, phi2;
  real v1, v2, vc, q, r_eq;
  int checks = 0, failures = 0;

  sc_clkgen #(.HALF(HALF), .DEAD(1)) u_clk (.clk(clk), .rst_n(rst_n), .phi1(phi1), .phi2(phi2));
  sc_element #(.C_F(C_F), .T_S(T_S)) dut (.v1(v1), .v2(v2), .phi1(phi1), .phi2(phi2),
                                          .vc(vc), .q_o(q), .r_eq_o(r_eq));

  function automatic logic near(real a, real b, real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real pairs [4][2];
    pairs = '{'{1.0, 0.0}, '{2.5, 1.0}, '{-0.5, 0.75}, '{0.3, 0.3}};
    rst_n = 1'b0;
    v1 = 0.0; v2 = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    chk(near(r_eq, T_S / C_F, 1.0), "equivalent resistance");
    foreach (pairs[p]) begin
      v1 = pairs[p][0];
      v2 = pairs[p][1];
      repeat (3) begin
        @(posedge phi1); #1;
        chk(near(vc, v1, 1e-9), "capacitor at V1 while O1 closed");
        @(posedge phi2); #1;
        chk(near(vc, v2, 1e-9), "capacitor at V2 while O2 closed");
        @(negedge phi2); #1;
        chk(near(q, C_F * (v1 - v2), 1e-18), "charge per period");
        chk(near(q / T_S, (v1 - v2) / r_eq, 1e-9), "average current");
      end
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
