// sc_element: behavioural model of the basic switched-capacitor element
// (not synthesizable: an analogue circuit, modelled with real numbers).
//
// Two MOS switches, driven by the non-overlapping clocks phi1 (O1) and phi2
// (O2), connect a grounded capacitor C alternately to node V1 and to node V2.
// While O1 is closed the capacitor charges to V1; while O2 is closed it is
// brought to V2. Each period T therefore moves the charge C*(V1 - V2) from V1
// to V2, so on average the element behaves as a resistor R = T / C between the
// two nodes; this is the building block from which the document's
// switched-capacitor adders, multipliers and delays are made. The switches
// are ideal (no on-resistance, no charge injection), and V1 and V2 are taken
// as ideal sources: these are this model's simplifications.
//
// Outputs: vc, the capacitor voltage; q_o, the charge (coulombs) delivered to
// V2 in the last O2 phase (C times the capacitor voltage when O1 opened,
// minus V2), updated when O2 opens; r_eq_o, the equivalent
// resistance T / C for the given period.
module sc_element #(
  parameter real C_F    = 1.0e-12,   // capacitance (farad)
  parameter real T_S    = 1.0e-6     // switching period T (second)
) (
  input  real  v1,
  input  real  v2,
  input  logic phi1,   // O1
  input  logic phi2,   // O2
  output real  vc,
  output real  q_o,
  output real  r_eq_o
);

  real v_start;   // capacitor voltage when O1 opened

  initial begin
    q_o     = 0.0;
    v_start = 0.0;
  end

  assign r_eq_o = T_S / C_F;

  // Capacitor follows whichever node its closed switch connects it to and
  // holds its charge while both switches are open (a latch by nature).
  always_latch begin
    if (phi1 && !phi2)      vc = v1;
    else if (phi2 && !phi1) vc = v2;
  end

  always @(negedge phi1) v_start <= vc;
  always @(negedge phi2) q_o <= C_F * (v_start - v2);

  // Closing both switches would short V1 to V2 (not checked at time zero,
  // before the switch clocks have been reset).
  always @(phi1 or phi2)
    if ($realtime > 0) assert (!(phi1 && phi2)) else $error("sc_element: O1 and O2 closed together");

endmodule
