// sc_clkgen: two-phase non-overlapping switch clocks for switched-capacitor
// elements.
//
// A switched-capacitor element needs two switch controls, O1 and O2, that
// close in turn once per period T and are never closed together. This block
// derives them from a fast master clock: a counter runs over one period of
// 2*HALF master clocks; O1 is high in the first half and O2 in the second,
// each with DEAD master clocks of dead time at the start of its half so that
// the two never overlap. Both outputs are registered (glitch-free). The
// period T and the two phases follow the document's switch-timing drawing; the
// placement of the pulses within each half, the dead time and the counter are
// this design's choice. Reset holds both switches open.
module sc_clkgen #(
  parameter int unsigned HALF = 4,   // master clocks per half period (T/2)
  parameter int unsigned DEAD = 1    // dead time at the start of each half
) (
  input  logic clk,
  input  logic rst_n,
  output logic phi1,   // O1
  output logic phi2    // O2
);

  localparam int unsigned CW = $clog2(2 * HALF);

  logic [CW-1:0] cnt, cnt_nxt;

  initial assert (DEAD < HALF) else $error("sc_clkgen: DEAD must be below HALF");

  always_comb cnt_nxt = (cnt == CW'(2 * HALF - 1)) ? '0 : cnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      phi1 <= 1'b0;
      phi2 <= 1'b0;
    end else begin
      cnt  <= cnt_nxt;
      phi1 <= (cnt_nxt >= CW'(DEAD)) && (cnt_nxt < CW'(HALF));
      phi2 <= (cnt_nxt >= CW'(HALF + DEAD));
    end
  end

endmodule
