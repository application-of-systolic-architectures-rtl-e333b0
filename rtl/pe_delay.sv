// pe_delay: the one time-unit delay of a cylindrical-type processing element.
//
// Retransmits the longitudinal (vertical) token unchanged one clock later,
// x_s = x_e, tag included, so that the operating-mode switch travels down the
// array with the data. One clock is one time unit (one multiply plus one add).
// Reset clears the token to an idle, zero value (reset is this design's
// choice).
module pe_delay
  import ctp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  lng_t d_i,
  output lng_t q_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_o <= '{tag: TAG_IDLE, x: '0};
    else        q_o <= d_i;
  end

endmodule
