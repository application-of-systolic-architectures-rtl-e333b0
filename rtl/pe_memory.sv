// pe_memory: the memorisation component of a cylindrical-type processing
// element.
//
// One register, as in the document: it is loaded with the coefficient l_ij
// before the first wave front and is then overwritten by the result V_ij that
// the node accumulates in the second wave front. load_en has priority over
// wr_en; both take effect at the rising clock edge. Reset clears it to zero
// (this design's choice).
module pe_memory
  import ctp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load_en,   // load the coefficient l_ij
  input  sample_t load_val,
  input  logic    wr_en,     // store a new partial result V_ij
  input  sample_t wr_val,
  output sample_t q_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q_o <= '0;
    else if (load_en) q_o <= load_val;
    else if (wr_en)   q_o <= wr_val;
  end

endmodule
