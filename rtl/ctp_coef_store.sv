// ctp_coef_store: coefficient memory of the CTP filter.
//
// Holds the two P x P factors of the filter's global state matrix: L, which is
// copied into the node memories before every first wave front, and R, whose
// columns are streamed down the longitudinal paths in the second wave front.
// Both are written one element per clock through a small configuration port
// (wr_sel 0 selects L, 1 selects R; wr_row/wr_col give the element) and are
// read out in parallel. The document says only that the matrix elements are
// loaded into the nodes; the write port, its format and the reset to zero are
// this design's choice.
module ctp_coef_store
  import ctp_pkg::*;
#(
  parameter int unsigned P = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic                 wr_sel,    // 0: L, 1: R
  input  logic [$clog2(P)-1:0] wr_row,
  input  logic [$clog2(P)-1:0] wr_col,
  input  sample_t              wr_data,
  output sample_t              l_o [P][P],
  output sample_t              r_o [P][P]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < P; i++)
        for (int j = 0; j < P; j++) begin
          l_o[i][j] <= '0;
          r_o[i][j] <= '0;
        end
    end else if (wr_en) begin
      if (wr_sel) r_o[wr_row][wr_col] <= wr_data;
      else        l_o[wr_row][wr_col] <= wr_data;
    end
  end

endmodule
