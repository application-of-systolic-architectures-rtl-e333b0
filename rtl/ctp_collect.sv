// ctp_collect: collection network and state register of the CTP filter.
//
// The nodes hold V = L U R in a skewed placement: V[i][j] sits in node
// (r, c) = ((j-i) mod P, j). At the end of a sample (collect = 1) this block
// gathers every V[i][j] into the state matrix S in matrix order and latches
// the output sample y(n) = V[P-1][P-1]. The other entries of V are the next
// states x(n+1), which the document reuses directly as the array's next
// input. When a new input sample is accepted (accept = 1) it is written to
// S[P-1][P-1], where e(n) sits in U; if both happen in the same clock the new
// sample wins that slot. S is the matrix U of the next wave front: column j
// of U is u[j*P .. j*P+P-1] (u = [x(n); e(n)]). A parallel gather in one
// clock is this design's choice; the document only says that a separate
// collection network may pipe the results out. Reset clears the state to
// zero, i.e. the filter starts from rest.
module ctp_collect
  import ctp_pkg::*;
#(
  parameter int unsigned P = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t node_mem_i [P][P],  // node memories, node order [r][c]
  input  logic    collect,
  input  logic    accept,
  input  sample_t e_i,
  output sample_t s_o [P][P],         // state matrix U, matrix order [i][j]
  output sample_t y_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < P; i++)
        for (int j = 0; j < P; j++) s_o[i][j] <= '0;
      y_o <= '0;
    end else begin
      if (collect) begin
        for (int i = 0; i < P; i++)
          for (int j = 0; j < P; j++)
            s_o[i][j] <= node_mem_i[(j + P - i) % P][j];
        y_o <= node_mem_i[0][P-1];   // V[P-1][P-1] sits in node (0, P-1)
      end
      if (accept) s_o[P-1][P-1] <= e_i;
    end
  end

endmodule
