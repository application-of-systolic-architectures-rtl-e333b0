// cyl_array: P x P cylindrical systolic array computing V = L U R.
//
// Node (r, c) (row r from the top, column c from the left, both from 0) holds
// the coefficient l[(c-r) mod P][c] and, after the second wave front, the
// result V[(c-r) mod P][c]. The top row thus holds the diagonal of L, and
// each column c holds column c of L. This follows the node labels of the
// document's 2 x 2 example (top row l11, l22; bottom row l21, l12) and
// extends it to P x P.
//
// Paths:
//   longitudinal: node (r-1, c) -> node (r, c); column c is fed at the top by
//                 top_i[c] (row c of U, then column c of R);
//   transversal:  node (r-1, (c-1) mod P) -> node (r, c), a diagonal that
//                 wraps around the cylinder; the bottom node (P-1, c-1) feeds
//                 the top node (0, c) when fb_sel is 1 and a zero enters it
//                 when fb_sel is 0.
// fb_sel is the dynamic reconfiguration switch: it is 0 during the first wave
// front (the rows of LU are formed and leave at the bottom) and 1 from the
// P-th step on, when those rows return to the top transversal inputs and meet
// the columns of R.
//
// Timing: every node is one clock deep on both paths. If row c of U enters
// column c in clocks 0..P-1 and column c of R in clocks P..2P-1 (tag
// TAG_ACC_FIRST on the first), all P*P results are in the node memories at
// clock 3P-1. l_i loads every node memory in one clock when load_en is 1.
module cyl_array
  import ctp_pkg::*;
#(
  parameter int unsigned P = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  lng_t    top_i   [P],     // longitudinal inputs, one per column
  input  logic    fb_sel,          // 1: bottom transversal outputs fed back
  input  logic    load_en,         // load L into the node memories
  input  sample_t l_i     [P][P],  // L in matrix order, l_i[i][k]
  output sample_t node_mem_o [P][P], // node memories in node order [r][c]
  output sample_t bot_y_o [P]      // transversal outputs of the bottom row
);

  lng_t    lng_out [P][P];
  sample_t y_out   [P][P];

  for (genvar r = 0; r < P; r++) begin : g_row
    for (genvar c = 0; c < P; c++) begin : g_col
      localparam int unsigned CM1 = (c + P - 1) % P;   // column to the left, wrapped
      localparam int unsigned LI  = (c + P - r) % P;   // row of L held by this node

      lng_t    lng_in;
      sample_t y_in;

      if (r == 0) begin : g_top
        always_comb begin
          lng_in = top_i[c];
          y_in   = fb_sel ? y_out[P-1][CM1] : '0;
        end
      end else begin : g_inner
        always_comb begin
          lng_in = lng_out[r-1][c];
          y_in   = y_out[r-1][CM1];
        end
      end

      cyl_pe u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .lng_i    (lng_in),
        .y_i      (y_in),
        .load_en  (load_en),
        .load_val (l_i[LI][c]),
        .lng_o    (lng_out[r][c]),
        .y_o      (y_out[r][c]),
        .mem_o    (node_mem_o[r][c])
      );
    end
  end

  for (genvar c = 0; c < P; c++) begin : g_bot
    assign bot_y_o[c] = y_out[P-1][c];
  end

endmodule
