// ctp_seq: sequencer of the cylindrical CTP filter, one input sample per
// frame.
//
// A frame starts when an input sample is accepted (e_valid && e_ready). At
// that clock edge the node memories are loaded with L (load_en) and the
// sample enters the state matrix. The frame then lasts FRAME = 3P clocks,
// counted by k:
//   k = 0 .. P-1    first wave front: column c is fed row c of U, tag TAG_LU;
//                   the top transversal inputs receive zeros (fb_sel = 0);
//   k = P .. 2P-1   second wave front: column c is fed column c of R
//                   (TAG_ACC_FIRST on the first element, TAG_ACC after), and
//                   the array is switched so that the rows of LU leaving the
//                   bottom re-enter at the top (fb_sel = 1);
//   k = 2P .. 3P-1  the last rows finish accumulating; at k = 3P-1 every
//                   V[i][j] is valid and collect gathers them.
// e_ready is high when idle and in the last clock of a frame, so frames can
// follow each other without a gap: one output sample every 3P clocks. y_valid
// is high for one clock, the clock after collect, when y is valid. If e_valid
// is low the array waits idle, holding its results.
//
// The order of the sequences follows the document; the frame length is this
// design's. The document counts p + q steps for a 2 x 2 example, charging no
// time for carrying the LU rows from the bottom back to the top, for the
// skew of the second wave front down the array, or for the collection; with
// every node registered on both paths this design needs 2P + P clocks
// (p = q = P).
module ctp_seq
  import ctp_pkg::*;
#(
  parameter int unsigned P = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    e_valid,
  output logic    e_ready,
  output logic    accept,        // a sample is taken this clock
  input  sample_t s_i [P][P],    // state matrix U
  input  sample_t r_i [P][P],    // coefficient matrix R
  output lng_t    top_o [P],     // longitudinal inputs of the array
  output logic    fb_sel,
  output logic    load_en,
  output logic    collect,
  output logic    y_valid,
  output logic    busy
);

  localparam int unsigned FRAME = 3 * P;
  localparam int unsigned KW    = $clog2(FRAME);

  logic [KW-1:0] k;

  always_comb begin
    collect = busy && (k == KW'(FRAME - 1));
    e_ready = !busy || collect;
    accept  = e_valid && e_ready;
    load_en = accept;
    fb_sel  = busy && (k >= KW'(P)) && (k < KW'(2 * P));
    for (int c = 0; c < P; c++) begin
      top_o[c] = '{tag: TAG_IDLE, x: '0};
      for (int t = 0; t < P; t++) begin
        if (busy && k == KW'(t)) begin
          top_o[c] = '{tag: TAG_LU, x: s_i[c][t]};
        end else if (busy && k == KW'(P + t)) begin
          top_o[c] = '{tag: (t == 0) ? TAG_ACC_FIRST : TAG_ACC, x: r_i[t][c]};
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      k       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= collect;
      if (accept) begin
        busy <= 1'b1;
        k    <= '0;
      end else if (collect) begin
        busy <= 1'b0;
        k    <= '0;
      end else if (busy) begin
        k <= k + 1'b1;
      end
    end
  end

endmodule
