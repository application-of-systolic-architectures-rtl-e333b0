// cyl_array_check: test driver for a cyl_array of size P x P, used by
// tb_cyl_array. For a number of random L, U, R it loads L, streams the rows
// of U then the columns of R down the columns, switches the top transversal
// inputs to the fed-back bottom outputs from the P-th clock on, and checks
//   - the bottom transversal outputs carry the rows of LU at clocks P..2P-1,
//   - every node memory holds its element of V = L U R after 3P clocks,
// against matrix products computed here with the same fixed-point rule.
module cyl_array_check #(
  parameter int unsigned P = 2,
  parameter int unsigned TRIALS = 20
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  import ctp_pkg::*;

  logic    rst_n, fb_sel, load_en;
  lng_t    top [P];
  sample_t l_m [P][P];
  sample_t node_mem [P][P];
  sample_t bot_y [P];
  int L [P][P], U [P][P], R [P][P], LU [P][P], V [P][P];

  cyl_array #(.P(P)) dut (.clk(clk), .rst_n(rst_n), .top_i(top), .fb_sel(fb_sel),
                          .load_en(load_en), .l_i(l_m), .node_mem_o(node_mem),
                          .bot_y_o(bot_y));

  function automatic int wrap16(int v);
    logic signed [15:0] t;
    t = v[15:0];
    return int'(t);
  endfunction
  function automatic int fxm(int a, int b);
    return wrap16((a * b) >>> 12);
  endfunction

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    rst_n = 1'b0; fb_sel = 1'b0; load_en = 1'b0;
    for (int c = 0; c < P; c++) top[c] = '{tag: TAG_IDLE, x: '0};
    for (int i = 0; i < P; i++) for (int j = 0; j < P; j++) l_m[i][j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < TRIALS; trial++) begin
      for (int i = 0; i < P; i++)
        for (int j = 0; j < P; j++) begin
          L[i][j] = $signed($urandom) % 2048;
          U[i][j] = $signed($urandom) % 8192;
          R[i][j] = $signed($urandom) % 2048;
        end
      for (int i = 0; i < P; i++)
        for (int j = 0; j < P; j++) begin
          LU[i][j] = 0;
          for (int k = 0; k < P; k++) LU[i][j] = wrap16(LU[i][j] + fxm(L[i][k], U[k][j]));
        end
      for (int i = 0; i < P; i++)
        for (int j = 0; j < P; j++) begin
          V[i][j] = 0;
          for (int k = 0; k < P; k++) V[i][j] = wrap16(V[i][j] + fxm(LU[i][k], R[k][j]));
        end
      // load L
      @(negedge clk);
      for (int i = 0; i < P; i++) for (int j = 0; j < P; j++) l_m[i][j] = sample_t'(L[i][j]);
      load_en = 1'b1;
      for (int k = 0; k < 3 * P; k++) begin
        @(negedge clk);
        load_en = 1'b0;
        fb_sel = (k >= P) && (k < 2 * P);
        for (int c = 0; c < P; c++) begin
          if (k < P)          top[c] = '{tag: TAG_LU, x: sample_t'(U[c][k])};
          else if (k < 2 * P) top[c] = '{tag: (k == P) ? TAG_ACC_FIRST : TAG_ACC,
                                         x: sample_t'(R[k - P][c])};
          else                top[c] = '{tag: TAG_IDLE, x: '0};
        end
        if (k >= P && k < 2 * P)
          for (int c = 0; c < P; c++) begin
            checks++;
            if (int'(bot_y[c]) != LU[(c + 1) % P][k - P]) begin
              failures++;
              $display("FAIL P=%0d LU row %0d col %0d: %0d exp %0d", P, (c + 1) % P, k - P,
                       bot_y[c], LU[(c + 1) % P][k - P]);
            end
          end
      end
      @(negedge clk);
      fb_sel = 1'b0;
      for (int r = 0; r < P; r++)
        for (int c = 0; c < P; c++) begin
          checks++;
          if (int'(node_mem[r][c]) != V[(c + P - r) % P][c]) begin
            failures++;
            $display("FAIL P=%0d node (%0d,%0d): %0d exp V[%0d][%0d]=%0d", P, r, c,
                     node_mem[r][c], (c + P - r) % P, c, V[(c + P - r) % P][c]);
          end
        end
    end
    done = 1'b1;
  end
endmodule
