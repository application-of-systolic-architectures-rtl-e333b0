// tb_ctp_collect: self-checking test of the collection network.
// Fills the node memories with random values and checks that collect
// gathers node (r, c) into S[(c-r) mod P][c] and y = S[P-1][P-1], that accept
// writes e into S[P-1][P-1] (and wins when both happen together), and that S
// holds otherwise. Run at P = 3 so that the skewed placement is not its own
// inverse.
module tb_ctp_collect;
  import ctp_pkg::*;
  localparam int unsigned P = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, collect, accept;
  sample_t node_mem [P][P];
  sample_t s_o [P][P];
  sample_t e_i, y_o;
  int eS [P][P];
  int eY;
  int n_both = 0;
  int checks = 0, failures = 0;

  ctp_collect #(.P(P)) dut (.clk(clk), .rst_n(rst_n), .node_mem_i(node_mem), .collect(collect),
                            .accept(accept), .e_i(e_i), .s_o(s_o), .y_o(y_o));

  initial begin
    rst_n = 1'b0; collect = 1'b0; accept = 1'b0; e_i = '0;
    for (int r = 0; r < P; r++) for (int c = 0; c < P; c++) begin node_mem[r][c] = '0; eS[r][c] = 0; end
    eY = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      for (int r = 0; r < P; r++) for (int c = 0; c < P; c++) node_mem[r][c] = sample_t'($urandom);
      collect = ($urandom_range(0, 2) == 0);
      accept  = ($urandom_range(0, 2) == 0);
      e_i     = sample_t'($urandom);
      if (collect && accept) n_both++;
      if (collect) begin
        // V[i][j] lives in node ((j - i) mod P, j)
        for (int i = 0; i < P; i++)
          for (int j = 0; j < P; j++) eS[i][j] = int'(node_mem[(j - i + P) % P][j]);
        eY = eS[P-1][P-1];
      end
      if (accept) eS[P-1][P-1] = int'(e_i);
      @(posedge clk);
      #1;
      for (int i = 0; i < P; i++)
        for (int j = 0; j < P; j++) begin
          checks++;
          if (int'(s_o[i][j]) != eS[i][j]) begin failures++; $display("FAIL S[%0d][%0d] n=%0d", i, j, n); end
        end
      checks++;
      if (int'(y_o) != eY) begin failures++; $display("FAIL y n=%0d", n); end
    end
    checks++;
    if (n_both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
