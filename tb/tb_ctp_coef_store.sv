// tb_ctp_coef_store: self-checking test of the L / R coefficient memory.
// Random writes to random elements of L or R; a reference copy in the
// testbench is compared with both parallel outputs after every write.
module tb_ctp_coef_store;
  import ctp_pkg::*;
  localparam int unsigned P = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, wr_en, wr_sel;
  logic [$clog2(P)-1:0] wr_row, wr_col;
  sample_t wr_data;
  sample_t l_o [P][P];
  sample_t r_o [P][P];
  int eL [P][P], eR [P][P];
  int checks = 0, failures = 0;

  ctp_coef_store #(.P(P)) dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_sel(wr_sel),
                               .wr_row(wr_row), .wr_col(wr_col), .wr_data(wr_data),
                               .l_o(l_o), .r_o(r_o));

  task automatic compare();
    for (int i = 0; i < P; i++)
      for (int j = 0; j < P; j++) begin
        checks += 2;
        if (int'(l_o[i][j]) != eL[i][j]) begin failures++; $display("FAIL L[%0d][%0d]", i, j); end
        if (int'(r_o[i][j]) != eR[i][j]) begin failures++; $display("FAIL R[%0d][%0d]", i, j); end
      end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; wr_sel = 1'b0; wr_row = '0; wr_col = '0; wr_data = '0;
    for (int i = 0; i < P; i++) for (int j = 0; j < P; j++) begin eL[i][j] = 0; eR[i][j] = 0; end
    repeat (2) @(posedge clk);
    #1 compare();
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      wr_en   = ($urandom_range(0, 3) != 0);
      wr_sel  = 1'($urandom);
      wr_row  = $urandom_range(0, P - 1);
      wr_col  = $urandom_range(0, P - 1);
      wr_data = sample_t'($urandom);
      if (wr_en) begin
        if (wr_sel) eR[wr_row][wr_col] = int'(wr_data);
        else        eL[wr_row][wr_col] = int'(wr_data);
      end
      @(posedge clk);
      #1 compare();
    end
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
