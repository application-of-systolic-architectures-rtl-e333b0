// tb_pe_delay: self-checking test of the one time-unit delay.
// Checks the reset value and that every random token (tag and value)
// reappears at the output exactly one clock later.
module tb_pe_delay;
  import ctp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  lng_t d, q, prev;
  int checks = 0, failures = 0;

  pe_delay dut (.clk(clk), .rst_n(rst_n), .d_i(d), .q_o(q));

  initial begin
    rst_n = 1'b0;
    d = '{tag: TAG_LU, x: 16'sd123};
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q.tag != TAG_IDLE || q.x != 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      prev = '{tag: tag_t'($urandom_range(0, 3)), x: sample_t'($urandom)};
      d = prev;
      @(posedge clk);
      #1;
      checks++;
      if (q != prev) begin failures++; $display("FAIL cycle %0d", i); end
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
