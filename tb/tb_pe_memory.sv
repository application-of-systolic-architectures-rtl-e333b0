// tb_pe_memory: self-checking test of the memorisation register.
// Random load / write requests; a reference register in the testbench
// (load has priority over write, otherwise hold) is compared every clock.
module tb_pe_memory;
  import ctp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, load_en, wr_en;
  sample_t load_val, wr_val, q;
  int exp_q;
  int checks = 0, failures = 0;

  pe_memory dut (.clk(clk), .rst_n(rst_n), .load_en(load_en), .load_val(load_val),
                 .wr_en(wr_en), .wr_val(wr_val), .q_o(q));

  initial begin
    rst_n = 1'b0; load_en = 1'b0; wr_en = 1'b0; load_val = '0; wr_val = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q != 0) begin failures++; $display("FAIL reset"); end
    exp_q = 0;
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load_en  = ($urandom_range(0, 3) == 0);
      wr_en    = ($urandom_range(0, 2) == 0);
      load_val = sample_t'($urandom);
      wr_val   = sample_t'($urandom);
      if (load_en)    exp_q = int'(load_val);
      else if (wr_en) exp_q = int'(wr_val);
      @(posedge clk);
      #1;
      checks++;
      if (int'(q) != exp_q) begin failures++; $display("FAIL %0d q=%0d exp=%0d", i, q, exp_q); end
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
