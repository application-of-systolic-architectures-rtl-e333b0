// tb_pe_muladd: self-checking test of the node multiplier/adder.
// Drives corner values and random operands and compares sum_o with a
// reference formed in 32-bit integers: floor(a*b / 2^12) wrapped to 16 bits,
// plus the addend, wrapped to 16 bits.
module tb_pe_muladd;
  import ctp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  sample_t add, a, b, sum;
  int checks = 0, failures = 0;

  pe_muladd dut (.add_i(add), .a_i(a), .b_i(b), .sum_o(sum));

  function automatic int wrap16(int v);
    logic signed [15:0] t;
    t = v[15:0];
    return int'(t);
  endfunction

  function automatic int ref_sum(int ad, int aa, int bb);
    int p;
    p = aa * bb;
    p = p >>> 12;
    return wrap16(ad + wrap16(p));
  endfunction

  task automatic check(int ad, int aa, int bb);
    add = sample_t'(ad); a = sample_t'(aa); b = sample_t'(bb);
    @(posedge clk);
    checks++;
    if (int'(sum) != ref_sum(int'(add), int'(a), int'(b))) begin
      failures++;
      $display("FAIL add=%0d a=%0d b=%0d sum=%0d exp=%0d", add, a, b, sum,
               ref_sum(int'(add), int'(a), int'(b)));
    end
  endtask

  initial begin
    // 1.0 * 1.0 + 0 = 1.0 ; 0.5 * -0.5 + 0.25 = 0 ; -1 * -1 = 1
    check(0, 4096, 4096);
    if (sum != 16'sd4096) begin failures++; $display("FAIL 1*1"); end
    checks++;
    check(1024, 2048, -2048);
    if (sum != 16'sd0) begin failures++; $display("FAIL 0.25+0.5*-0.5"); end
    checks++;
    check(0, -4096, -4096);
    check(32767, 4096, 1);           // wraps
    check(-32768, -32768, -32768);
    for (int i = 0; i < 2000; i++)
      check($signed($urandom) % 32768, $signed($urandom) % 32768, $signed($urandom) % 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
