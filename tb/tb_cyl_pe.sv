// tb_cyl_pe: self-checking test of one cylindrical-type node.
// Random tokens of all four tags, random transversal inputs and occasional
// coefficient loads. A reference node in the testbench implements the two
// operating forms (y_s = y_e + l x_e; V = V + y_e x_e) with its own fixed-point
// arithmetic; outputs and memory are compared after every clock. The number
// of clocks spent in each form is counted and each must occur.
module tb_cyl_pe;
  import ctp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, load_en;
  lng_t lng_i, lng_o;
  sample_t y_i, y_o, mem_o, load_val;
  int e_mem, e_y, e_x, e_tag;
  int n_lu = 0, n_first = 0, n_acc = 0, n_load = 0;
  int checks = 0, failures = 0;

  cyl_pe dut (.clk(clk), .rst_n(rst_n), .lng_i(lng_i), .y_i(y_i), .load_en(load_en),
              .load_val(load_val), .lng_o(lng_o), .y_o(y_o), .mem_o(mem_o));

  function automatic int wrap16(int v);
    logic signed [15:0] t;
    t = v[15:0];
    return int'(t);
  endfunction
  function automatic int fxm(int a, int b);
    return wrap16((a * b) >>> 12);
  endfunction

  initial begin
    rst_n = 1'b0; load_en = 1'b0; load_val = '0; y_i = '0;
    lng_i = '{tag: TAG_IDLE, x: '0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    e_mem = 0; e_y = 0; e_x = 0; e_tag = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load_en  = (i == 0) || ($urandom_range(0, 7) == 0);
      load_val = sample_t'($signed($urandom) % 8192);
      y_i      = sample_t'($signed($urandom) % 8192);
      lng_i    = '{tag: tag_t'($urandom_range(0, 3)), x: sample_t'($signed($urandom) % 8192)};
      // reference
      e_x   = int'(lng_i.x);
      e_tag = int'(lng_i.tag);
      case (lng_i.tag)
        TAG_LU:        begin e_y = wrap16(int'(y_i) + fxm(e_mem, int'(lng_i.x))); n_lu++; end
        TAG_ACC_FIRST: begin e_y = int'(y_i); e_mem = fxm(int'(y_i), int'(lng_i.x)); n_first++; end
        TAG_ACC:       begin e_y = int'(y_i); e_mem = wrap16(e_mem + fxm(int'(y_i), int'(lng_i.x))); n_acc++; end
        default:       e_y = int'(y_i);
      endcase
      if (load_en) begin e_mem = int'(load_val); n_load++; end
      @(posedge clk);
      #1;
      checks += 3;
      if (int'(y_o) != e_y) begin failures++; $display("FAIL y %0d: %0d exp %0d", i, y_o, e_y); end
      if (int'(mem_o) != e_mem) begin failures++; $display("FAIL mem %0d: %0d exp %0d", i, mem_o, e_mem); end
      if (int'(lng_o.x) != e_x || int'(lng_o.tag) != e_tag) begin failures++; $display("FAIL lng %0d", i); end
    end
    checks += 4;
    if (n_lu == 0 || n_first == 0 || n_acc == 0 || n_load == 0) failures++;
    $display("first-wave clocks=%0d acc-first=%0d acc=%0d loads=%0d", n_lu, n_first, n_acc, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
