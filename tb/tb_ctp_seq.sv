// tb_ctp_seq: self-checking test of the frame sequencer (P = 2).
// e_valid is driven randomly, so frames run back to back and with idle gaps.
// Every clock the testbench derives from the number of clocks since the last
// accepted sample what the array must be fed (row c of U with TAG_LU for
// P clocks, then column c of R with TAG_ACC_FIRST / TAG_ACC for P clocks,
// then idle), when the feedback switch is set, when collect, e_ready and
// y_valid are high, and compares. It also checks that consecutive output
// samples are exactly 3P clocks apart when input is always available, and
// that y_valid follows the accepted sample by 3P + 1 clocks.
module tb_ctp_seq;
  import ctp_pkg::*;
  localparam int unsigned P = 2;
  localparam int FRAME = 3 * P;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, e_valid, e_ready, accept, fb_sel, load_en, collect, y_valid, busy;
  sample_t s_i [P][P];
  sample_t r_i [P][P];
  lng_t top [P];
  int acc_q [$];
  int since;           // clocks since the last accepted sample, 0 = none running
  int last_acc_cyc, last_y_cyc, cyc;
  int n_b2b = 0, n_stall = 0, n_frames = 0;
  int checks = 0, failures = 0;
  lng_t exp_top;
  logic exp_coll, exp_ready, exp_fb, exp_yv;

  ctp_seq #(.P(P)) dut (.clk(clk), .rst_n(rst_n), .e_valid(e_valid), .e_ready(e_ready),
                        .accept(accept), .s_i(s_i), .r_i(r_i), .top_o(top), .fb_sel(fb_sel),
                        .load_en(load_en), .collect(collect), .y_valid(y_valid), .busy(busy));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d since %0d: %s", cyc, since, what); end
  endtask

  initial begin
    rst_n = 1'b0; e_valid = 1'b0;
    for (int i = 0; i < P; i++) for (int j = 0; j < P; j++) begin
      s_i[i][j] = sample_t'(16 * i + j + 1);
      r_i[i][j] = sample_t'(256 + 16 * i + j);
    end
    since = 0; cyc = 0; last_acc_cyc = -1; last_y_cyc = -1;
    exp_yv = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      cyc++;
      // phase 1: always high for a while (back to back), then random
      e_valid = (n < 300) ? 1'b1 : ($urandom_range(0, 3) == 0);
      for (int i = 0; i < P; i++) for (int j = 0; j < P; j++) begin
        s_i[i][j] = sample_t'($urandom);
        r_i[i][j] = sample_t'($urandom);
      end
      #1;
      exp_coll  = (since == FRAME);
      exp_ready = (since == 0) || exp_coll;
      exp_fb    = (since > P) && (since <= 2 * P);
      chk(collect == exp_coll, "collect");
      chk(e_ready == exp_ready, "e_ready");
      chk(accept == (e_valid && exp_ready), "accept");
      chk(load_en == accept, "load_en");
      chk(fb_sel == exp_fb, "fb_sel");
      chk(busy == (since != 0), "busy");
      chk(y_valid == exp_yv, "y_valid");
      for (int c = 0; c < P; c++) begin
        if (since >= 1 && since <= P)
          exp_top = '{tag: TAG_LU, x: s_i[c][since - 1]};
        else if (since > P && since <= 2 * P)
          exp_top = '{tag: (since == P + 1) ? TAG_ACC_FIRST : TAG_ACC, x: r_i[since - P - 1][c]};
        else
          exp_top = '{tag: TAG_IDLE, x: '0};
        chk(top[c] == exp_top, "top stream");
      end
      if (y_valid) begin
        n_frames++;
        chk(acc_q.size() > 0 && cyc - acc_q.pop_front() == FRAME + 1, "latency");
        if (n < 300 && last_y_cyc >= 0) chk(cyc - last_y_cyc == FRAME, "back-to-back period");
        last_y_cyc = cyc;
      end
      if (busy == 1'b0 && !e_valid) n_stall++;
      if (accept && collect) n_b2b++;
      // advance the reference
      exp_yv = exp_coll;
      if (e_valid && exp_ready) begin since = 1; last_acc_cyc = cyc; acc_q.push_back(cyc); end
      else if (exp_coll)        since = 0;
      else if (since != 0)      since++;
    end
    chk(n_b2b > 0 && n_stall > 0 && n_frames > 0, "mechanisms seen");
    $display("frames=%0d back-to-back=%0d idle-waits=%0d", n_frames, n_b2b, n_stall);
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
