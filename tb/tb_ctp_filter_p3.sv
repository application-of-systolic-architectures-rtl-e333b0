// tb_ctp_filter_p3: end-to-end test of the CTP recursive filter at P = 3
// (an eighth-order filter, N = 9 state-space entries), the same test as
// tb_ctp_filter at the next size up.
//
// Random L and R (entries below 0.25 in magnitude, so the filter is stable)
// are written through the coefficient port and a random input sequence is
// filtered. Each output y(n) and state x(n+1) is checked two ways:
//   - exactly, against the same recursion done here in fixed point as two
//     matrix products, LU then (LU)R, with the design's truncation rule;
//   - approximately (0.02), against the real-valued state-space filter with
//     H = R^T (x) L, i.e. x(n+1) = A x(n) + B e(n), y(n) = C x(n) + D e(n).
// Half-way the coefficients are rewritten between frames. Input is offered
// back to back at first and with random gaps later. The clocks between
// outputs (3P when back to back) and from accepted input to output (3P + 1)
// are checked. Each mechanism must occur at least once: back-to-back frames,
// idle waits for input, the feedback switch of the array, coefficient
// reloads into the nodes, and coefficient rewrites. The switched-capacitor
// element beside the filter must move C (V1 - V2) each switching period.
module tb_ctp_filter_p3;
  import ctp_pkg::*;
  localparam int unsigned P = 3;
  localparam int N = P * P;
  localparam int FRAME = 3 * P;
  localparam int NSAMP = 300;
  localparam int CMAX = 1024;     // coefficient bound, 0.25 in Q3.12

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, cfg_we, cfg_sel, e_valid, e_ready, y_valid, busy;
  logic [$clog2(P)-1:0] cfg_row, cfg_col;
  sample_t cfg_data, e_data, y_data;
  sample_t state_o [N-1];
  real sc_v1 = 1.5, sc_v2 = 0.5, sc_vc, sc_q;
  logic sc_phi1, sc_phi2;
  int n_sc = 0;

  ctp_filter #(.P(3)) dut (.clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_sel(cfg_sel),
                  .cfg_row(cfg_row), .cfg_col(cfg_col), .cfg_data(cfg_data),
                  .e_valid(e_valid), .e_ready(e_ready), .e_data(e_data),
                  .y_valid(y_valid), .y_data(y_data), .state_o(state_o), .busy(busy),
                  .sc_v1(sc_v1), .sc_v2(sc_v2), .sc_phi1(sc_phi1), .sc_phi2(sc_phi2),
                  .sc_vc(sc_vc), .sc_q(sc_q));

  // switched-capacitor element beside the filter: every period moves
  // C (V1 - V2) = 1 pC into V2
  always @(negedge sc_phi2) begin
    #1;
    n_sc++;
    if (rst_n && n_sc > 2) checks++;
    if (rst_n && n_sc > 2 && (sc_q < 0.999e-12 || sc_q > 1.001e-12)) begin
      failures++;
      $display("FAIL SC charge per period %e", sc_q);
    end
  end

  int checks = 0, failures = 0;
  int L [P][P], R [P][P];
  int S [P][P];                 // fixed-point reference of U
  real xr [N];                  // real-valued reference of u = [x; e]
  int e_q [$];                  // accepted inputs waiting for their output
  int acc_cyc_q [$];
  int cyc = 0, last_y_cyc = -1, n_out = 0;
  int n_nonzero = 0;
  int n_b2b = 0, n_wait = 0, n_switch = 0, n_load = 0, n_rewrite = 0;
  logic fb_d = 1'b0;
  logic gaps = 1'b0;

  function automatic int wrap16(int v);
    logic signed [15:0] t;
    t = v[15:0];
    return int'(t);
  endfunction
  function automatic int fxm(int a, int b);
    return wrap16((a * b) >>> 12);
  endfunction
  function automatic real toreal(int v);
    return real'(v) / 4096.0;
  endfunction

  task automatic write_coefs();
    for (int sel = 0; sel < 2; sel++)
      for (int i = 0; i < P; i++)
        for (int j = 0; j < P; j++) begin
          @(negedge clk);
          cfg_we = 1'b1; cfg_sel = sel[0]; cfg_row = i[$clog2(P)-1:0]; cfg_col = j[$clog2(P)-1:0];
          cfg_data = sample_t'($signed($urandom) % CMAX);
          if (sel == 0) L[i][j] = int'(cfg_data); else R[i][j] = int'(cfg_data);
        end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // one step of both references for input e, returns nothing; compares outputs
  task automatic ref_step_and_check(int e);
    int LU [P][P];
    int V [P][P];
    real u [N];
    real v [N];
    S[P-1][P-1] = e;
    for (int i = 0; i < P; i++)
      for (int j = 0; j < P; j++) begin
        LU[i][j] = 0;
        for (int k = 0; k < P; k++) LU[i][j] = wrap16(LU[i][j] + fxm(L[i][k], S[k][j]));
      end
    for (int i = 0; i < P; i++)
      for (int j = 0; j < P; j++) begin
        V[i][j] = 0;
        for (int k = 0; k < P; k++) V[i][j] = wrap16(V[i][j] + fxm(LU[i][k], R[k][j]));
      end
    // real model: v = (R^T kron L) u, u = vec(U)
    for (int n = 0; n < N; n++) u[n] = xr[n];
    u[N-1] = toreal(e);
    for (int row = 0; row < N; row++) begin
      v[row] = 0.0;
      for (int col = 0; col < N; col++)
        // H[(j*P+i)][(l*P+k)] = R[l][j] * L[i][k]
        v[row] += toreal(R[col / P][row / P]) * toreal(L[row % P][col % P]) * u[col];
    end
    // exact comparison
    checks++;
    if (int'(y_data) != V[P-1][P-1]) begin
      failures++;
      $display("FAIL y(%0d)=%0d exp %0d", n_out, y_data, V[P-1][P-1]);
    end
    for (int n = 0; n < N - 1; n++) begin
      checks++;
      if (int'(state_o[n]) != V[n % P][n / P]) begin
        failures++;
        $display("FAIL x%0d(%0d)=%0d exp %0d", n + 1, n_out + 1, state_o[n], V[n % P][n / P]);
      end
    end
    // real-valued comparison
    checks++;
    if ((toreal(int'(y_data)) - v[N-1]) > 0.02 || (v[N-1] - toreal(int'(y_data))) > 0.02) begin
      failures++;
      $display("FAIL y(%0d)=%f real model %f", n_out, toreal(int'(y_data)), v[N-1]);
    end
    for (int i = 0; i < P; i++) for (int j = 0; j < P; j++) S[i][j] = V[i][j];
    for (int n = 0; n < N; n++) xr[n] = v[n];
  endtask

  // input driver
  initial begin
    rst_n = 1'b0; cfg_we = 1'b0; cfg_sel = 1'b0; cfg_row = '0; cfg_col = '0; cfg_data = '0;
    e_valid = 1'b0; e_data = '0;
    for (int i = 0; i < P; i++) for (int j = 0; j < P; j++) S[i][j] = 0;
    for (int n = 0; n < N; n++) xr[n] = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    write_coefs();
    for (int s = 0; s < NSAMP; s++) begin
      if (s == NSAMP / 2) begin
        // rewrite the coefficients between frames
        @(negedge clk);
        e_valid = 1'b0;
        wait (e_q.size() == 0 && !busy);
        write_coefs();
        n_rewrite++;
        gaps = 1'b1;
      end
      @(negedge clk);
      if (gaps) begin
        while ($urandom_range(0, 2) == 0) begin
          e_valid = 1'b0;
          @(negedge clk);
        end
      end
      e_valid = 1'b1;
      e_data = sample_t'($signed($urandom) % 4096);
      #1;
      while (!e_ready) begin @(negedge clk); #1; end
      e_q.push_back(int'(e_data));
      acc_cyc_q.push_back(cyc);
    end
    @(negedge clk);
    e_valid = 1'b0;
  end

  // monitor
  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (!busy && !e_valid) n_wait++;
      if (dut.u_seq.fb_sel && !fb_d) n_switch++;
      fb_d <= dut.u_seq.fb_sel;
      if (dut.u_seq.load_en) n_load++;
      if (dut.u_seq.accept && dut.u_seq.collect) n_b2b++;
      if (y_valid) begin
        int e, a;
        e = e_q.pop_front();
        a = acc_cyc_q.pop_front();
        ref_step_and_check(e);
        if (y_data != 0) n_nonzero++;
        checks++;
        if (cyc - a != FRAME + 1) begin
          failures++;
          $display("FAIL latency %0d clocks, expected %0d", cyc - a, FRAME + 1);
        end
        if (n_out > 0 && n_out < NSAMP / 2) begin
          checks++;
          if (cyc - last_y_cyc != FRAME) begin
            failures++;
            $display("FAIL output spacing %0d clocks, expected %0d", cyc - last_y_cyc, FRAME);
          end
        end
        last_y_cyc <= cyc;
        n_out++;
        if (n_out == NSAMP) begin
          checks += 7;
          if (n_sc == 0) begin failures++; $display("FAIL no SC switching period"); end
          if (n_nonzero < NSAMP / 2) begin failures++; $display("FAIL output mostly zero"); end
          if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back frame"); end
          if (n_wait == 0)    begin failures++; $display("FAIL no idle wait"); end
          if (n_switch == 0)  begin failures++; $display("FAIL no feedback switch"); end
          if (n_load == 0)    begin failures++; $display("FAIL no coefficient reload"); end
          if (n_rewrite == 0) begin failures++; $display("FAIL no coefficient rewrite"); end
          $display("samples=%0d back-to-back=%0d idle-wait-clocks=%0d feedback-switches=%0d node-reloads=%0d rewrites=%0d sc-periods=%0d",
                   n_out, n_b2b, n_wait, n_switch, n_load, n_rewrite, n_sc);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
