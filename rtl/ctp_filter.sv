// ctp_filter: state-space recursive filter on a cylindrical systolic array
// using a one-term CTP (Kronecker) decomposition of its state matrix.
//
// The filter x(n+1) = A x(n) + B e(n), y(n) = C x(n) + D e(n) of order N-1
// (N = P*P) is written as v = H u with H = [A B; C D], u = [x(n); e(n)],
// v = [x(n+1); y(n)]. If H = R^T (x) L (Kronecker product of two P x P
// matrices), folding u column by column into a P x P matrix U gives the
// folded v as V = L U R. A P x P cylindrical array (cyl_array) forms L U in
// a first wave front, is switched, and forms (L U) R in a second one; the
// collection network (ctp_collect) turns V into the next U and the output
// y(n); ctp_seq runs one sample per frame of 3P clocks; ctp_coef_store holds
// L and R. The Kronecker ordering H = R^T (x) L is what makes vec(L U R)
// equal H vec(U); the document calls H "the tensor product of L and R".
//
// Interface: coefficients are written with cfg_we/cfg_sel/cfg_row/cfg_col/
// cfg_data (cfg_sel 0: L, 1: R), at any time; they are used from the next
// frame on. An input sample is taken when e_valid && e_ready; y_data is
// valid while y_valid is high, 3P+1 clocks after the sample was taken.
// state_o gives x(n+1) (state_o[i] = x_{i+1}) once y_valid has been seen,
// until the next collect. Numbers follow ctp_pkg (Q3.12, wrapping).
//
// Beside the filter, and not connected to it, sit the switched-capacitor
// element (sc_element, a behavioural model with real-valued voltages) and its
// switch clock generator (sc_clkgen): the document proposes building the
// processing elements from such elements, while this RTL builds them from
// digital logic. Their ports are brought out with the prefix sc_.
module ctp_filter
  import ctp_pkg::*;
#(
  parameter int unsigned P = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // coefficient port
  input  logic                 cfg_we,
  input  logic                 cfg_sel,
  input  logic [$clog2(P)-1:0] cfg_row,
  input  logic [$clog2(P)-1:0] cfg_col,
  input  sample_t              cfg_data,
  // input samples e(n)
  input  logic                 e_valid,
  output logic                 e_ready,
  input  sample_t              e_data,
  // output samples y(n) and states x(n+1)
  output logic                 y_valid,
  output sample_t              y_data,
  output sample_t              state_o [P*P-1],
  output logic                 busy,
  // switched-capacitor element and its switch clocks (stand beside the filter)
  input  real                  sc_v1,
  input  real                  sc_v2,
  output logic                 sc_phi1,
  output logic                 sc_phi2,
  output real                  sc_vc,
  output real                  sc_q
);

  sample_t l_m [P][P];
  sample_t r_m [P][P];
  sample_t s_m [P][P];
  sample_t node_mem [P][P];
  lng_t    top [P];
  logic    fb_sel, load_en, collect, accept;

  ctp_coef_store #(.P(P)) u_coef (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (cfg_we),
    .wr_sel  (cfg_sel),
    .wr_row  (cfg_row),
    .wr_col  (cfg_col),
    .wr_data (cfg_data),
    .l_o     (l_m),
    .r_o     (r_m)
  );

  ctp_seq #(.P(P)) u_seq (
    .clk     (clk),
    .rst_n   (rst_n),
    .e_valid (e_valid),
    .e_ready (e_ready),
    .accept  (accept),
    .s_i     (s_m),
    .r_i     (r_m),
    .top_o   (top),
    .fb_sel  (fb_sel),
    .load_en (load_en),
    .collect (collect),
    .y_valid (y_valid),
    .busy    (busy)
  );

  cyl_array #(.P(P)) u_array (
    .clk        (clk),
    .rst_n      (rst_n),
    .top_i      (top),
    .fb_sel     (fb_sel),
    .load_en    (load_en),
    .l_i        (l_m),
    .node_mem_o (node_mem),
    .bot_y_o    ()
  );

  ctp_collect #(.P(P)) u_collect (
    .clk        (clk),
    .rst_n      (rst_n),
    .node_mem_i (node_mem),
    .collect    (collect),
    .accept     (accept),
    .e_i        (e_data),
    .s_o        (s_m),
    .y_o        (y_data)
  );

  // Switched-capacitor basic element, the circuit from which the document
  // builds its analogue processing elements, with its two-phase clocks
  // derived from clk (period 8 clocks). It does not take part in the digital
  // datapath above.
  sc_clkgen u_sc_clk (
    .clk   (clk),
    .rst_n (rst_n),
    .phi1  (sc_phi1),
    .phi2  (sc_phi2)
  );

  sc_element u_sc (
    .v1     (sc_v1),
    .v2     (sc_v2),
    .phi1   (sc_phi1),
    .phi2   (sc_phi2),
    .vc     (sc_vc),
    .q_o    (sc_q),
    .r_eq_o ()
  );

  // x(n+1): u is U read column by column, without its last entry e.
  for (genvar n = 0; n < P*P-1; n++) begin : g_state
    assign state_o[n] = s_m[n % P][n / P];
  end

endmodule
