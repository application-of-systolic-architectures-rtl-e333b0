// cyl_pe: cylindrical-type processing element (node) of the CTP array.
//
// A node is built, as the document draws it, from a multiplier/adder
// (pe_muladd), a one time-unit delay for the longitudinal path (pe_delay) and
// a memorisation register (pe_memory). It has two operating forms, selected
// by the tag of the longitudinal token that arrives:
//   first wave front  (TAG_LU):  y_s = y_e + l_ij * x_e,  x_s = x_e
//   second wave front (TAG_ACC*): y_s = y_e, x_s = x_e,
//                                 V_ij = V_ij + y_e * x_e  (V_ij = y_e * x_e
//                                 for TAG_ACC_FIRST)
// With TAG_IDLE the node passes both inputs on and keeps its memory.
//
// Timing: both outputs are registered, so a node adds one clock of delay on
// the longitudinal and on the transversal path; the memory is written at the
// same edge. Registering the transversal output as well is this design's
// choice (the document gives a one time-unit delay only for the longitudinal
// path; the transversal sum is treated as the sampled output of the
// multiplier/adder). load_en loads l_ij into the memory and wins over an
// accumulation in the same cycle.
module cyl_pe
  import ctp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  lng_t    lng_i,     // longitudinal input (x_e and tag)
  input  sample_t y_i,       // transversal input y_e
  input  logic    load_en,   // load coefficient l_ij
  input  sample_t load_val,
  output lng_t    lng_o,     // longitudinal output (x_s), one clock later
  output sample_t y_o,       // transversal output y_s, one clock later
  output sample_t mem_o      // memorised l_ij or V_ij
);

  logic    acc_mode;
  sample_t mac_add, mac_a, mac_sum;

  always_comb begin
    acc_mode = (lng_i.tag == TAG_ACC_FIRST) || (lng_i.tag == TAG_ACC);
    if (acc_mode) begin
      // V_ij (+)= (LU)_ik * r_kj
      mac_add = (lng_i.tag == TAG_ACC_FIRST) ? '0 : mem_o;
      mac_a   = y_i;
    end else begin
      // y_s = y_e + l_ij * x_e
      mac_add = y_i;
      mac_a   = mem_o;
    end
  end

  pe_muladd u_mac (
    .add_i (mac_add),
    .a_i   (mac_a),
    .b_i   (lng_i.x),
    .sum_o (mac_sum)
  );

  pe_delay u_delay (
    .clk   (clk),
    .rst_n (rst_n),
    .d_i   (lng_i),
    .q_o   (lng_o)
  );

  pe_memory u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .load_en  (load_en),
    .load_val (load_val),
    .wr_en    (acc_mode),
    .wr_val   (mac_sum),
    .q_o      (mem_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    y_o <= '0;
    else if (lng_i.tag == TAG_LU)  y_o <= mac_sum;
    else                           y_o <= y_i;
  end

endmodule
