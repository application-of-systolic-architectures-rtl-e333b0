// pe_muladd: the multiplier/adder of a cylindrical-type processing element.
//
// Computes sum_o = add_i + a_i * b_i in the fixed-point format of ctp_pkg
// (the product is truncated to DATA_W bits before the addition, which wraps).
// In the first wave front the node uses it as y_s = y_e + l_ij * x_e; in the
// second it uses the same unit as V_ij = V_ij + (LU)_ik * r_kj. The operation
// comes from the document; one shared unit serving both forms follows its PE
// drawing, which shows a single multiplier/adder. Purely combinational.
module pe_muladd
  import ctp_pkg::*;
(
  input  sample_t add_i,
  input  sample_t a_i,
  input  sample_t b_i,
  output sample_t sum_o
);

  always_comb sum_o = add_i + fx_mul(a_i, b_i);

endmodule
