// ctp_pkg: types and arithmetic shared by the cylindrical CTP filter.
//
// Samples, states and coefficients are signed two's-complement fixed-point
// numbers of DATA_W bits with FRAC_W fraction bits (Q3.12 by default, so
// coefficients lie in [-8, 8)). A product is formed at full width, shifted
// right arithmetically by FRAC_W (truncation towards minus infinity) and
// wrapped back to DATA_W bits; sums wrap as well. The word length, format and
// rounding are this design's choice; the source circuits are analogue
// (switched-capacitor) and carry no word length.
//
// Each value that travels down a column of the array (a longitudinal path)
// carries a tag that tells the node which of its two operating forms applies
// to it. The mode switch therefore moves down the array together with the
// data, one row per clock.
package ctp_pkg;

  parameter int unsigned DATA_W = 16;
  parameter int unsigned FRAC_W = 12;

  typedef logic signed [DATA_W-1:0] sample_t;

  // Tag of a longitudinal token.
  //   TAG_IDLE      : no data, node passes everything on and keeps its memory
  //   TAG_LU        : first wave front, y_s = y_e + l * x_e
  //   TAG_ACC_FIRST : first term of the second wave front, V = y_e * x_e
  //   TAG_ACC       : later terms of the second wave front, V = V + y_e * x_e
  typedef enum logic [1:0] {
    TAG_IDLE      = 2'd0,
    TAG_LU        = 2'd1,
    TAG_ACC_FIRST = 2'd2,
    TAG_ACC       = 2'd3
  } tag_t;

  // Token on a longitudinal path.
  typedef struct packed {
    tag_t    tag;
    sample_t x;
  } lng_t;

  // Fixed-point product, truncated and wrapped to DATA_W bits.
  function automatic sample_t fx_mul(sample_t a, sample_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return sample_t'(p >>> FRAC_W);
  endfunction

endpackage
