// Shared types and helpers for the dual-rail NULL Convention Logic (NCL) MAC.
//
// A dual-rail signal D is a pair of wires (D1, D0). DATA1 is (1,0), DATA0 is
// (0,1), NULL is (0,0); (1,1) is illegal. Vectors of dual-rail bits are packed
// arrays of dr_t. The helpers below are used by testbenches and by assertions;
// the logic itself is built from threshold gates (ncl_gate / ncl_thmn).
package ncl_pkg;

  typedef struct packed {
    logic r1;  // rail asserted for DATA1
    logic r0;  // rail asserted for DATA0
  } dr_t;

  localparam dr_t DR_NULL  = '{r1: 1'b0, r0: 1'b0};
  localparam dr_t DR_DATA0 = '{r1: 1'b0, r0: 1'b1};
  localparam dr_t DR_DATA1 = '{r1: 1'b1, r0: 1'b0};

  // Encode one Boolean bit as a DATA value.
  function automatic dr_t dr_enc(input logic b);
    return '{r1: b, r0: ~b};
  endfunction

  function automatic logic dr_is_data(input dr_t d);
    return d.r1 ^ d.r0;
  endfunction

  function automatic logic dr_is_null(input dr_t d);
    return ~(d.r1 | d.r0);
  endfunction

  function automatic logic dr_is_illegal(input dr_t d);
    return d.r1 & d.r0;
  endfunction

  // Rows left after one level of word-level 3:2 reduction of n rows: every
  // complete group of three rows becomes a sum and a carry row, the one or two
  // rows left over pass unchanged.
  function automatic int unsigned csa_rows(input int unsigned n);
    return 2 * (n / 3) + n % 3;
  endfunction

  // Rows after k levels of reduction, starting from n rows.
  function automatic int unsigned wallace_rows(input int unsigned n, input int unsigned k);
    int unsigned r = n;
    for (int unsigned i = 0; i < k; i++) r = csa_rows(r);
    return r;
  endfunction

  // Levels needed to reduce n rows to two (16 rows: 16-11-8-6-4-3-2, six levels).
  function automatic int unsigned wallace_levels(input int unsigned n);
    int unsigned r = n;
    int unsigned k = 0;
    while (r > 2) begin
      r = csa_rows(r);
      k++;
    end
    return k;
  endfunction

endpackage
