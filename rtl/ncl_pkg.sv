// ncl_pkg: shared types and helper functions for dual-rail NULL Convention
// Logic (NCL).
//
// A dual-rail signal carries one bit on two wires, r0 and r1. r0 high alone
// is DATA0 (Boolean 0), r1 high alone is DATA1 (Boolean 1), both low is NULL
// (no value yet) and both high is illegal. Every NCL block in this library
// takes and returns values of type dr_t. The functions below classify values
// (DATA, NULL or illegal), encode and decode Booleans,
// and form the dual-rail inverse, which is only a swap of the two rails and
// therefore needs no gate.
//
// The encoding follows the usual NCL convention. The function set mirrors the
// NULL/DATA tests a behavioural NCL package needs; the names are this
// library's own.
package ncl_pkg;

  // One dual-rail bit: r1 asserts DATA1, r0 asserts DATA0.
  typedef struct packed {
    logic r1;
    logic r0;
  } dr_t;

  typedef enum logic [1:0] {
    DR_NULL    = 2'b00,
    DR_DATA0   = 2'b01,
    DR_DATA1   = 2'b10,
    DR_ILLEGAL = 2'b11
  } dr_state_e;

  function automatic dr_state_e dr_state(dr_t d);
    return dr_state_e'({d.r1, d.r0});
  endfunction

  function automatic logic is_data(dr_t d);
    return d.r1 ^ d.r0;
  endfunction

  function automatic logic is_null(dr_t d);
    return !d.r1 && !d.r0;
  endfunction

  function automatic logic is_illegal(dr_t d);
    return d.r1 && d.r0;
  endfunction

  function automatic dr_t encode(logic b);
    return '{r1: b, r0: !b};
  endfunction

  // Boolean value of a DATA signal; NULL and the illegal code read as 0.
  function automatic logic decode(dr_t d);
    return d.r1 && !d.r0;
  endfunction

  // Dual-rail INVERT: swap the rails. NULL stays NULL.
  function automatic dr_t dr_not(dr_t d);
    return '{r1: d.r0, r0: d.r1};
  endfunction

endpackage
