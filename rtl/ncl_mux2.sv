// ncl_mux2: dual-rail NCL 2:1 multiplexer, z = s ? a : b.
//
// Built from the NCL gate library as z = (s & a) | (!s & b): two NCL AND
// gates, one NCL OR gate, and the dual-rail inverse of s (a rail swap, no
// gate). Because every gate used waits for all of its inputs, the output
// becomes DATA only when a, b and s are all DATA and returns to NULL only when
// all three are NULL, which is the hysteresis rule of an NCL multiplexer.
// The selection rule (s = 1 selects a) follows the behaviour asked of an NCL
// MUX; the gate structure is this design's choice.
//
// Interface: a, b, s, z are dual-rail bits (ncl_pkg::dr_t). Timing: zero delay.
module ncl_mux2
  import ncl_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  input  dr_t s,
  output dr_t z
);

  dr_t sa, nsb;

  ncl_and2 u_and_a (.x(s),         .y(a), .z(sa));
  ncl_and2 u_and_b (.x(dr_not(s)), .y(b), .z(nsb));
  ncl_or2  u_or    (.x(sa),        .y(nsb), .z(z));

endmodule
