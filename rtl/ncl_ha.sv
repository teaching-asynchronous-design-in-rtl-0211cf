// ncl_ha: optimized dual-rail NCL half adder, {c, s} = x + y.
//
// The carry rails are formed first and reused for the sum:
//   c.r0 = TH12(x.r0, y.r0)           carry 0 as soon as either input is 0
//   c.r1 = TH22(x.r1, y.r1)           carry 1 when both inputs are 1
//   s.r0 = TH23W2(c.r1 ; x.r0, y.r0)  sum 0: both 1 (via c.r1) or both 0
//   s.r1 = TH33W2(c.r0 ; x.r1, y.r1)  sum 1: one input 0 (via c.r0) and the
//                                     other 1
// The carry may become DATA before both inputs have arrived, but the sum
// cannot, so the pair {c, s} is complete only once both inputs are DATA, and
// it is fully NULL only once both inputs are NULL.
//
// Interface: x, y, c, s are dual-rail bits (ncl_pkg::dr_t). Timing: zero delay.
module ncl_ha
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t s,
  output dr_t c
);

  ncl_th #(.M(1), .N(2)) u_c0 (.rst(1'b0), .a({y.r0, x.r0}), .z(c.r0));
  ncl_th #(.M(2), .N(2)) u_c1 (.rst(1'b0), .a({y.r1, x.r1}), .z(c.r1));

  ncl_th #(.M(2), .N(3), .W1(2)) u_s0 (
    .rst(1'b0), .a({y.r0, x.r0, c.r1}), .z(s.r0)
  );
  ncl_th #(.M(3), .N(3), .W1(2)) u_s1 (
    .rst(1'b0), .a({y.r1, x.r1, c.r0}), .z(s.r1)
  );

endmodule
