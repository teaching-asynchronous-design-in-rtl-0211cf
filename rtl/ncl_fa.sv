// ncl_fa: optimized dual-rail NCL full adder, {co, s} = x + y + ci.
//
// The carry rails are majority gates, TH23 on the three DATA0 rails and TH23
// on the three DATA1 rails. Each sum rail is a TH34W2 gate whose weight-2
// input is the opposite carry rail:
//   s.r0 = TH34W2(co.r1 ; ci.r0, x.r0, y.r0)  (two 1s and a 0, or three 0s)
//   s.r1 = TH34W2(co.r0 ; ci.r1, x.r1, y.r1)  (two 0s and a 1, or three 1s)
// The sum gates need all three inputs, so the outputs are complete only when
// every input is DATA and return to NULL only when every input is NULL.
//
// Interface: x, y, ci, s, co are dual-rail bits (ncl_pkg::dr_t).
// Timing: zero delay.
module ncl_fa
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  input  dr_t ci,
  output dr_t s,
  output dr_t co
);

  ncl_th #(.M(2), .N(3)) u_c0 (.rst(1'b0), .a({y.r0, x.r0, ci.r0}), .z(co.r0));
  ncl_th #(.M(2), .N(3)) u_c1 (.rst(1'b0), .a({y.r1, x.r1, ci.r1}), .z(co.r1));

  ncl_th #(.M(3), .N(4), .W1(2)) u_s0 (
    .rst(1'b0), .a({y.r0, x.r0, ci.r0, co.r1}), .z(s.r0)
  );
  ncl_th #(.M(3), .N(4), .W1(2)) u_s1 (
    .rst(1'b0), .a({y.r1, x.r1, ci.r1, co.r0}), .z(s.r1)
  );

endmodule
