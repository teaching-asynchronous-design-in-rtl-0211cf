// ncl_and2: dual-rail NCL AND gate, z = x & y.
//
// Two threshold gates. z.r1 is a TH22 (C-element) on x.r1 and y.r1: the
// result is 1 only once both inputs are DATA1. z.r0 is a TH34W22 on
// (x.r0, y.r0, x.r1, y.r1) with the two DATA0 rails weighted 2: any DATA0
// input together with the other input's arrival reaches the threshold 3, while
// the two DATA1 rails alone only reach 2. Hence the output becomes DATA only
// once both inputs are DATA, and returns to NULL only once both are NULL
// (input completeness). Gate types and thresholds follow the usual NCL AND
// structure; there is no reset, the gate clears itself when its inputs are
// NULL.
//
// Interface: x, y, z are dual-rail bits (ncl_pkg::dr_t). Timing: zero delay.
module ncl_and2
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t z
);

  ncl_th #(.M(2), .N(2)) u_z1 (
    .rst(1'b0), .a({y.r1, x.r1}), .z(z.r1)
  );

  ncl_th #(.M(3), .N(4), .W1(2), .W2(2)) u_z0 (
    .rst(1'b0), .a({y.r1, x.r1, y.r0, x.r0}), .z(z.r0)
  );

endmodule
