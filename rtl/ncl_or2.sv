// ncl_or2: dual-rail NCL OR gate, z = x | y.
//
// The dual of the AND gate: z.r0 is a TH22 on the two DATA0 rails (the result
// is 0 only when both inputs are 0), and z.r1 is a TH34W22 on
// (x.r1, y.r1, x.r0, y.r0) with the DATA1 rails weighted 2, so that a DATA1
// input plus the arrival of the other input reaches the threshold 3. The
// output is DATA only when both inputs are DATA and NULL only when both are
// NULL.
//
// Interface: x, y, z are dual-rail bits (ncl_pkg::dr_t). Timing: zero delay.
module ncl_or2
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t z
);

  ncl_th #(.M(2), .N(2)) u_z0 (
    .rst(1'b0), .a({y.r0, x.r0}), .z(z.r0)
  );

  ncl_th #(.M(3), .N(4), .W1(2), .W2(2)) u_z1 (
    .rst(1'b0), .a({y.r0, x.r0, y.r1, x.r1}), .z(z.r1)
  );

endmodule
