// ncl_xor2: dual-rail NCL XOR gate, z = x ^ y.
//
// Four threshold gates of threshold 2. Two TH22 gates detect one minterm each
// (x.r1 & y.r1 for a 0 result, x.r1 & y.r0 for a 1 result). Each output rail
// is then a TH23W2 gate whose weight-2 input is that minterm and whose two
// unit inputs are the rails of the other minterm of the same result:
//   z.r0 = TH23W2(x1&y1 ; x.r0, y.r0)    (result 0: both 1 or both 0)
//   z.r1 = TH23W2(x1&y0 ; x.r0, y.r1)    (result 1)
// The output becomes DATA only when both inputs are DATA and NULL only when
// both are NULL.
//
// Interface: x, y, z are dual-rail bits (ncl_pkg::dr_t). Timing: zero delay.
module ncl_xor2
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t z
);

  logic m11, m10;

  ncl_th #(.M(2), .N(2)) u_m11 (.rst(1'b0), .a({y.r1, x.r1}), .z(m11));
  ncl_th #(.M(2), .N(2)) u_m10 (.rst(1'b0), .a({y.r0, x.r1}), .z(m10));

  ncl_th #(.M(2), .N(3), .W1(2)) u_z0 (
    .rst(1'b0), .a({y.r0, x.r0, m11}), .z(z.r0)
  );
  ncl_th #(.M(2), .N(3), .W1(2)) u_z1 (
    .rst(1'b0), .a({y.r1, x.r0, m10}), .z(z.r1)
  );

endmodule
