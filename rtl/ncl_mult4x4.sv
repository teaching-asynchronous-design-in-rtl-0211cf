// ncl_mult4x4: two-stage pipelined NCL 4x4 Baugh-Wooley multiplier.
//
// Computes the 7-bit two's-complement product x = a * b of two 4-bit
// two's-complement operands, all in dual-rail NCL. Baugh-Wooley turns the
// signed product into a sum of positive terms: the ten partial products
// ai&bj with neither or both indices equal to 3 are used as they are, the six
// with exactly one index equal to 3 are inverted (NCL AND followed by a rail
// swap, i.e. a NAND), and a constant 1 is added in column 4:
//
//   column:  6      5      4      3      2      1      0
//                                ~a3b0   a2b0   a1b0   a0b0
//                         ~a3b1   a2b1   a1b1   a0b1
//                  ~a3b2   a2b2   a1b2   a0b2
//           a3b3   ~a2b3  ~a1b3  ~a0b3
//                           1
//
// The sum is the product modulo 2^7, which is exact for every operand pair
// except (-8) * (-8) = 64, which the 7-bit result shows as -64.
//
// Pipeline: an 8-bit NCL register takes {b, a}; stage 1 forms the 16 partial
// products and reduces them in three rows (3 half adders on columns 1-3,
// then 3 full adders on columns 2-4, then 3 full adders on columns 3-5) to
// bits x0..x3 plus two bits each for columns 4, 5 and 6; a 10-bit NCL
// register holds those ten bits; stage 2 is a 3-full-adder ripple adder over
// columns 4..6 whose column-4 adder adds the constant 1; a 7-bit NCL register
// holds x. Each register's ki comes from the ko of the register after it.
//
// The register sizes, the adder array and its wiring, and the constant 1 in
// stage 2 follow the published two-stage structure. The way the constant is
// made is this design's own: a fixed DATA1 would never return to NULL and
// would lock the adder's gates, so its DATA1 rail is a TH12 of the two rails
// of the adder's x input, i.e. it is DATA1 exactly while that operand is DATA.
//
// Interface: a, b operands (dual-rail, bit 3 = sign); ko request to the
// source (1 = send DATA, 0 = send NULL); x product (bit 6 = sign); ki request
// from the sink; rst clears all registers to NULL. The carry out of the
// column-6 adder is left open: the product is 7 bits. Timing: zero delay; at most
// one DATA wavefront per stage, so up to two products are in flight. The
// request chain (ki -> 7-bit register -> 10-bit register -> 8-bit register)
// closes loops through the adders, which lint reports as circular logic; it
// is the intended NCL handshake and settles because every loop passes a
// holding threshold gate.
module ncl_mult4x4
  import ncl_pkg::*;
(
  input  logic       rst,
  input  dr_t [3:0]  a,
  input  dr_t [3:0]  b,
  output logic       ko,
  output dr_t [6:0]  x,
  input  logic       ki
);

  // ---------------------------------------------------------------- input
  dr_t [7:0] in_q;
  dr_t [3:0] ra, rb;
  logic      ko_mid, ko_out;

  ncl_reg #(.WIDTH(8)) u_reg_in (
    .rst(rst), .d({b, a}), .ki(ko_mid), .q(in_q), .ko(ko)
  );
  assign ra = in_q[3:0];
  assign rb = in_q[7:4];

  // ---------------------------------------------------- partial products
  // pp[i][j] is the Baugh-Wooley term for a_i, b_j.
  dr_t pp [4][4];

  for (genvar i = 0; i < 4; i++) begin : g_row
    for (genvar j = 0; j < 4; j++) begin : g_col
      dr_t andz;
      ncl_and2 u_and (.x(ra[i]), .y(rb[j]), .z(andz));
      if ((i == 3) != (j == 3)) begin : g_nand
        assign pp[i][j] = dr_not(andz);
      end else begin : g_and
        assign pp[i][j] = andz;
      end
    end
  end

  // ------------------------------------------------------- stage 1 adders
  // Names give the column (weight) each adder works on.
  dr_t ha1_s, ha1_c, ha2_s, ha2_c, ha3_s, ha3_c;
  dr_t fa2_s, fa2_c, fa3u_s, fa3u_c, fa4u_s, fa4u_c;
  dr_t fa3_s, fa3_c, fa4_s, fa4_c, fa5_s, fa5_c;

  // First row: three half adders, columns 1, 2, 3.
  ncl_ha u_ha_c1 (.x(pp[0][1]), .y(pp[1][0]), .s(ha1_s), .c(ha1_c));
  ncl_ha u_ha_c2 (.x(pp[1][1]), .y(pp[2][0]), .s(ha2_s), .c(ha2_c));
  ncl_ha u_ha_c3 (.x(pp[2][1]), .y(pp[3][0]), .s(ha3_s), .c(ha3_c));
  // Second row: three full adders, columns 2, 3, 4.
  ncl_fa u_fa_c2 (.x(ha1_c), .y(ha2_s), .ci(pp[0][2]), .s(fa2_s),  .co(fa2_c));
  ncl_fa u_fa_c3 (.x(ha2_c), .y(ha3_s), .ci(pp[1][2]), .s(fa3u_s), .co(fa3u_c));
  ncl_fa u_fa_c4 (.x(ha3_c), .y(pp[3][1]), .ci(pp[2][2]), .s(fa4u_s), .co(fa4u_c));
  // Third row: three full adders, columns 3, 4, 5.
  ncl_fa u_fb_c3 (.x(fa2_c),  .y(fa3u_s),   .ci(pp[0][3]), .s(fa3_s), .co(fa3_c));
  ncl_fa u_fb_c4 (.x(fa3u_c), .y(fa4u_s),   .ci(pp[1][3]), .s(fa4_s), .co(fa4_c));
  ncl_fa u_fb_c5 (.x(fa4u_c), .y(pp[2][3]), .ci(pp[3][2]), .s(fa5_s), .co(fa5_c));

  // ---------------------------------------------------- middle register
  // bits 0..3: x0..x3; 4, 5: column 4; 6, 7: column 5; 8, 9: column 6
  dr_t [9:0] mid_d, mid_q;

  assign mid_d = {pp[3][3], fa5_c, fa5_s, fa4_c, fa4_s, fa3_c,
                  fa3_s, fa2_s, ha1_s, pp[0][0]};

  ncl_reg #(.WIDTH(10)) u_reg_mid (
    .rst(rst), .d(mid_d), .ki(ko_out), .q(mid_q), .ko(ko_mid)
  );

  // ------------------------------------------------------- stage 2 adders
  dr_t one, c4, c5, c6;
  dr_t [6:0] prod;

  // Constant DATA1 that follows the wavefront of mid_q[4].
  ncl_th #(.M(1), .N(2)) u_one (
    .rst(1'b0), .a({mid_q[4].r1, mid_q[4].r0}), .z(one.r1)
  );
  assign one.r0 = 1'b0;

  assign prod[3:0] = mid_q[3:0];
  ncl_fa u_fs_c4 (.x(mid_q[4]), .y(one),      .ci(mid_q[5]), .s(prod[4]), .co(c4));
  ncl_fa u_fs_c5 (.x(c4),       .y(mid_q[6]), .ci(mid_q[7]), .s(prod[5]), .co(c5));
  ncl_fa u_fs_c6 (.x(c5),       .y(mid_q[8]), .ci(mid_q[9]), .s(prod[6]), .co(c6));

  // ---------------------------------------------------- output register
  ncl_reg #(.WIDTH(7)) u_reg_out (
    .rst(rst), .d(prod), .ki(ki), .q(x), .ko(ko_out)
  );

endmodule
