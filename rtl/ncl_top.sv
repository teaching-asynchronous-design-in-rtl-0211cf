// ncl_top: the NCL design examples side by side.
//
// The main design is the two-stage pipelined 4x4 Baugh-Wooley multiplier
// (ncl_mult4x4), which is built from the NCL AND gate, the dual-rail inverse,
// the optimized half and full adders and three NCL registers, all of them on
// the threshold gate with hysteresis. Next to it, with their own ports, stand
// the library elements the multiplier does not use: the NCL OR and XOR gates,
// the NCL 2:1 multiplexer and a basic three-register NCL pipeline. These
// parts do not connect to each other; each keeps its own handshake.
//
// Interface (all data dual-rail, ncl_pkg::dr_t):
//   rst                          clears every NCL register to NULL
//   mul_a, mul_b, mul_ko         multiplier operands and request to source
//   mul_x, mul_ki                7-bit product and request from sink
//   or_x, or_y, or_z             OR gate
//   xor_x, xor_y, xor_z          XOR gate
//   mux_a, mux_b, mux_s, mux_z   multiplexer, mux_s = 1 selects mux_a
//   pipe_d, pipe_ko, pipe_q, pipe_ki   pipeline, PIPE_WIDTH bits, PIPE_STAGES
// Timing: zero delay, self-timed; no clock. The handshake loops inside the
// multiplier and the pipeline are intended feedback (see those modules).
module ncl_top
  import ncl_pkg::*;
#(
  parameter int unsigned PIPE_WIDTH  = 2,
  parameter int unsigned PIPE_STAGES = 3
) (
  input  logic                  rst,
  // multiplier
  input  dr_t [3:0]             mul_a,
  input  dr_t [3:0]             mul_b,
  output logic                  mul_ko,
  output dr_t [6:0]             mul_x,
  input  logic                  mul_ki,
  // gates
  input  dr_t                   or_x,
  input  dr_t                   or_y,
  output dr_t                   or_z,
  input  dr_t                   xor_x,
  input  dr_t                   xor_y,
  output dr_t                   xor_z,
  input  dr_t                   mux_a,
  input  dr_t                   mux_b,
  input  dr_t                   mux_s,
  output dr_t                   mux_z,
  // pipeline
  input  dr_t [PIPE_WIDTH-1:0]  pipe_d,
  output logic                  pipe_ko,
  output dr_t [PIPE_WIDTH-1:0]  pipe_q,
  input  logic                  pipe_ki
);

  ncl_mult4x4 u_mult (
    .rst(rst), .a(mul_a), .b(mul_b), .ko(mul_ko), .x(mul_x), .ki(mul_ki)
  );

  ncl_or2  u_or  (.x(or_x),  .y(or_y),  .z(or_z));
  ncl_xor2 u_xor (.x(xor_x), .y(xor_y), .z(xor_z));
  ncl_mux2 u_mux (.a(mux_a), .b(mux_b), .s(mux_s), .z(mux_z));

  ncl_pipeline #(.WIDTH(PIPE_WIDTH), .STAGES(PIPE_STAGES)) u_pipe (
    .rst(rst), .d(pipe_d), .ko(pipe_ko), .q(pipe_q), .ki(pipe_ki)
  );

endmodule
