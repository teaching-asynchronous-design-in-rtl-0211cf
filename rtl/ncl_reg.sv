// ncl_reg: NCL register with completion detection (one stage boundary of an
// NCL pipeline).
//
// Every rail of every bit passes through a TH22 register gate whose second
// input is the request line ki from the stage after. While ki is high
// (request for DATA) a DATA wavefront passes and is then held even if the
// input returns to NULL; while ki is low (request for NULL) a NULL wavefront
// passes and is held. Completion detection ORs the two rails of each output
// bit (TH12) and combines the WIDTH results in a WIDTH-input C-element
// (TH(WIDTH)(WIDTH)) with an inverted output: ko falls once all outputs are
// DATA and rises once all outputs are NULL. ko goes to the ki of the stage
// before.
//
// The structure follows the standard NCL register. A single C-element for
// the completion tree of any width, and the reset input, are this design's
// choices: rst (active high, level) forces every register gate to 0, so the
// register comes up holding NULL and requesting DATA (ko = 1).
//
// Interface: d, q are WIDTH dual-rail bits; ki request from the next stage
// (1 = DATA wanted, 0 = NULL wanted); ko request to the previous stage.
// Timing: zero delay; a four-phase return-to-NULL handshake. Once registers
// are chained, ko feeds back into the stage before as its ki; that loop, and
// the hold path inside every gate, are the intended feedback of NCL and are
// reported by lint as circular logic. Each loop passes a holding gate, so it
// settles.
//
// Assertions: outside reset, no input or output bit may carry the illegal
// code (both rails high).
module ncl_reg
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH = 2
) (
  input  logic             rst,
  input  dr_t [WIDTH-1:0]  d,
  input  logic             ki,
  output dr_t [WIDTH-1:0]  q,
  output logic             ko
);

  logic [WIDTH-1:0] bit_done;
  logic             all_done;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    ncl_th #(.M(2), .N(2)) u_r1 (.rst(rst), .a({ki, d[i].r1}), .z(q[i].r1));
    ncl_th #(.M(2), .N(2)) u_r0 (.rst(rst), .a({ki, d[i].r0}), .z(q[i].r0));
    ncl_th #(.M(1), .N(2)) u_or (.rst(1'b0), .a({q[i].r1, q[i].r0}), .z(bit_done[i]));
  end

  ncl_th #(.M(WIDTH), .N(WIDTH)) u_done (.rst(1'b0), .a(bit_done), .z(all_done));

  assign ko = !all_done;

  // Dual-rail legality of everything entering and leaving the register.
  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      a_legal_d : assert (rst || !(d[i].r1 && d[i].r0))
        else $error("ncl_reg: illegal dual-rail code on input bit %0d", i);
      a_legal_q : assert (rst || !(q[i].r1 && q[i].r0))
        else $error("ncl_reg: illegal dual-rail code on output bit %0d", i);
    end
  end

endmodule
