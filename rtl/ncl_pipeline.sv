// ncl_pipeline: a basic NCL pipeline, STAGES registers in a row.
//
// Each register's request input ki is driven by the completion output ko of
// the register after it; the first register's ko is the request to the data
// source and the last register's ki is the request from the data sink. DATA
// and NULL wavefronts alternate: a register lets a DATA wavefront through
// only while the next register asks for DATA, then holds it until the next
// register has captured it and asks for NULL. With STAGES registers up to
// about STAGES/2 DATA wavefronts are in flight at once, separated by NULL
// wavefronts, and a sink that stops requesting stalls the source.
//
// The register chain and the request wiring follow the standard NCL pipeline
// (previous, current and next register). The combinational circuits between
// the registers are application specific; this pipeline has none, so each
// stage forwards its value unchanged and the chain acts as an asynchronous
// FIFO. STAGES = 3 and WIDTH = 2 are this design's defaults.
//
// Interface: d/ko toward the source, q/ki toward the sink, rst clears every
// register to NULL. Timing: zero delay per stage. The ko -> ki links form
// feedback loops through the register gates; they are the intended NCL
// handshake and settle because every loop passes a holding gate.
module ncl_pipeline
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH  = 2,
  parameter int unsigned STAGES = 3
) (
  input  logic             rst,
  input  dr_t [WIDTH-1:0]  d,
  output logic             ko,
  output dr_t [WIDTH-1:0]  q,
  input  logic             ki
);

  dr_t [WIDTH-1:0] data [STAGES+1];
  logic            req  [STAGES+1];

  assign data[0]     = d;
  assign ko          = req[0];
  assign q           = data[STAGES];
  assign req[STAGES] = ki;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    ncl_reg #(.WIDTH(WIDTH)) u_reg (
      .rst(rst), .d(data[s]), .ki(req[s+1]), .q(data[s+1]), .ko(req[s])
    );
  end

endmodule
