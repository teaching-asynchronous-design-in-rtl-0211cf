// ncl_th: m-of-n threshold gate with hysteresis (THmn), optionally weighted
// (THmnWw1w2).
//
// The output rises once the weighted count of asserted inputs reaches the
// threshold M, and falls only once every input is low again; in between it
// holds its value. With M = N and unit weights the gate is an N-input Muller
// C-element, with M = 1 it is an N-input OR (the hold path then never acts,
// so a TH1n gate has no storage). As in the THmnWw1..wr notation, the weights
// belong to the first inputs: a[0] counts W1 times and a[1] counts W2 times,
// all later inputs once. The default weights of 1 give the plain THmn gate;
// W1 = 2 with M = 2, N = 3 gives TH23W2, and W1 = W2 = 2 with M = 3, N = 4
// gives TH34W22. Two weighted inputs cover every gate in this library.
//
// The transistor-level gate (set network, reset network and the two hold
// networks with output feedback) is modelled here by its logic function: a
// level-sensitive storage element that is set by the threshold condition and
// cleared by the all-low condition. That storage element is intentional, it
// is the hysteresis; synthesis maps it to a latch. The
// reset input rst (active high, asynchronous, level) clears the gate; it is
// this library's addition for initialising register gates and is tied low in
// combinational cells.
//
// Timing: zero delay; the output settles in the same time step as the inputs.
// Lint reports the storage as "no latch detected" because the hold path is
// written as a level-enabled assignment; synthesis does infer the latch.
// In designs with handshakes, lint also reports circular logic through these
// gates: that is the NCL request feedback (see ncl_reg), which settles
// because the loop passes a holding gate.
module ncl_th #(
  parameter int unsigned M = 2,              // threshold
  parameter int unsigned N = 3,              // number of inputs
  parameter int unsigned W1 = 1,             // weight of input a[0]
  parameter int unsigned W2 = 1              // weight of input a[1]
) (
  input  logic         rst,
  input  logic [N-1:0] a,
  output logic         z
);

  // Largest possible weighted sum stays well inside 16 bits for any sane gate.
  logic [15:0] wsum;
  logic        set_c, clr_c;

  always_comb begin
    wsum = '0;
    for (int i = 0; i < N; i++)
      if (a[i]) wsum += (i == 0) ? 16'(W1) : (i == 1) ? 16'(W2) : 16'd1;
  end

  assign set_c = (wsum >= 16'(M));
  assign clr_c = (a == '0);

  // Transparent while reset, set or clear applies; holds otherwise.
  always_latch begin
    if (rst || set_c || clr_c) z = !rst && set_c;
  end

endmodule
