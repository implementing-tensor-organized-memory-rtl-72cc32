// dlbs_popcount: input stage of one class neuron of the digital-logic-based system (DLBS).
//
// Each pixel of the input pattern is compared with the trained pattern of the class by an
// XNOR, so a pixel counts when pattern and weight agree, whether both are white or both
// black, and the agreeing pixels are summed by a population count. The sum S plays the role
// of the spike rate of a spiking output neuron: the document shows that the output
// neuron's spike frequency grows monotonically with S, so S alone can pick the winner.
//
// Interface (combinational): pattern and w are PAT_LEN bits, s is the number of agreeing
// pixels, 0..PAT_LEN.
//
// Following the document: XNOR of pattern with weight, then a population count.
module dlbs_popcount #(
  parameter int unsigned PAT_LEN = tom_pkg::PAT_LEN,
  localparam int unsigned S_W    = $clog2(PAT_LEN + 1)
) (
  input  logic [PAT_LEN-1:0] pattern,
  input  logic [PAT_LEN-1:0] w,
  output logic [S_W-1:0]     s
);

  logic [PAT_LEN-1:0] agree;

  assign agree = pattern ~^ w;

  always_comb begin
    s = '0;
    for (int i = 0; i < PAT_LEN; i++) s += S_W'(agree[i]);
  end

endmodule
