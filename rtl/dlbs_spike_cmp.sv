// dlbs_spike_cmp: spike comparator of one DLBS class neuron.
//
// The neuron "fires" only when its match count S is strictly greater than the minimum
// Smin; it then passes S on as its rate R, otherwise R = 0. Smin keeps an erased or
// unrecognisable pattern from producing a winner, which leaves that module's pattern to
// be filled in by the excitatory connections.
//
// Interface (combinational): s and smin are S_W-bit unsigned; r = (s > smin) ? s : 0.
//
// Following the document: the comparison with Smin selecting between S and 0 (Figure 9).
module dlbs_spike_cmp #(
  parameter int unsigned S_W = $clog2(tom_pkg::PAT_LEN + 1)
) (
  input  logic [S_W-1:0] s,
  input  logic [S_W-1:0] smin,
  output logic [S_W-1:0] r
);

  assign r = (s > smin) ? s : '0;

endmodule
