// dlbs_winner_cmp: winner comparator of one DLBS WTA module.
//
// Class j wins when its rate R_j is non-zero and greater than the rate of every other
// class; this replaces the race to threshold and the inhibitory reset of the spiking WTA.
// Equal rates are resolved towards the lower class index (R_j must be strictly greater
// than the rates of lower classes and at least equal to those of higher classes), so at
// most one bit of the winner vector is set. When every R is zero there is no winner.
//
// Interface (combinational): r holds NUM_CLASS rates of S_W bits; winner is one-hot or
// zero.
//
// Following the document: each class compares its rate against the others and drives a
// one or a zero (Figure 9). Own choice: the tie rule.
module dlbs_winner_cmp #(
  parameter int unsigned NUM_CLASS = tom_pkg::NUM_CLASS,
  parameter int unsigned S_W       = $clog2(tom_pkg::PAT_LEN + 1)
) (
  input  logic [NUM_CLASS-1:0][S_W-1:0] r,
  output logic [NUM_CLASS-1:0]          winner
);

  always_comb begin
    for (int j = 0; j < NUM_CLASS; j++) begin
      logic beats;
      beats = (r[j] != '0);
      for (int k = 0; k < NUM_CLASS; k++) begin
        if (k < j && !(r[j] >  r[k])) beats = 1'b0;
        if (k > j && !(r[j] >= r[k])) beats = 1'b0;
      end
      winner[j] = beats;
    end
  end

endmodule
