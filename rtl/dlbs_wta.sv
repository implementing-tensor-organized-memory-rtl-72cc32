// dlbs_wta: one winner-take-all module of the digital-logic-based system (DLBS).
//
// The spiking WTA integrates spikes over many clocks until one class neuron crosses its
// threshold. The DLBS reaches the same decision in a fixed, short pipeline because the
// winner of the spiking WTA is the class with the largest input amplitude S. Per class, a
// dlbs_popcount counts the pixels where pattern and trained pattern agree (XNOR), a
// dlbs_spike_cmp zeroes counts that do not exceed Smin, and one dlbs_winner_cmp picks the
// class with the largest remaining count.
//
// Pipeline: stage 1 registers the counts S, stage 2 the rates R, stage 3 the one-hot winner.
// A new pattern can be accepted every clock (in_valid); out_valid and winner follow three
// clocks later. pattern must be valid in the in_valid cycle only; w and smin are read in
// the stage that uses them and are expected to be static while patterns flow.
//
// Following the document: the XNOR/popcount, spike comparator and winner comparator chain.
// Own choices: the pipeline registers between the three stages.
module dlbs_wta #(
  parameter int unsigned PAT_LEN   = tom_pkg::PAT_LEN,
  parameter int unsigned NUM_CLASS = tom_pkg::NUM_CLASS,
  localparam int unsigned S_W      = $clog2(PAT_LEN + 1)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic [PAT_LEN-1:0]                pattern,
  input  logic [NUM_CLASS-1:0][PAT_LEN-1:0] w,
  input  logic [S_W-1:0]                    smin,
  output logic                              out_valid,
  output logic [NUM_CLASS-1:0]              winner
);

  logic [NUM_CLASS-1:0][S_W-1:0] s_c, s_q, r_c, r_q;
  logic [NUM_CLASS-1:0]          win_c;
  logic [2:0]                    vld;

  for (genvar j = 0; j < NUM_CLASS; j++) begin : g_cls
    dlbs_popcount  #(.PAT_LEN(PAT_LEN)) u_pc  (.pattern, .w(w[j]), .s(s_c[j]));
    dlbs_spike_cmp #(.S_W(S_W))         u_cmp (.s(s_q[j]), .smin, .r(r_c[j]));
  end

  dlbs_winner_cmp #(.NUM_CLASS(NUM_CLASS), .S_W(S_W)) u_win (.r(r_q), .winner(win_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld    <= '0;
      s_q    <= '0;
      r_q    <= '0;
      winner <= '0;
    end else begin
      vld <= {vld[1:0], in_valid};
      if (in_valid) s_q    <= s_c;
      if (vld[0])   r_q    <= r_c;
      if (vld[1])   winner <= win_c;
    end
  end

  assign out_valid = vld[2];

endmodule
