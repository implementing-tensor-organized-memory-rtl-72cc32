// tom_dlbs: Tensor-Organized Memory built from DLBS winner-take-all modules ("Novel").
//
// A message of NUM_WTA patterns enters in one clock; pattern x goes to DLBS module x,
// which recognises it among its NUM_CLASS trained patterns (or finds none when its best
// match does not exceed Smin, as for an erased pattern). The winners of all modules then
// pass through the lateral excitatory OR network, which completes the message from any
// stored message (clique) that the recognised patterns belong to.
//
// Timing: fully pipelined, one message per clock. retrieved and winners are registered
// and appear with out_valid four clocks after in_valid (three DLBS stages, one register
// after the excitatory OR). The weights, the stored messages and smin are static inputs.
//
// Following the document: one DLBS WTA per message pattern, joined by OR-gate excitatory
// connections (Figure 9). Own choices: the output register and the latency.
module tom_dlbs #(
  parameter int unsigned PAT_LEN   = tom_pkg::PAT_LEN,
  parameter int unsigned NUM_CLASS = tom_pkg::NUM_CLASS,
  parameter int unsigned NUM_WTA   = tom_pkg::NUM_WTA,
  parameter int unsigned MAX_MSG   = tom_pkg::MAX_MSG,
  localparam int unsigned S_W      = $clog2(PAT_LEN + 1),
  localparam int unsigned CLS_W    = $clog2(NUM_CLASS)
) (
  input  logic                                           clk,
  input  logic                                           rst_n,
  input  logic                                           in_valid,
  input  logic [NUM_WTA-1:0][PAT_LEN-1:0]                message,
  input  logic [NUM_WTA-1:0][NUM_CLASS-1:0][PAT_LEN-1:0] w2,
  input  logic [S_W-1:0]                                 smin,
  input  logic [MAX_MSG-1:0]                             msg_valid,
  input  logic [MAX_MSG-1:0][NUM_WTA-1:0][CLS_W-1:0]     msg_class,
  output logic                                           out_valid,
  output logic [NUM_WTA-1:0][NUM_CLASS-1:0]              winners,
  output logic [NUM_WTA-1:0][NUM_CLASS-1:0]              retrieved
);

  logic [NUM_WTA-1:0]                 wta_valid;
  logic [NUM_WTA-1:0][NUM_CLASS-1:0]  win_c, ret_c;

  for (genvar x = 0; x < NUM_WTA; x++) begin : g_wta
    dlbs_wta #(.PAT_LEN(PAT_LEN), .NUM_CLASS(NUM_CLASS)) u_wta (
      .clk, .rst_n, .in_valid, .pattern(message[x]), .w(w2[x]), .smin,
      .out_valid(wta_valid[x]), .winner(win_c[x])
    );
  end

  excitatory_or #(.NUM_WTA(NUM_WTA), .NUM_CLASS(NUM_CLASS), .MAX_MSG(MAX_MSG)) u_exc (
    .winners(win_c), .msg_valid, .msg_class, .retrieved(ret_c)
  );

  // All modules run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (&wta_valid) == (|wta_valid));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      winners   <= '0;
      retrieved <= '0;
    end else begin
      out_valid <= wta_valid[0];
      if (wta_valid[0]) begin
        winners   <= win_c;
        retrieved <= ret_c;
      end
    end
  end

endmodule
