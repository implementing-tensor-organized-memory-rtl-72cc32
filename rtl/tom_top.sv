// tom_top: Tensor-Organized Memory (TOM) for message retrieval.
//
// A TOM stores messages made of NUM_WTA patterns. Each pattern position has a
// winner-take-all (WTA) module trained off-chip on NUM_CLASS patterns; a stored message is
// a clique of one class neuron per module, tied together by lateral excitatory
// connections. Presenting a message with noisy or erased patterns makes the modules whose
// pattern is recognised pick their winner, and the excitatory connections then activate
// the rest of the clique, returning the whole stored message.
//
// The top holds the trained weights and stored messages in one register file
// (tom_weight_regs) and offers two retrieval engines that share it:
//   * norm_* : tom_normal, the spiking implementation. Shift-register LIF input neurons,
//              floating-point LIF output neurons with lateral inhibition, an integration window
//              of WINDOW clocks per message; done WINDOW + 2 clocks after norm_start.
//   * dlbs_* : tom_dlbs, the digital-logic-based system. XNOR/popcount, spike comparator
//              and winner comparator; pipelined, one message per clock, result four clocks
//              after dlbs_in_valid.
// Both engines read the same message input; norm_start captures it, dlbs_in_valid feeds it
// into the pipeline. The spiking engine uses w1 (pixel enables) and w2 (class patterns);
// the DLBS engine uses w2 only.
//
// Register writes (wr_*) are described in tom_weight_regs; wr_sel is 0 for a class
// pattern, 1 for a pixel-enable row, 2 for a message slot. cfg_eta and cfg_gamma set the
// output-neuron leak eta and threshold gamma of the spiking engine, both single-precision
// floating-point encodings (non-negative, eta <= 1.0), and cfg_smin the
// minimum match count of the DLBS engine. All registers reset synchronously on rst_n low.
//
// Following the document: the two TOM organisations, the off-chip trained weights in
// registers, the OR-gate excitatory connections. Own choices: sharing one register file,
// the write port, the handshakes and the floating-point format.
module tom_top #(
  parameter int unsigned PAT_LEN   = tom_pkg::PAT_LEN,
  parameter int unsigned NUM_CLASS = tom_pkg::NUM_CLASS,
  parameter int unsigned NUM_WTA   = tom_pkg::NUM_WTA,
  parameter int unsigned MAX_MSG   = tom_pkg::MAX_MSG,
  parameter int unsigned SR_BITS   = tom_pkg::SR_BITS,
  parameter int unsigned EXP_W     = tom_pkg::EXP_W,
  parameter int unsigned MAN_W     = tom_pkg::MAN_W,
  parameter int unsigned WINDOW    = tom_pkg::WINDOW,
  localparam int unsigned CLS_W    = $clog2(NUM_CLASS),
  localparam int unsigned S_W      = $clog2(PAT_LEN + 1),
  localparam int unsigned FP_W     = 1 + EXP_W + MAN_W,
  localparam int unsigned WTA_W    = (NUM_WTA > 1) ? $clog2(NUM_WTA) : 1,
  localparam int unsigned IDX_W    = (CLS_W > $clog2(MAX_MSG)) ? CLS_W : $clog2(MAX_MSG)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // weight / message register writes
  input  logic                              wr_en,
  input  logic [1:0]                        wr_sel,
  input  logic [WTA_W-1:0]                  wr_wta,
  input  logic [IDX_W-1:0]                  wr_idx,
  input  logic [PAT_LEN-1:0]                wr_data,
  input  logic [NUM_WTA-1:0][CLS_W-1:0]     wr_msg_class,
  input  logic                              wr_msg_valid,
  // configuration
  input  logic [FP_W-1:0]                   cfg_eta,
  input  logic [FP_W-1:0]                   cfg_gamma,
  input  logic [S_W-1:0]                    cfg_smin,
  // message to retrieve
  input  logic [NUM_WTA-1:0][PAT_LEN-1:0]   message,
  // spiking engine
  input  logic                              norm_start,
  output logic                              norm_busy,
  output logic                              norm_done,
  output logic [NUM_WTA-1:0][NUM_CLASS-1:0] norm_winners,
  output logic [NUM_WTA-1:0][NUM_CLASS-1:0] norm_retrieved,
  // DLBS engine
  input  logic                              dlbs_in_valid,
  output logic                              dlbs_out_valid,
  output logic [NUM_WTA-1:0][NUM_CLASS-1:0] dlbs_winners,
  output logic [NUM_WTA-1:0][NUM_CLASS-1:0] dlbs_retrieved
);

  logic [NUM_WTA-1:0][PAT_LEN-1:0]                w1;
  logic [NUM_WTA-1:0][NUM_CLASS-1:0][PAT_LEN-1:0] w2;
  logic [MAX_MSG-1:0]                             msg_valid;
  logic [MAX_MSG-1:0][NUM_WTA-1:0][CLS_W-1:0]     msg_class;

  tom_weight_regs #(.PAT_LEN(PAT_LEN), .NUM_CLASS(NUM_CLASS), .NUM_WTA(NUM_WTA),
                    .MAX_MSG(MAX_MSG)) u_regs (
    .clk, .rst_n, .wr_en, .wr_sel(tom_pkg::wsel_e'(wr_sel)), .wr_wta, .wr_idx, .wr_data,
    .wr_msg_class, .wr_msg_valid, .w1, .w2, .msg_valid, .msg_class
  );

  tom_normal #(.PAT_LEN(PAT_LEN), .NUM_CLASS(NUM_CLASS), .NUM_WTA(NUM_WTA), .MAX_MSG(MAX_MSG),
               .SR_BITS(SR_BITS), .EXP_W(EXP_W), .MAN_W(MAN_W), .WINDOW(WINDOW)) u_normal (
    .clk, .rst_n, .start(norm_start), .message, .w1, .w2, .eta(cfg_eta), .gamma(cfg_gamma),
    .msg_valid, .msg_class, .busy(norm_busy), .done(norm_done), .winners(norm_winners),
    .retrieved(norm_retrieved)
  );

  tom_dlbs #(.PAT_LEN(PAT_LEN), .NUM_CLASS(NUM_CLASS), .NUM_WTA(NUM_WTA),
             .MAX_MSG(MAX_MSG)) u_dlbs (
    .clk, .rst_n, .in_valid(dlbs_in_valid), .message, .w2, .smin(cfg_smin), .msg_valid,
    .msg_class, .out_valid(dlbs_out_valid), .winners(dlbs_winners), .retrieved(dlbs_retrieved)
  );

endmodule
