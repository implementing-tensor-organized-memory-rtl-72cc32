// tom_normal: Tensor-Organized Memory built from spiking winner-take-all modules ("Normal").
//
// One spiking WTA (wta_snn) per pattern of a message. On start the message is captured,
// every WTA is cleared for one clock and then left to integrate for WINDOW clocks; during
// that window each module whose pattern is recognised latches a winner through its
// race-to-threshold and lateral inhibition. A module whose pattern is erased (no active
// pixel) never fires. At the end of the window the winners go through the lateral
// excitatory OR network, which completes the message from the stored cliques, and the
// result is registered with a one-clock done pulse.
//
// Controller: IDLE -> CLEAR (1 clock) -> RUN (WINDOW clocks) -> DONE (1 clock) -> IDLE.
// start is accepted only in IDLE (busy low); done and the outputs appear WINDOW + 2
// clocks after the start clock. winners and retrieved hold until the next done.
//
// Following the document: WTA modules of shift-register input neurons and LIF output
// neurons, joined by OR-gate excitatory connections (Figure 8). Own choices: the fixed
// integration window, the controller and its handshake.
module tom_normal #(
  parameter int unsigned PAT_LEN   = tom_pkg::PAT_LEN,
  parameter int unsigned NUM_CLASS = tom_pkg::NUM_CLASS,
  parameter int unsigned NUM_WTA   = tom_pkg::NUM_WTA,
  parameter int unsigned MAX_MSG   = tom_pkg::MAX_MSG,
  parameter int unsigned SR_BITS   = tom_pkg::SR_BITS,
  parameter int unsigned EXP_W     = tom_pkg::EXP_W,
  parameter int unsigned MAN_W     = tom_pkg::MAN_W,
  parameter int unsigned WINDOW    = tom_pkg::WINDOW,
  localparam int unsigned CLS_W    = $clog2(NUM_CLASS),
  localparam int unsigned FP_W     = 1 + EXP_W + MAN_W
) (
  input  logic                                           clk,
  input  logic                                           rst_n,
  input  logic                                           start,
  input  logic [NUM_WTA-1:0][PAT_LEN-1:0]                message,
  input  logic [NUM_WTA-1:0][PAT_LEN-1:0]                w1,
  input  logic [NUM_WTA-1:0][NUM_CLASS-1:0][PAT_LEN-1:0] w2,
  input  logic [FP_W-1:0]                                eta,
  input  logic [FP_W-1:0]                                gamma,
  input  logic [MAX_MSG-1:0]                             msg_valid,
  input  logic [MAX_MSG-1:0][NUM_WTA-1:0][CLS_W-1:0]     msg_class,
  output logic                                           busy,
  output logic                                           done,
  output logic [NUM_WTA-1:0][NUM_CLASS-1:0]              winners,
  output logic [NUM_WTA-1:0][NUM_CLASS-1:0]              retrieved
);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_RUN, S_DONE} state_e;

  localparam int unsigned CNT_W = $clog2(WINDOW + 1);

  state_e                             state;
  logic [CNT_W-1:0]                   cnt;
  logic [NUM_WTA-1:0][PAT_LEN-1:0]    msg_q;
  logic                               clr;
  logic [NUM_WTA-1:0][NUM_CLASS-1:0]  win_c, ret_c;
  logic [NUM_WTA-1:0]                 win_valid;

  assign clr  = (state == S_CLEAR);
  assign busy = (state != S_IDLE);

  for (genvar x = 0; x < NUM_WTA; x++) begin : g_wta
    logic [NUM_CLASS-1:0] spk_unused;
    wta_snn #(.PAT_LEN(PAT_LEN), .NUM_CLASS(NUM_CLASS), .SR_BITS(SR_BITS), .EXP_W(EXP_W),
              .MAN_W(MAN_W)) u_wta (
      .clk, .rst_n, .clr, .pattern(msg_q[x]), .w1(w1[x]), .w2(w2[x]), .eta, .gamma,
      .class_spike(spk_unused), .winner(win_c[x]), .win_valid(win_valid[x])
    );
  end

  excitatory_or #(.NUM_WTA(NUM_WTA), .NUM_CLASS(NUM_CLASS), .MAX_MSG(MAX_MSG)) u_exc (
    .winners(win_c), .msg_valid, .msg_class, .retrieved(ret_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      msg_q     <= '0;
      done      <= 1'b0;
      winners   <= '0;
      retrieved <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          msg_q <= message;
          state <= S_CLEAR;
        end
        S_CLEAR: begin
          cnt   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          cnt <= cnt + CNT_W'(1);
          if (cnt == CNT_W'(WINDOW - 1)) state <= S_DONE;
        end
        S_DONE: begin
          winners   <= win_c;
          retrieved <= ret_c;
          done      <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A module reports a winner exactly when it latched one, and never more than one.
  for (genvar x = 0; x < NUM_WTA; x++) begin : g_chk
    a_win_onehot: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(win_c[x]) && (win_valid[x] == (win_c[x] != '0)));
  end

endmodule
