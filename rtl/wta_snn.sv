// wta_snn: two-layer spiking winner-take-all (WTA) module of the spiking TOM.
//
// The first layer has one shift-register LIF neuron (lif_sr_neuron) per input pixel; its
// input is the AND of the pixel with that pixel's first-layer weight w1. The second layer
// has one floating-point LIF neuron (lif_fp_neuron) per class. In each clock the input of
// class neuron j is the number of first-layer spikes that reach it through a set
// second-layer synapse: I_j = popcount(spikes1 & w2[j]). Because the first-layer neurons
// are cleared together, all active ones fire on the same clocks, so I_j is an impulse train
// whose height is the overlap between the pattern and the trained class pattern, and the
// class with the largest overlap charges fastest.
//
// Lateral inhibition: when a class neuron spikes, every other class neuron is reset to
// zero on the next clock. The first clock in which any class neuron spikes decides the
// winner; the winner is latched one-hot into `winner` and `win_valid` is set until clr. If
// several class neurons cross the threshold in the same clock, the lowest class index is
// taken (own choice; the document does not break ties).
//
// Interface: pattern, w1 and w2 are held stable while the module runs; clr (one clock)
// clears both layers and the winner latch. class_spike is the raw output-layer spike
// vector. With all pixels active and eta, gamma such that one impulse suffices, the first
// class spike appears SR_BITS+1 clocks after clr and winner the clock after that.
//
// Following the document: the two layers, the AND input stage, the spiking output neurons
// and their inhibitory reset. Own choices: binary second-layer weights counted by a
// population count, the winner latch and its tie rule.
module wta_snn #(
  parameter int unsigned PAT_LEN   = tom_pkg::PAT_LEN,
  parameter int unsigned NUM_CLASS = tom_pkg::NUM_CLASS,
  parameter int unsigned SR_BITS   = tom_pkg::SR_BITS,
  parameter int unsigned EXP_W     = tom_pkg::EXP_W,
  parameter int unsigned MAN_W     = tom_pkg::MAN_W,
  localparam int unsigned FP_W     = 1 + EXP_W + MAN_W
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              clr,
  input  logic [PAT_LEN-1:0]                pattern,
  input  logic [PAT_LEN-1:0]                w1,
  input  logic [NUM_CLASS-1:0][PAT_LEN-1:0] w2,
  input  logic [FP_W-1:0]                   eta,
  input  logic [FP_W-1:0]                   gamma,
  output logic [NUM_CLASS-1:0]              class_spike,
  output logic [NUM_CLASS-1:0]              winner,
  output logic                              win_valid
);

  localparam int unsigned IN_W = $clog2(PAT_LEN + 1);

  logic [PAT_LEN-1:0] spike1;

  for (genvar i = 0; i < PAT_LEN; i++) begin : g_in
    logic [SR_BITS-1:0] u_unused;
    lif_sr_neuron #(.SR_BITS(SR_BITS)) u_n (
      .clk, .rst_n, .clr, .p(pattern[i]), .w(w1[i]), .u(u_unused), .spike(spike1[i])
    );
  end

  for (genvar j = 0; j < NUM_CLASS; j++) begin : g_out
    logic [IN_W-1:0] cnt;
    logic [FP_W-1:0] u_unused;
    always_comb begin
      cnt = '0;
      for (int i = 0; i < PAT_LEN; i++) cnt += IN_W'(spike1[i] & w2[j][i]);
    end
    lif_fp_neuron #(.IN_W(IN_W), .EXP_W(EXP_W), .MAN_W(MAN_W)) u_n (
      .clk, .rst_n, .clr, .in_i(cnt), .eta, .gamma,
      .inhibit(|(class_spike & ~(NUM_CLASS'(1) << j))),
      .u(u_unused), .spike(class_spike[j])
    );
  end

  // Lowest-index spiking class, one-hot.
  logic [NUM_CLASS-1:0] first;
  assign first = class_spike & (~class_spike + NUM_CLASS'(1));

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      winner    <= '0;
      win_valid <= 1'b0;
    end else if (!win_valid && |class_spike) begin
      winner    <= first;
      win_valid <= 1'b1;
    end
  end

endmodule
