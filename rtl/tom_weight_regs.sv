// tom_weight_regs: register file holding everything a TOM learns.
//
// Training (STDP for the feed-forward synapses, Hebbian association for the lateral
// excitatory synapses) is done off-chip; its results are written into these registers
// through a simple write port, one row per clock:
//   WSEL_W2  : w2[wr_wta][wr_idx]  <= wr_data   trained pattern of class wr_idx of module wr_wta
//   WSEL_W1  : w1[wr_wta]          <= wr_data   input-layer weights (pixel enables) of module wr_wta
//   WSEL_MSG : message slot wr_idx <= wr_msg_class (one class index per module), wr_msg_valid
// A write takes effect on the clock edge where wr_en is high; the outputs are the
// registers themselves. Reset (synchronous, active low) sets every w1 bit to one so that
// all pixels take part, clears w2 and marks every message slot empty.
//
// Following the document: weights computed off-chip and loaded into registers. Own
// choices: the write-port format and the reset values.
module tom_weight_regs #(
  parameter int unsigned PAT_LEN   = tom_pkg::PAT_LEN,
  parameter int unsigned NUM_CLASS = tom_pkg::NUM_CLASS,
  parameter int unsigned NUM_WTA   = tom_pkg::NUM_WTA,
  parameter int unsigned MAX_MSG   = tom_pkg::MAX_MSG,
  localparam int unsigned CLS_W    = $clog2(NUM_CLASS),
  localparam int unsigned WTA_W    = (NUM_WTA > 1) ? $clog2(NUM_WTA) : 1,
  localparam int unsigned MSG_W    = $clog2(MAX_MSG),
  localparam int unsigned IDX_W    = (CLS_W > MSG_W) ? CLS_W : MSG_W
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  input  logic                                       wr_en,
  input  tom_pkg::wsel_e                                      wr_sel,
  input  logic [WTA_W-1:0]                           wr_wta,
  input  logic [IDX_W-1:0]                           wr_idx,
  input  logic [PAT_LEN-1:0]                         wr_data,
  input  logic [NUM_WTA-1:0][CLS_W-1:0]              wr_msg_class,
  input  logic                                       wr_msg_valid,
  output logic [NUM_WTA-1:0][PAT_LEN-1:0]            w1,
  output logic [NUM_WTA-1:0][NUM_CLASS-1:0][PAT_LEN-1:0] w2,
  output logic [MAX_MSG-1:0]                         msg_valid,
  output logic [MAX_MSG-1:0][NUM_WTA-1:0][CLS_W-1:0] msg_class
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w1        <= '1;
      w2        <= '0;
      msg_valid <= '0;
      msg_class <= '0;
    end else if (wr_en) begin
      unique case (wr_sel)
        tom_pkg::WSEL_W2:  w2[wr_wta][wr_idx] <= wr_data;
        tom_pkg::WSEL_W1:  w1[wr_wta]         <= wr_data;
        tom_pkg::WSEL_MSG: begin
          msg_class[wr_idx[MSG_W-1:0]] <= wr_msg_class;
          msg_valid[wr_idx[MSG_W-1:0]] <= wr_msg_valid;
        end
        default: ;
      endcase
    end
  end

  // Writes must address an existing row.
  a_wta_range: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> 32'(wr_wta) < NUM_WTA);
  a_idx_range: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> 32'(wr_idx) < ((wr_sel == tom_pkg::WSEL_MSG) ? MAX_MSG : ((wr_sel == tom_pkg::WSEL_W2) ? NUM_CLASS : 32'd1 << IDX_W)));

endmodule
