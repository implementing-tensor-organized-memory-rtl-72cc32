// tb_tom_weight_regs: writes random rows into every bank of the weight register file and
// compares all outputs with a shadow copy kept by the testbench after every write,
// including the reset values (w1 all ones, w2 zero, no valid message).
module tb_tom_weight_regs;
  localparam int unsigned PAT_LEN = 25, NUM_CLASS = 25, NUM_WTA = 4, MAX_MSG = 8;
  localparam int unsigned CLS_W = 5, WTA_W = 2, IDX_W = 5;
  logic clk = 0, rst_n = 0, wr_en = 0, wr_msg_valid = 0;
  tom_pkg::wsel_e wr_sel = tom_pkg::WSEL_W2;
  logic [WTA_W-1:0] wr_wta = '0;
  logic [IDX_W-1:0] wr_idx = '0;
  logic [PAT_LEN-1:0] wr_data = '0;
  logic [NUM_WTA-1:0][CLS_W-1:0] wr_msg_class = '0;
  logic [NUM_WTA-1:0][PAT_LEN-1:0] w1, s_w1;
  logic [NUM_WTA-1:0][NUM_CLASS-1:0][PAT_LEN-1:0] w2, s_w2;
  logic [MAX_MSG-1:0] msg_valid, s_valid;
  logic [MAX_MSG-1:0][NUM_WTA-1:0][CLS_W-1:0] msg_class, s_class;
  int checks = 0, failures = 0;

  tom_weight_regs #(.PAT_LEN(PAT_LEN), .NUM_CLASS(NUM_CLASS), .NUM_WTA(NUM_WTA),
                    .MAX_MSG(MAX_MSG)) dut (.*);

  always #5 clk = ~clk;

  task automatic compare(string what);
    checks++;
    if (w1 !== s_w1 || w2 !== s_w2 || msg_valid !== s_valid || msg_class !== s_class) begin
      failures++; $display("%s: register contents differ", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    s_w1 = '1; s_w2 = '0; s_valid = '0; s_class = '0;
    compare("reset");
    repeat (600) begin
      int k;
      k = $urandom_range(0, 2);
      wr_en   = ($urandom_range(0, 5) != 0);
      wr_wta  = WTA_W'($urandom_range(0, NUM_WTA - 1));
      wr_data = PAT_LEN'($urandom());
      wr_msg_valid = 1'($urandom());
      for (int x = 0; x < NUM_WTA; x++) wr_msg_class[x] = CLS_W'($urandom_range(0, NUM_CLASS - 1));
      case (k)
        0: begin wr_sel = tom_pkg::WSEL_W2;  wr_idx = IDX_W'($urandom_range(0, NUM_CLASS - 1)); end
        1: begin wr_sel = tom_pkg::WSEL_W1;  wr_idx = '0; end
        default: begin wr_sel = tom_pkg::WSEL_MSG; wr_idx = IDX_W'($urandom_range(0, MAX_MSG - 1)); end
      endcase
      @(posedge clk); #1;
      if (wr_en) case (k)
        0: s_w2[wr_wta][wr_idx] = wr_data;
        1: s_w1[wr_wta] = wr_data;
        default: begin s_class[wr_idx] = wr_msg_class; s_valid[wr_idx] = wr_msg_valid; end
      endcase
      compare("write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
