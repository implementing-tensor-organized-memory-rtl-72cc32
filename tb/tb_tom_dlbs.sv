// tb_tom_dlbs: streams messages through the DLBS TOM, one per clock with random gaps, and
// checks winners and completed messages against the reference models, plus the four-clock
// latency. Messages are stored cliques with random pixel noise and zero, one or two erased
// (all-black) patterns, and some messages that were never stored.
module tb_tom_dlbs;
  import tom_ref_pkg::*;
  localparam int LAT = 4;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [NUM_WTA-1:0][PAT_LEN-1:0] message = '0;
  logic [NUM_WTA-1:0][NUM_CLASS-1:0][PAT_LEN-1:0] w2;
  logic [4:0] smin = 5'd18;
  logic [MAX_MSG-1:0] msg_valid;
  mclass_t msg_class;
  logic out_valid;
  wvec_t winners, retrieved;
  int checks = 0, failures = 0, completions = 0;

  tom_dlbs dut (.*);

  always #5 clk = ~clk;

  wvec_t exp_w[$], exp_r[$];
  int    exp_c[$];
  int    cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      wvec_t ew, er;
      int c0;
      checks += 3;
      ew = exp_w.pop_front(); er = exp_r.pop_front(); c0 = exp_c.pop_front();
      if (winners !== ew) begin failures++; $display("winners %h expected %h", winners, ew); end
      if (retrieved !== er) begin failures++; $display("retrieved %h expected %h", retrieved, er); end
      if (cyc - c0 != LAT) begin failures++; $display("latency %0d", cyc - c0); end
    end
  end

  initial begin
    for (int x = 0; x < NUM_WTA; x++) w2[x] = make_letters(8);
    msg_valid = 8'b0111_1111;
    for (int m = 0; m < MAX_MSG; m++)
      for (int x = 0; x < NUM_WTA; x++) msg_class[m][x] = CLS_W'($urandom_range(0, NUM_CLASS - 1));
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int m, erase;
      wvec_t ew;
      m = $urandom_range(0, MAX_MSG - 1);
      for (int x = 0; x < NUM_WTA; x++)
        message[x] = add_noise(w2[x][msg_class[m][x]], $urandom_range(0, 8));
      erase = $urandom_range(0, 2);
      for (int e = 0; e < erase; e++) message[$urandom_range(0, NUM_WTA - 1)] = '0;
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        for (int x = 0; x < NUM_WTA; x++) ew[x] = ref_dlbs_winner(message[x], w2[x], int'(smin));
        exp_w.push_back(ew);
        exp_r.push_back(ref_excite(ew, msg_valid, msg_class));
        if (ref_excite(ew, msg_valid, msg_class) != ew) completions++;
        exp_c.push_back(cyc + 1);
      end
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    checks += 2;
    if (exp_w.size() != 0) begin failures++; $display("missing outputs"); end
    if (completions == 0) begin failures++; $display("no message was completed"); end
    $display("completions by excitatory connections: %0d", completions);
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
