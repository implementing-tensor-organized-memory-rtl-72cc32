// tb_tom_normal: runs messages through the spiking TOM and checks the winners and the
// completed messages after each integration window against the reference models, and the
// done rising on the (WINDOW+2)-th clock edge after the edge that samples start. eta and gamma are varied so that winners need
// one or several input impulses, and some patterns are erased or noisy.
module tb_tom_normal;
  import tom_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NUM_WTA-1:0][PAT_LEN-1:0] message = '0, w1;
  logic [NUM_WTA-1:0][NUM_CLASS-1:0][PAT_LEN-1:0] w2;
  logic [31:0] eta = real2fp(1.0);
  logic [31:0] gamma = real2fp(10.0);
  logic [MAX_MSG-1:0] msg_valid;
  mclass_t msg_class;
  logic busy, done;
  wvec_t winners, retrieved;
  int checks = 0, failures = 0, completions = 0, multi_impulse = 0, silent = 0;

  tom_normal dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int x = 0; x < NUM_WTA; x++) begin
      w2[x] = make_letters(8);
      w1[x] = '1;
    end
    w1[2] = PAT_LEN'($urandom()) | PAT_LEN'($urandom());
    msg_valid = '1;
    for (int m = 0; m < MAX_MSG; m++)
      for (int x = 0; x < NUM_WTA; x++) msg_class[m][x] = CLS_W'($urandom_range(0, NUM_CLASS - 1));
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int m, erase, lat;
      wvec_t ew, er;
      m = $urandom_range(0, MAX_MSG - 1);
      for (int x = 0; x < NUM_WTA; x++)
        message[x] = add_noise(w2[x][msg_class[m][x]], $urandom_range(0, 10));
      erase = $urandom_range(0, 2);
      for (int e = 0; e < erase; e++) message[$urandom_range(0, NUM_WTA - 1)] = '0;
      eta   = real2fp(real'($urandom_range(160, 256)) / 256.0);
      gamma = real2fp(real'($urandom_range(4, 24)) + real'($urandom_range(0, 7)) / 8.0);
      for (int x = 0; x < NUM_WTA; x++) begin
        int fe;
        ew[x] = ref_normal_winner(message[x], w1[x], w2[x], fp2real(eta), fp2real(gamma), fe);
        if (fe > int'(SR_BITS) + 2) multi_impulse++;
        if (fe < 0) silent++;
      end
      er = ref_excite(ew, msg_valid, msg_class);
      if (er != ew) completions++;
      start = 1; @(posedge clk); #1 start = 0;
      lat = 1;  // the start edge itself
      while (!done && lat < 200) begin @(posedge clk); #1 lat++; end
      checks += 3;
      if (winners !== ew) begin failures++; $display("t%0d winners %h expected %h", t, winners, ew); end
      if (retrieved !== er) begin failures++; $display("t%0d retrieved %h expected %h", t, retrieved, er); end
      if (lat != int'(WINDOW) + 3) begin failures++; $display("start-to-done %0d", lat); end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    checks += 3;
    if (completions == 0)   begin failures++; $display("no completion"); end
    if (multi_impulse == 0) begin failures++; $display("no multi-impulse integration"); end
    if (silent == 0)        begin failures++; $display("no silent module"); end
    $display("completions %0d, multi-impulse winners %0d, silent modules %0d",
             completions, multi_impulse, silent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
