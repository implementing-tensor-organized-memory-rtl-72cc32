// tb_tom_img64: retrieval workload on 8 x 8 pixel patterns (PAT_LEN = 64).
//
// The letter images used to evaluate the memory are 8 x 8 pixels, while the default WTA
// module has 25 input neurons. This test builds the whole design with PAT_LEN = 64 so that
// each pixel of an 8 x 8 image drives its own input neuron; all other sizes stay at their
// defaults (25 classes, 4 modules, 8 message slots, 64-clock window).
//
// It loads 25 random 64-pixel class images per module (pairwise at least 20 pixels apart)
// and 7 messages, then presents stored messages with pixel-flip noise of 0..50 % and with
// zero, one or two erased (all-black) images, 20 times per setting, to both engines at
// once. Every result is compared with models kept in this file (DLBS: most matching
// pixels above Smin; spiking: per-class integration u <- tr(tr(u*eta) + S) in real
// arithmetic, truncated to single precision) and with the shared excitatory-OR model.
// Latencies are checked (DLBS 4 clocks, spiking WINDOW+3 counted from the start clock).
// The share of fully retrieved messages per setting is printed. The settings scale those
// of the 25-pixel test: Smin = 48 of 64 pixels, gamma = 150, eta = 1.
module tb_tom_img64;
  import tom_ref_pkg::fp2real, tom_ref_pkg::real2fp, tom_ref_pkg::tr, tom_ref_pkg::ref_excite;
  import tom_ref_pkg::wvec_t, tom_ref_pkg::mclass_t, tom_ref_pkg::onehot_t;
  localparam int unsigned PAT_LEN = 64, NUM_CLASS = 25, NUM_WTA = 4, MAX_MSG = 8, CLS_W = 5;
  localparam int unsigned SR_BITS = 6, WINDOW = 64, TRIALS = 20;
  typedef logic [PAT_LEN-1:0] pat_t;
  typedef logic [NUM_CLASS-1:0][PAT_LEN-1:0] rows_t;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_msg_valid = 0;
  logic [1:0] wr_sel = '0;
  logic [1:0] wr_wta = '0;
  logic [4:0] wr_idx = '0;
  pat_t wr_data = '0;
  logic [NUM_WTA-1:0][CLS_W-1:0] wr_msg_class = '0;
  logic [31:0] cfg_eta = real2fp(1.0);
  logic [31:0] cfg_gamma = real2fp(150.0);
  logic [6:0] cfg_smin = 7'd48;
  logic [NUM_WTA-1:0][PAT_LEN-1:0] message = '0;
  logic norm_start = 0, norm_busy, norm_done;
  wvec_t norm_winners, norm_retrieved;
  logic dlbs_in_valid = 0, dlbs_out_valid;
  wvec_t dlbs_winners, dlbs_retrieved;

  tom_top #(.PAT_LEN(PAT_LEN)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_comp = 0, n_erased_ok = 0;

  logic [NUM_WTA-1:0][NUM_CLASS-1:0][PAT_LEN-1:0] m_w2;
  logic [MAX_MSG-1:0] m_valid;
  mclass_t m_class;

  function automatic onehot_t dlbs_model(pat_t p, rows_t w, int smin);
    int best, bv;
    best = -1; bv = smin;
    for (int j = 0; j < NUM_CLASS; j++) begin
      int a;
      a = PAT_LEN - $countones(p ^ w[j]);
      if (a > bv) begin bv = a; best = j; end
    end
    return (best < 0) ? '0 : (NUM_CLASS'(1) << best);
  endfunction

  // w1 stays at its reset value (all ones), so the overlap is popcount(p & w2[j]).
  function automatic onehot_t spiking_model(pat_t p, rows_t w2, real eta, real gamma);
    real u[NUM_CLASS];
    int s[NUM_CLASS];
    for (int j = 0; j < NUM_CLASS; j++) begin
      u[j] = 0.0;
      s[j] = $countones(p & w2[j]);
    end
    for (int e = 1; e <= int'(WINDOW); e++) begin
      for (int j = 0; j < NUM_CLASS; j++)
        if (u[j] >= gamma) return NUM_CLASS'(1) << j;
      for (int j = 0; j < NUM_CLASS; j++)
        u[j] = tr(tr(u[j] * eta) + ((e % (SR_BITS + 1) == 0) ? real'(s[j]) : 0.0));
    end
    return '0;
  endfunction

  function automatic pat_t random_image();
    return {$urandom(), $urandom()};
  endfunction

  function automatic pat_t add_noise(pat_t p, int pct);
    pat_t q;
    q = p;
    for (int i = 0; i < PAT_LEN; i++) if ($urandom_range(0, 99) < pct) q[i] = ~q[i];
    return q;
  endfunction

  function automatic wvec_t expected_msg(int m);
    wvec_t e;
    e = '0;
    for (int x = 0; x < NUM_WTA; x++) e[x][m_class[m][x]] = 1'b1;
    return e;
  endfunction

  task automatic wr(input int sel, input int x, input int idx, input pat_t d,
                    input logic [NUM_WTA-1:0][CLS_W-1:0] mc);
    wr_en = 1; wr_sel = 2'(sel); wr_wta = 2'(x); wr_idx = 5'(idx); wr_data = d;
    wr_msg_class = mc; wr_msg_valid = 1'b1;
    @(posedge clk); #1 wr_en = 0;
  endtask

  task automatic retrieve(input int m, input int noise, input int erase,
                          output bit ok_n, output bit ok_d);
    wvec_t ewn, ewd, ern, erd;
    int lat;
    int pos[$];
    for (int x = 0; x < NUM_WTA; x++) message[x] = add_noise(m_w2[x][m_class[m][x]], noise);
    for (int x = 0; x < NUM_WTA; x++) pos.push_back(x);
    pos.shuffle();
    for (int e = 0; e < erase; e++) message[pos[e]] = '0;
    for (int x = 0; x < NUM_WTA; x++) begin
      ewn[x] = spiking_model(message[x], m_w2[x], fp2real(cfg_eta), fp2real(cfg_gamma));
      ewd[x] = dlbs_model(message[x], m_w2[x], int'(cfg_smin));
    end
    ern = ref_excite(ewn, m_valid, m_class);
    erd = ref_excite(ewd, m_valid, m_class);
    if (ern != ewn || erd != ewd) n_comp++;
    norm_start = 1; dlbs_in_valid = 1;
    @(posedge clk); #1 norm_start = 0; dlbs_in_valid = 0;
    lat = 1;
    while (!dlbs_out_valid && lat < 20) begin @(posedge clk); #1 lat++; end
    checks += 3;
    if (lat != 4) begin failures++; $display("DLBS latency %0d", lat); end
    if (dlbs_winners !== ewd) begin failures++; $display("DLBS winners %h expected %h", dlbs_winners, ewd); end
    if (dlbs_retrieved !== erd) begin failures++; $display("DLBS retrieved %h expected %h", dlbs_retrieved, erd); end
    while (!norm_done && lat < 200) begin @(posedge clk); #1 lat++; end
    checks += 3;
    if (lat != int'(WINDOW) + 3) begin failures++; $display("spiking latency %0d", lat); end
    if (norm_winners !== ewn) begin failures++; $display("spiking winners %h expected %h", norm_winners, ewn); end
    if (norm_retrieved !== ern) begin failures++; $display("spiking retrieved %h expected %h", norm_retrieved, ern); end
    ok_n = (norm_retrieved == expected_msg(m));
    ok_d = (dlbs_retrieved == expected_msg(m));
    if (erase > 0 && (ok_n || ok_d)) n_erased_ok++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    m_valid = '0; m_class = '0;
    for (int x = 0; x < NUM_WTA; x++)
      for (int j = 0; j < NUM_CLASS; j++) begin
        bit ok;
        do begin
          m_w2[x][j] = random_image();
          ok = 1;
          for (int k = 0; k < j; k++) if ($countones(m_w2[x][j] ^ m_w2[x][k]) < 20) ok = 0;
        end while (!ok);
        wr(0, x, j, m_w2[x][j], '0);
      end
    for (int m = 0; m < 7; m++) begin
      for (int x = 0; x < NUM_WTA; x++) m_class[m][x] = CLS_W'((m * 3 + x * 7 + 1) % NUM_CLASS);
      m_valid[m] = 1'b1;
      wr(2, 0, m, '0, m_class[m]);
    end
    for (int erase = 0; erase <= 2; erase++)
      for (int noise = 0; noise <= 50; noise += 10) begin
        int okn, okd;
        okn = 0; okd = 0;
        for (int t = 0; t < int'(TRIALS); t++) begin
          bit a, b;
          retrieve(t % 7, noise, erase, a, b);
          okn += int'(a); okd += int'(b);
        end
        $display("8x8: erased %0d noise %2d%%: retrieved spiking %0d/%0d, DLBS %0d/%0d",
                 erase, noise, okn, TRIALS, okd, TRIALS);
        // noise-free messages with at most one erased image must come back whole
        if (noise == 0 && erase <= 1) begin
          checks++;
          if (okn != int'(TRIALS) || okd != int'(TRIALS)) begin
            failures++; $display("noise-free message not retrieved");
          end
        end
      end
    checks += 2;
    if (n_comp == 0)      begin failures++; $display("no completion by the excitatory connections"); end
    if (n_erased_ok == 0) begin failures++; $display("no erased message restored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
