// tb_tom_top: end-to-end test of the whole TOM at its default sizes.
//
// 1. Loads 25 trained patterns into each of the 4 modules, a pixel-enable row, and 8 stored
//    messages through the register write port (then overwrites and invalidates one slot).
// 2. Retrieval workload: stored messages with pixel noise of 0..50 % and with zero, one or
//    two erased (all-black) patterns are presented to both engines at once. Each result
//    is checked against the reference models, and the share of fully retrieved messages
//    per noise level and erasure count is printed for both engines.
// 3. A burst of back-to-back messages checks that the DLBS engine accepts one per clock.
// Every mechanism is counted and must occur at least once: writes to each bank, a module
// without a winner (spiking: no spike; DLBS: below Smin), a winner needing several input
// impulses, completion of a message by the excitatory connections, a full retrieval of a
// message with an erased pattern, and back-to-back DLBS issue.
module tb_tom_top;
  import tom_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_msg_valid = 0;
  logic [1:0] wr_sel = '0;
  logic [1:0] wr_wta = '0;
  logic [4:0] wr_idx = '0;
  logic [PAT_LEN-1:0] wr_data = '0;
  logic [NUM_WTA-1:0][CLS_W-1:0] wr_msg_class = '0;
  logic [31:0] cfg_eta = real2fp(1.0);
  logic [31:0] cfg_gamma = real2fp(60.0);
  logic [4:0] cfg_smin = 5'd19;
  logic [NUM_WTA-1:0][PAT_LEN-1:0] message = '0;
  logic norm_start = 0, norm_busy, norm_done;
  wvec_t norm_winners, norm_retrieved;
  logic dlbs_in_valid = 0, dlbs_out_valid;
  wvec_t dlbs_winners, dlbs_retrieved;

  tom_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_w2 = 0, n_w1 = 0, n_msg = 0, n_silent_n = 0, n_silent_d = 0, n_multi = 0;
  int n_comp_n = 0, n_comp_d = 0, n_erased_ok = 0, n_b2b = 0;

  // model state
  logic [NUM_WTA-1:0][NUM_CLASS-1:0][PAT_LEN-1:0] m_w2;
  logic [NUM_WTA-1:0][PAT_LEN-1:0] m_w1;
  logic [MAX_MSG-1:0] m_valid;
  mclass_t m_class;

  task automatic wr(input int sel, input int x, input int idx, input logic [PAT_LEN-1:0] d,
                    input logic [NUM_WTA-1:0][CLS_W-1:0] mc, input logic v);
    wr_en = 1; wr_sel = 2'(sel); wr_wta = 2'(x); wr_idx = 5'(idx); wr_data = d;
    wr_msg_class = mc; wr_msg_valid = v;
    @(posedge clk); #1 wr_en = 0;
    case (sel)
      0: begin m_w2[x][idx] = d; n_w2++; end
      1: begin m_w1[x] = d; n_w1++; end
      default: begin m_class[idx] = mc; m_valid[idx] = v; n_msg++; end
    endcase
  endtask

  function automatic wvec_t expected_msg(int m);
    wvec_t e;
    e = '0;
    for (int x = 0; x < NUM_WTA; x++) e[x][m_class[m][x]] = 1'b1;
    return e;
  endfunction

  // One retrieval through both engines; returns which engines retrieved message m exactly.
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
      int fe;
      ewn[x] = ref_normal_winner(message[x], m_w1[x], m_w2[x], fp2real(cfg_eta), fp2real(cfg_gamma), fe);
      ewd[x] = ref_dlbs_winner(message[x], m_w2[x], int'(cfg_smin));
      if (fe < 0) n_silent_n++;
      if (fe > int'(SR_BITS) + 2) n_multi++;
      if (ewd[x] == '0) n_silent_d++;
    end
    ern = ref_excite(ewn, m_valid, m_class);
    erd = ref_excite(ewd, m_valid, m_class);
    if (ern != ewn) n_comp_n++;
    if (erd != ewd) n_comp_d++;
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
    logic [NUM_WTA-1:0][NUM_CLASS-1:0][PAT_LEN-1:0] letters;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    m_w1 = '1; m_w2 = '0; m_valid = '0; m_class = '0;
    // --- training results into the registers
    for (int x = 0; x < NUM_WTA; x++) letters[x] = make_letters(8);
    for (int x = 0; x < NUM_WTA; x++)
      for (int j = 0; j < NUM_CLASS; j++) wr(0, x, j, letters[x][j], '0, 0);
    wr(1, 3, 0, PAT_LEN'($urandom()) | PAT_LEN'($urandom()), '0, 0);
    for (int m = 0; m < MAX_MSG; m++) begin
      logic [NUM_WTA-1:0][CLS_W-1:0] mc;
      // distinct classes per module across messages keep cliques separate
      for (int x = 0; x < NUM_WTA; x++) mc[x] = CLS_W'((m * 3 + x * 7 + 1) % NUM_CLASS);
      wr(2, 0, m, '0, mc, 1);
    end
    wr(2, 0, 7, '0, '0, 0);   // free slot 7 again
    checks++;
    if (dut.w2 !== m_w2 || dut.w1 !== m_w1 || dut.msg_valid !== m_valid || dut.msg_class !== m_class) begin
      failures++; $display("register file differs from what was written");
    end
    // --- retrieval workload
    for (int erase = 0; erase <= 2; erase++)
      for (int noise = 0; noise <= 50; noise += 10) begin
        int okn, okd;
        okn = 0; okd = 0;
        for (int t = 0; t < 10; t++) begin
          bit a, b;
          retrieve(t % 7, noise, erase, a, b);
          okn += int'(a); okd += int'(b);
        end
        $display("erased %0d noise %2d%%: retrieved spiking %0d/10, DLBS %0d/10", erase, noise, okn, okd);
      end
    // --- back-to-back DLBS burst
    fork
      begin
        for (int t = 0; t < 16; t++) begin
          for (int x = 0; x < NUM_WTA; x++) message[x] = m_w2[x][m_class[t % 7][x]];
          dlbs_in_valid = 1;
          @(posedge clk); #1;
        end
        dlbs_in_valid = 0;
      end
      begin
        int got;
        got = 0;
        repeat (4) @(posedge clk);
        #1;
        while (got < 16) begin
          checks++;
          if (!dlbs_out_valid || dlbs_retrieved !== expected_msg(got % 7)) begin
            failures++; $display("burst result %0d wrong or missing", got);
          end else n_b2b++;
          got++;
          @(posedge clk); #1;
        end
      end
    join
    // --- every mechanism happened
    $display("writes w2 %0d w1 %0d msg %0d; silent spiking %0d, silent DLBS %0d; multi-impulse %0d",
             n_w2, n_w1, n_msg, n_silent_n, n_silent_d, n_multi);
    $display("completions spiking %0d DLBS %0d; erased messages restored %0d; back-to-back %0d",
             n_comp_n, n_comp_d, n_erased_ok, n_b2b);
    checks += 10;
    if (n_w2 == 0)        begin failures++; $display("no w2 write"); end
    if (n_w1 == 0)        begin failures++; $display("no w1 write"); end
    if (n_msg == 0)       begin failures++; $display("no message write"); end
    if (n_silent_n == 0)  begin failures++; $display("no silent spiking module"); end
    if (n_silent_d == 0)  begin failures++; $display("no silent DLBS module"); end
    if (n_multi == 0)     begin failures++; $display("no multi-impulse winner"); end
    if (n_comp_n == 0)    begin failures++; $display("no spiking completion"); end
    if (n_comp_d == 0)    begin failures++; $display("no DLBS completion"); end
    if (n_erased_ok == 0) begin failures++; $display("no erased message restored"); end
    if (n_b2b != 16)      begin failures++; $display("back-to-back issue failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
