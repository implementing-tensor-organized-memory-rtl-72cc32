// tb_wta_snn: self-checking test of the spiking WTA module.
//
// Random binary class patterns are loaded as second-layer weights and a noisy copy of
// one of them is applied. The expected winner is computed independently as the class
// with the largest overlap popcount(pattern & w2[j]) (lowest index on a tie). gamma is set
// to k times the largest overlap, with eta = 1, so the winner must be latched after
// exactly k first-layer impulses: SR_BITS + 1 + (k-1)*(SR_BITS+1) + 1 clocks after clr.
// An all-zero (erased) pattern must produce no winner.
module tb_wta_snn;
  localparam int unsigned PAT_LEN = 25, NUM_CLASS = 25, SR_BITS = 6;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [PAT_LEN-1:0] pattern = '0, w1 = '1;
  logic [NUM_CLASS-1:0][PAT_LEN-1:0] w2;
  logic [31:0] eta = 32'h3F80_0000;    // 1.0
  logic [31:0] gamma = 32'h7F7F_FFFF;  // largest finite value
  logic [NUM_CLASS-1:0] class_spike, winner;
  logic win_valid;
  int checks = 0, failures = 0;

  wta_snn #(.PAT_LEN(PAT_LEN), .NUM_CLASS(NUM_CLASS), .SR_BITS(SR_BITS))
    dut (.*);

  always #5 clk = ~clk;

  function automatic int overlap(logic [PAT_LEN-1:0] a, logic [PAT_LEN-1:0] b);
    return $countones(a & b);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int j = 0; j < NUM_CLASS; j++) w2[j] = PAT_LEN'($urandom());
    for (int t = 0; t < 40; t++) begin
      int k, best, bs, lat, lat_exp;
      int cls;
      cls = $urandom_range(0, NUM_CLASS - 1);
      pattern = w2[cls];
      repeat ($urandom_range(0, 3)) pattern[$urandom_range(0, PAT_LEN - 1)] ^= 1'b1;
      if (t % 10 == 9) w1 = PAT_LEN'($urandom()); else w1 = '1;
      best = 0; bs = -1;
      for (int j = 0; j < NUM_CLASS; j++)
        if (overlap(pattern & w1, w2[j]) > bs) begin bs = overlap(pattern & w1, w2[j]); best = j; end
      k = $urandom_range(1, 3);
      gamma = tom_ref_pkg::real2fp(real'(k * bs));
      clr = 1; @(posedge clk); #1 clr = 0;
      lat = 0;
      while (!win_valid && lat < 200) begin @(posedge clk); #1 lat++; end
      lat_exp = (bs == 0) ? 200 : k * (SR_BITS + 1) + 1;
      checks += 2;
      if (bs > 0 && winner != (NUM_CLASS'(1) << best)) begin
        failures++; $display("test %0d winner %h expected class %0d", t, winner, best);
      end
      if (lat != lat_exp) begin
        failures++; $display("test %0d latency %0d expected %0d", t, lat, lat_exp);
      end
    end
    // erased pattern: no winner
    pattern = '0; w1 = '1; gamma = 32'h3F80_0000;
    clr = 1; @(posedge clk); #1 clr = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (win_valid || |class_spike) begin failures++; $display("winner on erased pattern"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
