// tb_dlbs_wta: streams random noisy patterns into one DLBS WTA module, one per clock,
// and checks each winner against an independent model (most agreeing pixels above Smin,
// lowest index on a tie) and the three-clock latency. Erased (all-zero) inputs with a
// high Smin must give no winner.
module tb_dlbs_wta;
  localparam int unsigned PAT_LEN = 25, NUM_CLASS = 25, S_W = 5, LAT = 3;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [PAT_LEN-1:0] pattern = '0;
  logic [NUM_CLASS-1:0][PAT_LEN-1:0] w;
  logic [S_W-1:0] smin = 5'd12;
  logic out_valid;
  logic [NUM_CLASS-1:0] winner;
  int checks = 0, failures = 0;

  dlbs_wta #(.PAT_LEN(PAT_LEN), .NUM_CLASS(NUM_CLASS)) dut (.*);

  always #5 clk = ~clk;

  logic [NUM_CLASS-1:0] exp_q[$];
  int sent_cycle[$];
  int cyc = 0;

  function automatic logic [NUM_CLASS-1:0] model(logic [PAT_LEN-1:0] p);
    int best, bv;
    best = -1; bv = int'(smin);
    for (int j = 0; j < NUM_CLASS; j++) begin
      int a = PAT_LEN - $countones(p ^ w[j]);
      if (a > bv) begin bv = a; best = j; end
    end
    return (best < 0) ? '0 : (NUM_CLASS'(1) << best);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      checks += 2;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        logic [NUM_CLASS-1:0] e;
        int c0;
        e  = exp_q.pop_front();
        c0 = sent_cycle.pop_front();
        if (winner !== e) begin failures++; $display("winner %h expected %h", winner, e); end
        if (cyc - c0 != LAT) begin failures++; $display("latency %0d", cyc - c0); end
      end
    end
  end

  initial begin
    for (int j = 0; j < NUM_CLASS; j++) w[j] = PAT_LEN'($urandom());
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      if (t % 50 == 49) pattern = '0;
      else begin
        pattern = w[$urandom_range(0, NUM_CLASS - 1)];
        repeat ($urandom_range(0, 6)) pattern[$urandom_range(0, PAT_LEN - 1)] ^= 1'b1;
      end
      if (t == 150) smin = 5'd22;
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin exp_q.push_back(model(pattern)); sent_cycle.push_back(cyc + 1); end
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
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
