// tb_dlbs_winner_cmp: checks the winner comparator against a sequential arg-max search
// (first maximum wins, no winner when every rate is zero) for directed ties and random rates.
module tb_dlbs_winner_cmp;
  localparam int unsigned NUM_CLASS = 25, S_W = 5;
  logic [NUM_CLASS-1:0][S_W-1:0] r;
  logic [NUM_CLASS-1:0] winner;
  int checks = 0, failures = 0;

  dlbs_winner_cmp #(.NUM_CLASS(NUM_CLASS), .S_W(S_W)) dut (.*);

  task automatic check();
    int best, bv;
    logic [NUM_CLASS-1:0] e;
    #1;
    best = -1; bv = 0;
    for (int j = 0; j < NUM_CLASS; j++) if (int'(r[j]) > bv) begin bv = int'(r[j]); best = j; end
    e = (best < 0) ? '0 : (NUM_CLASS'(1) << best);
    checks++;
    if (winner !== e) begin failures++; $display("winner %h expected %h", winner, e); end
  endtask

  initial begin
    r = '0; check();                                   // no winner
    r = '0; r[7] = 5'd9; r[3] = 5'd9; check();         // tie: lower index
    r = '0; r[24] = 5'd1; check();
    repeat (2000) begin
      for (int j = 0; j < NUM_CLASS; j++)
        r[j] = ($urandom_range(0, 3) == 0) ? '0 : S_W'($urandom_range(0, 25));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
