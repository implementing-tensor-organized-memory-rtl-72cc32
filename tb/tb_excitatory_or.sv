// tb_excitatory_or: self-checking test of the lateral excitatory OR network.
//
// Random stored messages and random winner vectors are applied. The expected output is
// computed message by message in a different way from the block: a message is "active"
// when at least two of its members won, or when one member won and it is that member's
// own bit, and every member of an active message is set. Directed cases check the
// retrieval of a message with one and with two erased patterns.
module tb_excitatory_or;
  localparam int unsigned NUM_WTA = 4, NUM_CLASS = 25, MAX_MSG = 8, CLS_W = 5;
  logic [NUM_WTA-1:0][NUM_CLASS-1:0] winners, retrieved, expct;
  logic [MAX_MSG-1:0] msg_valid;
  logic [MAX_MSG-1:0][NUM_WTA-1:0][CLS_W-1:0] msg_class;
  int checks = 0, failures = 0;

  excitatory_or #(.NUM_WTA(NUM_WTA), .NUM_CLASS(NUM_CLASS), .MAX_MSG(MAX_MSG)) dut (.*);

  task automatic compute();
    expct = winners;
    for (int m = 0; m < MAX_MSG; m++) begin
      int hits;
      if (!msg_valid[m]) continue;
      hits = 0;
      for (int x = 0; x < NUM_WTA; x++) hits += int'(winners[x][msg_class[m][x]]);
      // member x is set by the others when at least one *other* member won
      for (int x = 0; x < NUM_WTA; x++)
        if (hits - int'(winners[x][msg_class[m][x]]) > 0) expct[x][msg_class[m][x]] = 1'b1;
    end
  endtask

  task automatic check(string what);
    #1;
    compute();
    checks++;
    if (retrieved !== expct) begin failures++; $display("%s: got %h expected %h", what, retrieved, expct); end
  endtask

  initial begin
    for (int m = 0; m < MAX_MSG; m++)
      for (int x = 0; x < NUM_WTA; x++) msg_class[m][x] = CLS_W'($urandom_range(0, NUM_CLASS - 1));
    msg_valid = '1;
    // one erased pattern
    winners = '0;
    for (int x = 0; x < NUM_WTA - 1; x++) winners[x][msg_class[3][x]] = 1'b1;
    check("one erased");
    checks++;
    if (!retrieved[NUM_WTA-1][msg_class[3][NUM_WTA-1]]) begin failures++; $display("not retrieved"); end
    // two erased patterns
    winners = '0;
    winners[1][msg_class[5][1]] = 1'b1;
    winners[2][msg_class[5][2]] = 1'b1;
    check("two erased");
    checks++;
    if (!retrieved[0][msg_class[5][0]] || !retrieved[3][msg_class[5][3]]) begin failures++; $display("not retrieved 2"); end
    // invalid message does nothing
    msg_valid = 8'b1101_0111;
    check("invalid");
    // random
    repeat (500) begin
      msg_valid = MAX_MSG'($urandom());
      for (int m = 0; m < MAX_MSG; m++)
        for (int x = 0; x < NUM_WTA; x++) msg_class[m][x] = CLS_W'($urandom_range(0, NUM_CLASS - 1));
      winners = '0;
      for (int x = 0; x < NUM_WTA; x++)
        if ($urandom_range(0, 2) != 0) winners[x][$urandom_range(0, NUM_CLASS - 1)] = 1'b1;
      // often make the winners match a stored message
      if ($urandom_range(0, 1) != 0) begin
        int m = $urandom_range(0, MAX_MSG - 1);
        for (int x = 0; x < NUM_WTA; x++)
          if ($urandom_range(0, 1) != 0) begin winners[x] = '0; winners[x][msg_class[m][x]] = 1'b1; end
      end
      check("random");
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
