// tb_dlbs_popcount: checks the XNOR/popcount stage against a bit-by-bit count of equal
// pixels (PAT_LEN minus the number of differing pixels) for directed and random inputs.
module tb_dlbs_popcount;
  localparam int unsigned PAT_LEN = 25;
  logic [PAT_LEN-1:0] pattern, w;
  logic [4:0] s;
  int checks = 0, failures = 0;

  dlbs_popcount #(.PAT_LEN(PAT_LEN)) dut (.*);

  task automatic check();
    int diff;
    #1;
    diff = 0;
    for (int i = 0; i < PAT_LEN; i++) if (pattern[i] != w[i]) diff++;
    checks++;
    if (int'(s) != PAT_LEN - diff) begin
      failures++; $display("p=%h w=%h s=%0d expected %0d", pattern, w, s, PAT_LEN - diff);
    end
  endtask

  initial begin
    pattern = '0; w = '0; check();          // all black agree: 25
    pattern = '1; w = '1; check();          // all white agree: 25
    pattern = '1; w = '0; check();          // nothing agrees: 0
    repeat (1000) begin
      pattern = PAT_LEN'($urandom()); w = PAT_LEN'($urandom()); check();
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
