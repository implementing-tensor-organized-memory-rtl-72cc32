// tb_dlbs_spike_cmp: exhaustive check of the spike comparator: r must equal s when
// s > smin and zero otherwise, for every pair of 5-bit values.
module tb_dlbs_spike_cmp;
  localparam int unsigned S_W = 5;
  logic [S_W-1:0] s, smin, r;
  int checks = 0, failures = 0;

  dlbs_spike_cmp #(.S_W(S_W)) dut (.*);

  initial begin
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        s = S_W'(a); smin = S_W'(b); #1;
        checks++;
        if (int'(r) != ((a > b) ? a : 0)) begin
          failures++; $display("s=%0d smin=%0d r=%0d", a, b, r);
        end
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
