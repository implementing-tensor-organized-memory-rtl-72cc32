// tb_lif_sr_neuron: self-checking test of the shift-register LIF neuron.
//
// Drives random and constant input sequences, keeps an independent integer model of
// u[n] = u[n-1]/2 + 2*I[n] (scaled by 2^(SR_BITS-1) so it stays integral) with a spike
// when u reaches 4 - 2^(2-SR_BITS), and compares potential and spike every cycle. It
// also checks that a constant active input gives a spike period of SR_BITS+1 cycles.
module tb_lif_sr_neuron;
  localparam int unsigned N = 6;
  logic clk = 0, rst_n = 0, clr = 0, p = 0, w = 0;
  logic [N-1:0] u;
  logic spike;
  int checks = 0, failures = 0;

  lif_sr_neuron #(.SR_BITS(N)) dut (.*);

  always #5 clk = ~clk;

  // Model: potential in units of 2^(2-N) (the LSB weight); full = 2^N - 1.
  int unsigned m_u;
  int unsigned full = (1 << N) - 1;

  task automatic step(input logic pi, input logic wi);
    p = pi; w = wi;
    @(posedge clk); #1;
    if (m_u == full) m_u = 0;
    else m_u = (m_u >> 1) + ((pi & wi) ? (1 << (N - 1)) : 0);
    checks++;
    if (u !== m_u[N-1:0] || spike !== (m_u == full)) begin
      failures++;
      $display("mismatch: u=%b model=%b spike=%b", u, m_u[N-1:0], spike);
    end
  endtask

  initial begin
    int last, period_ok;
    repeat (2) @(posedge clk);
    #1 rst_n = 1; m_u = 0;
    // random inputs
    repeat (300) step(1'($urandom_range(0, 3) != 0), 1'($urandom_range(0, 4) != 0));
    // clear, then constant input: spikes every N+1 cycles, first after N cycles
    clr = 1; @(posedge clk); #1 clr = 0; m_u = 0;
    last = -1; period_ok = 0;
    for (int c = 1; c <= 5 * (N + 1); c++) begin
      step(1, 1);
      if (spike) begin
        checks++;
        if (last < 0) begin
          if (c != N) begin failures++; $display("first spike at %0d", c); end
        end else if (c - last != N + 1) begin
          failures++; $display("period %0d", c - last);
        end else period_ok++;
        last = c;
      end
    end
    checks++;
    if (period_ok != 4) begin failures++; $display("periods seen %0d", period_ok); end
    // weight zero blocks the input: no spike ever
    repeat (3 * N) begin
      step(1, 0);
      checks++; if (spike) failures++;
    end
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
