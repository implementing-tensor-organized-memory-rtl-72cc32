// tb_lif_fp_neuron: self-checking test of the floating-point output LIF neuron.
//
// An independent model keeps the potential as a real number and applies
// u <- tr(tr(u*eta) + I), where tr() truncates to a 24-bit significand (the neuron's
// round-toward-zero single precision). Potential and spike are compared every cycle for
// random inputs, random eta in (0, 1] and gamma, and random inhibit pulses; small and
// unrepresentable values (eta = 0.1) exercise truncation and underflow to zero. The step
// response latency is checked against the closed form of the document's LIF step response.
module tb_lif_fp_neuron;
  import tom_ref_pkg::fp2real, tom_ref_pkg::real2fp, tom_ref_pkg::tr;
  localparam int unsigned IN_W = 5;
  logic clk = 0, rst_n = 0, clr = 0, inhibit = 0;
  logic [IN_W-1:0] in_i = '0;
  logic [31:0] eta, gamma, u;
  logic spike;
  int checks = 0, failures = 0;

  lif_fp_neuron #(.IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  real m_u;

  task automatic step(input int i_in, input bit inh);
    real nxt;
    in_i = IN_W'(i_in); inhibit = inh;
    nxt = tr(tr(m_u * fp2real(eta)) + real'(i_in));
    if (inh || m_u >= fp2real(gamma)) nxt = 0.0;
    @(posedge clk); #1;
    m_u = nxt;
    checks++;
    if (u != real2fp(m_u) || spike != (m_u >= fp2real(gamma))) begin
      failures++;
      $display("mismatch u=%h (%f) model=%h (%f) spike=%b", u, fp2real(u), real2fp(m_u), m_u, spike);
    end
  endtask

  initial begin
    int n, expect_n;
    real s, e;
    eta = real2fp(0.5); gamma = real2fp(1000.0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1; m_u = 0.0;
    for (int blk = 0; blk < 20; blk++) begin
      eta   = (blk % 5 == 4) ? real2fp(0.1) : real2fp(real'($urandom_range(1, 256)) / 256.0);
      gamma = real2fp(real'($urandom_range(1, 20000)) / 16.0);
      repeat (50) step($urandom_range(0, 4) == 0 ? 0 : $urandom_range(0, 31), $urandom_range(0, 15) == 0);
    end
    // decay towards underflow: no input, eta tiny
    eta = real2fp(0.001); gamma = real2fp(1.0e30);
    step(31, 0);
    repeat (20) step(0, 0);
    checks++; if (u != '0) begin failures++; $display("no underflow to zero"); end
    // step response: I = 4, eta = 0.5, gamma = 7.5 -> u = 4, 6, 7, 7.5 : spike after 4 inputs
    eta = real2fp(0.5); gamma = real2fp(7.5);
    clr = 1; @(posedge clk); #1 clr = 0; m_u = 0.0;
    n = 0;
    while (!spike && n < 40) begin step(4, 0); n++; end
    // closed form: s[n] = beta*(1-alpha^n)/(1-alpha) with beta = 4, alpha = 0.5
    expect_n = 0; s = 0.0; e = 1.0;
    while (s < 7.5) begin expect_n++; e = e * 0.5; s = 8.0 * (1.0 - e); end
    checks++;
    if (n != expect_n) begin failures++; $display("step latency %0d expected %0d", n, expect_n); end
    step(4, 0);
    checks++; if (u != 0) begin failures++; $display("no reset after spike"); end
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
