// lif_sr_neuron: input-layer leaky integrate-and-fire neuron built from one shift register.
//
// The neuron follows u[n] = alpha*u[n-1] + beta*I[n] with alpha = 0.5 and beta = 2, the
// values of the document's step-response example. With those constants the membrane
// potential is exactly a shift register read as a fixed-point number whose MSB weighs 2,
// the next bit 1, then 1/2, 1/4 and so on: each clock the register shifts right (the
// multiplication by alpha, i.e. the leak) and the new input bit I[n] = P AND w enters at
// the MSB (the addition of beta*I[n]). The step response therefore climbs 0, 2, 3, 3.5,
// 3.75, ... towards beta/(1-alpha) = 4.
//
// The threshold is the largest value the register can hold, 4 - 2^(2-SR_BITS): the neuron
// spikes when every bit is one, that is after SR_BITS consecutive active inputs. The
// spike is the AND of the register bits (combinational from the register); it feeds back
// to the register's synchronous reset, so on the next clock the register is cleared. With
// a constant active input the neuron spikes one cycle in every SR_BITS+1.
//
// Interface: p and w are the pattern pixel and its weight; clr clears the potential
// (start of a new message); u is the register itself, MSB first; spike is high for one
// cycle. Reset is active-low and synchronous to clk, like clr.
//
// Following the document: the AND of pattern and weight, the single shift register, the
// spike-driven reset and alpha = 0.5, beta = 2. Own choices: SR_BITS = 6 and the
// synchronous clear port.
module lif_sr_neuron #(
  parameter int unsigned SR_BITS = tom_pkg::SR_BITS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic               p,
  input  logic               w,
  output logic [SR_BITS-1:0] u,
  output logic               spike
);

  assign spike = &u;

  always_ff @(posedge clk) begin
    if (!rst_n || clr || spike) u <= '0;
    else                        u <= {p & w, u[SR_BITS-1:1]};
  end

endmodule
