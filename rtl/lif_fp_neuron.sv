// lif_fp_neuron: output-layer (class) LIF neuron in floating point, with one multiplier.
//
// The document's output neuron integrates u[n] = alpha*u[n-1] + beta*I[n]. Dividing by
// beta gives the scaled form u'[n] = eta*u'[n-1] + I[n] with eta = alpha/beta and the
// threshold gamma' = gamma/beta, which behaves the same but needs one multiplier instead
// of two. This module implements that scaled form in floating point: each clock the stored
// potential is multiplied by eta, the integer input I[n] is converted to floating point
// and added, and the result is stored. The neuron spikes while its stored potential is at
// or above gamma. The potential is forced to zero on the next clock when the neuron spikes
// itself or when the inhibit input is high (another output neuron of the same WTA has
// spiked: the lateral inhibitory reset), and when clr starts a new message.
//
// Number format: IEEE-754 field layout {sign, EXP_W exponent bits, MAN_W fraction bits},
// single precision by default. All quantities are non-negative, so the sign is always zero
// and the adder never subtracts. Simplifications: an exponent field of zero means zero
// (no subnormals; results that underflow become zero), results that would overflow
// saturate at the largest finite value, there are no infinities or NaNs, and both the
// product and the sum are truncated (round toward zero). I must be below 2^(MAN_W+1) so
// that its conversion is exact. For non-negative values the comparison u >= gamma is an
// unsigned comparison of the encodings.
// The sign bit of u is therefore a constant zero. Truncating the product before the add
// gives the same result as a fused multiply-add with one truncation: I[n] is an integer,
// so it lies on the product's truncation grid whenever the product is below 2^(MAN_W+1).
//
// Timing: I[n] presented in a cycle is in u one clock later; spike is combinational from
// the stored potential, so an input that crosses the threshold shows as a spike one clock
// after it is applied, and the potential is zero the clock after that.
//
// Following the document: a floating-point neuron with the scaled recurrence and a single
// multiplier, the threshold comparator and the reset to zero by the neuron's own spike or
// by the inhibitory connection. Own choices: the format and its simplifications, a
// multiplier followed by an adder in place of a fused multiply-add (same results), and
// comparing the stored potential, which removes the extra two-cycle delay the document
// inserts to line the comparator up with the feedback path.
module lif_fp_neuron #(
  parameter int unsigned IN_W  = 5,
  parameter int unsigned EXP_W = tom_pkg::EXP_W,
  parameter int unsigned MAN_W = tom_pkg::MAN_W,
  localparam int unsigned FP_W = 1 + EXP_W + MAN_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic [IN_W-1:0] in_i,
  input  logic [FP_W-1:0] eta,
  input  logic [FP_W-1:0] gamma,
  input  logic            inhibit,
  output logic [FP_W-1:0] u,
  output logic            spike
);

  localparam int unsigned     SIG_W = MAN_W + 1;               // significand with hidden one
  localparam int              BIAS  = (1 << (EXP_W - 1)) - 1;
  localparam int              EMAX  = (1 << EXP_W) - 2;        // largest finite exponent
  localparam logic [FP_W-1:0] FMAX  = {1'b0, EXP_W'(EMAX), {MAN_W{1'b1}}};

  // ---- product p = u * eta -------------------------------------------------------------
  logic [FP_W-2:0]      p;      // magnitude (sign is zero)
  logic [2*SIG_W-1:0]   prod;
  int                   pe;

  always_comb begin
    prod = {1'b1, u[MAN_W-1:0]} * {1'b1, eta[MAN_W-1:0]};
    pe   = int'(u[FP_W-2:MAN_W]) + int'(eta[FP_W-2:MAN_W]) - BIAS;
    if (prod[2*SIG_W-1]) pe = pe + 1;
    if (u[FP_W-2:MAN_W] == '0 || eta[FP_W-2:MAN_W] == '0 || pe <= 0) p = '0;
    else if (pe > EMAX)                                                p = FMAX[FP_W-2:0];
    else if (prod[2*SIG_W-1]) p = {EXP_W'(pe), prod[2*SIG_W-2 -: MAN_W]};
    else                      p = {EXP_W'(pe), prod[2*SIG_W-3 -: MAN_W]};
  end

  // ---- conversion of the integer input ----------------------------------------------------
  logic [FP_W-2:0] fi;          // magnitude (sign is zero)
  logic [MAN_W-1:0] ishift;

  always_comb begin
    int msb;
    msb = -1;
    for (int b = 0; b < int'(IN_W); b++) if (in_i[b]) msb = b;
    ishift = '0;
    if (msb < 0) fi = '0;
    else begin
      ishift = MAN_W'((MAN_W + 1)'(in_i) << (MAN_W - msb));  // hidden one dropped
      fi     = {EXP_W'(BIAS + msb), ishift};
    end
  end

  // ---- sum s = p + fi (both non-negative) -------------------------------------------------
  logic [FP_W-2:0] op_hi, op_lo;
  logic [FP_W-1:0] s, u_next;
  logic [SIG_W:0]  ssum;
  logic [SIG_W-1:0] sm_al;
  int              dexp, se;

  always_comb begin
    if (p >= fi) begin op_hi = p;  op_lo = fi; end
    else                              begin op_hi = fi; op_lo = p;  end
    dexp  = int'(op_hi[FP_W-2:MAN_W]) - int'(op_lo[FP_W-2:MAN_W]);
    sm_al = (dexp >= int'(SIG_W)) ? '0 : ({1'b1, op_lo[MAN_W-1:0]} >> dexp);
    ssum  = {1'b0, 1'b1, op_hi[MAN_W-1:0]} + {1'b0, sm_al};
    se    = int'(op_hi[FP_W-2:MAN_W]) + (ssum[SIG_W] ? 1 : 0);
    if (op_lo[FP_W-2:MAN_W] == '0) s = {1'b0, op_hi};
    else if (se > EMAX)            s = FMAX;
    else if (ssum[SIG_W])          s = {1'b0, EXP_W'(se), ssum[SIG_W-1 -: MAN_W]};
    else                           s = {1'b0, EXP_W'(se), ssum[MAN_W-1:0]};
    u_next = s;
  end

  assign spike = (u[FP_W-2:0] >= gamma[FP_W-2:0]);

  always_ff @(posedge clk) begin
    if (!rst_n || clr || inhibit || spike) u <= '0;
    else                                   u <= u_next;
  end

  // Only non-negative operands are meaningful.
  a_pos: assert property (@(posedge clk) disable iff (!rst_n) !eta[FP_W-1] && !gamma[FP_W-1]);

endmodule
