// sdm_model: behavioural model (not synthesizable logic) of the analog
// second-order switched-capacitor sigma-delta modulator, including its 1-bit
// feedback DAC, its latched comparator and the output D flip-flop.
//
// Two delayed integrators in cascade, both fed back from the 1-bit output:
//     x1 <- x1 + A1 * (B1 * u  + C1 * v)
//     x2 <- x2 + A2 * (B2 * x1 + C2 * v)
//     v  =  +1 if x2 > 0 else -1,    sigma = (v == +1)
// where u = (INAP - INAN) / VREF is the differential input normalised to the
// reference and v * VREF is the DAC level. The coefficients are the capacitor
// ratios of the circuit (a_i = Cf/Ci, b_i = Cs/Cf, c_i = -1); this structure
// has the noise transfer function of (1 - z^-1)^2 up to the effective
// quantiser gain.
//
// Clocking follows the switched-capacitor circuit: integrator 1 samples the
// input when its sampling switch opens (falling edge of its delayed phase
// PHI1D) and integrates on the rising edge of its PHI2; integrator 2 does the
// same with the phases of its own clock generator, sampling x1 while
// integrator 1 holds it. The comparator decides, and the D flip-flop latches
// the decision, on the rising MCLK edge; sigma is the flip-flop output.
//
// The integrator outputs are limited to +-XMAX (the amplifiers' output
// swing, +-VREF differential for rail-to-rail amplifiers on a VREF supply),
// which lets the loop recover quickly from an overload.
//
// Thermal (kT/C) noise of the sampling capacitors is added to every input
// sample as a Gaussian voltage of rms sqrt(8 k T / CS), the factor 8 covering
// the two sampling phases and the two halves of the differential circuit. The
// defaults are the circuit's 0.7 pF sampling capacitor and 323 K (50 C, the
// hottest full-performance point); CS = 0 turns the noise off. SEED starts the
// model's own pseudo-random generator (xorshift32 and the Box-Muller
// transform), so a simulation repeats exactly on any simulator.
//
// Correlated double sampling of the first integrator is modelled by its
// effect: an OTA input offset OFFSET1 (in volts) enters the first integrator
// only when CDS is 0. VCM only sets the amplifiers' common-mode level and does
// not enter this differential model.
//
// The loop structure, coefficients, single reference and CDS in the first
// stage only, the sampling capacitor, temperature and noise formula are the
// document's; the event timing inside a clock period, the swing limit, the
// offset model and a single input-referred noise source are this model's
// choices.
`timescale 1ns / 1ps
module sdm_model #(
  parameter real A1      = 1.0 / 7.0,
  parameter real B1      = 1.0,
  parameter real C1      = -1.0,
  parameter real A2      = 0.222,
  parameter real B2      = 2.5,
  parameter real C2      = -1.0,
  parameter bit  CDS     = 1'b1,
  parameter real OFFSET1 = 0.0,
  parameter real XMAX    = 1.0,
  parameter real CS      = 0.7e-12,
  parameter real TEMP    = 323.0,
  parameter int  SEED    = 1
) (
  input  real  inap,
  input  real  inan,
  input  real  vref,
  input  real  vcm,
  input  logic mclk,
  // phases of clock generator 1 (first integrator)
  input  logic phi1d_1,
  input  logic phi2_1,
  // phases of clock generator 2 (second integrator)
  input  logic phi1d_2,
  input  logic phi2_2,
  output logic sigma
);

  real  x1, x2;     // integrator outputs, normalised to VREF
  real  u_s;        // sampled input of integrator 1
  real  x1_s;       // sampled input of integrator 2
  real  v;          // DAC level, +-1
  logic q;          // output flip-flop
  real  vn;         // rms of the sampled thermal noise, volts
  logic [31:0] rng;  // xorshift32 state of the noise generator

  initial begin
    x1 = 0.0; x2 = 0.0; u_s = 0.0; x1_s = 0.0; q = 1'b0;
    vn = (CS > 0.0) ? $sqrt(8.0 * 1.380649e-23 * TEMP / CS) : 0.0;
    rng = (SEED == 0) ? 32'h1 : 32'(SEED);
  end

  assign v = q ? 1.0 : -1.0;

  // amplifier output swing
  function automatic real clip(input real x);
    return (x > XMAX) ? XMAX : (x < -XMAX) ? -XMAX : x;
  endfunction

  // next state of the xorshift32 generator
  function automatic logic [31:0] xorshift(input logic [31:0] st);
    logic [31:0] t;
    t = st ^ (st << 13);
    t = t ^ (t >> 17);
    return t ^ (t << 5);
  endfunction

  // integrator 1: sampling and integration; the sampled input carries one
  // Gaussian noise sample (Box-Muller)
  always @(negedge phi1d_1) begin
    logic [31:0] s1, s2;
    real g, r1, r2;
    s1 = xorshift(rng);
    s2 = xorshift(s1);
    r1 = (real'(s1) + 0.5) / 4294967296.0;
    r2 = (real'(s2) + 0.5) / 4294967296.0;
    rng <= s2;
    g  = $sqrt(-2.0 * $ln(r1)) * $cos(6.283185307179586 * r2);
    u_s <= (inap - inan + (CDS ? 0.0 : OFFSET1) + vn * g) / vref;
  end
  always @(posedge phi2_1) begin
    x1 <= clip(x1 + A1 * (B1 * u_s + C1 * v));
  end

  // integrator 2: sampling and integration
  always @(negedge phi1d_2) begin
    x1_s <= x1;
  end
  always @(posedge phi2_2) begin
    x2 <= clip(x2 + A2 * (B2 * x1_s + C2 * v));
  end

  // latched comparator and output D flip-flop
  always @(posedge mclk) begin
    q <= (x2 > 0.0);
  end

  assign sigma = q;

  // VCM has no effect on the differential signal path
  real unused_vcm;
  assign unused_vcm = vcm;

endmodule
