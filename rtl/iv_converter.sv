// iv_converter: behavioural model of the current-to-voltage converter of
// the multi-bit Sigma-Delta DAC. This is a behavioural model of an analog
// block, not synthesizable logic.
//
// A fully differential opamp with feedback resistors R_F holds both current
// inputs at virtual ground, so the array's output voltage does not swing
// with the code, and converts the difference current into a differential
// voltage. The opamp follows the macro model of a transconductance stage
// driving an internal node v_int and an output stage that places
// +0.5 v_int and -0.5 v_int around the common-mode reference V_REF:
//   v_outp = V_REF + 0.5 v_int,   v_outn = V_REF - 0.5 v_int.
// The closed loop settles v_int toward (i_p - i_n) * 2 R_F with the time
// constant TAU_NS, its rate of change is limited to SLEW_V_PER_NS (opamp
// slewing), and it is clipped to +/- V_SWING. The model advances in steps
// of TSTEP_NS.
//
// Interface: i_p, i_n (amperes drawn from the two virtual-ground inputs),
// v_outp, v_outn (volts).
//
// Following the reference: the virtual ground, the differential I/V
// converter with feedback resistors and the 0.5 v_int output stage around a
// reference. This model's choices: all element values, the sign of the
// output, and reducing the opamp's internal poles to one time constant
// with a slew limit.
`timescale 1ns / 1ps
module iv_converter #(
  parameter real R_F           = 2.5e3,  // feedback resistor per side, ohm
  parameter real V_REF         = 1.65,   // output common mode, volt
  parameter real V_SWING       = 3.0,    // limit of |v_int|, volt
  parameter real TAU_NS        = 2.0,    // closed-loop time constant, ns
  parameter real SLEW_V_PER_NS = 0.5,    // slew-rate limit of v_int
  parameter real TSTEP_NS      = 0.05    // model time step, ns
) (
  input  real i_p,
  input  real i_n,
  output real v_outp,
  output real v_outn
);

  localparam real ALPHA   = (TSTEP_NS < TAU_NS) ? TSTEP_NS / TAU_NS : 1.0;
  localparam real MAX_DV  = SLEW_V_PER_NS * TSTEP_NS;

  real v_int;

  initial v_int = 0.0;

  always begin
    real target, dv;
    #(TSTEP_NS);
    target = (i_p - i_n) * 2.0 * R_F;
    if (target >  V_SWING) target =  V_SWING;
    if (target < -V_SWING) target = -V_SWING;
    dv = (target - v_int) * ALPHA;
    if (dv >  MAX_DV) dv =  MAX_DV;
    if (dv < -MAX_DV) dv = -MAX_DV;
    v_int = v_int + dv;
  end

  assign v_outp = V_REF + 0.5 * v_int;
  assign v_outn = V_REF - 0.5 * v_int;

endmodule
