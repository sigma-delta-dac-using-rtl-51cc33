// current_source_array: behavioural model of the 2^n-cell current-steering
// D/A converter of the multi-bit Sigma-Delta DAC. This is a behavioural
// model of an analog block, not synthesizable logic.
//
// Each of the NL cells is a current source with its own current (given by
// the cell_current inputs, which come from the current initialisation of
// the cells), an output resistance R_CS and a switch of on-resistance R_ON.
// A cell whose thermometer line is 1 steers its current into the i_p
// output, otherwise into i_n. The output nodes are held at virtual ground
// by the I/V converter, so a cell delivers I * R_CS / (R_CS + R_ON).
//
// Switching is modelled with the lumped two-part scheme: when the
// thermometer code changes, the cells that stay on are lumped into one
// settled source, and the cells that have just been switched over are
// lumped into a second source whose current starts from zero at the next
// model step and reaches its final value with the time constant
// (R_CS || R_ON) * C_CS. The model advances in steps of TSTEP_NS.
//
// Interface: sw (NL thermometer lines), cell_current (amperes per cell,
// read whenever the code changes, so it is meant to be set before the
// first code), i_p and i_n (amperes). Units: seconds for C*R, nanoseconds for time.
//
// Following the reference: the array of nearly identical cells, the lumped
// current, resistances and capacitance of the part switched on against the
// part already on. This model's choices: the element values, the
// complementary i_n output and forward-Euler settling.
`timescale 1ns / 1ps
module current_source_array #(
  parameter int unsigned NL       = 16,
  parameter real         R_CS     = 1.0e6,   // cell output resistance, ohm
  parameter real         R_ON     = 1.0e3,   // switch on-resistance, ohm
  parameter real         C_CS     = 1.0e-12, // cell node capacitance, farad
  parameter real         TSTEP_NS = 0.05     // model time step, ns
) (
  input  logic [NL-1:0] sw,
  input  real           cell_current [NL],
  output real           i_p,
  output real           i_n
);

  localparam real GAIN   = R_CS / (R_CS + R_ON);
  localparam real TAU_NS = (R_CS * R_ON / (R_CS + R_ON)) * C_CS * 1.0e9;
  localparam real ALPHA  = (TSTEP_NS < TAU_NS) ? TSTEP_NS / TAU_NS : 1.0;

  logic [NL-1:0] sw_prev;
  int unsigned   n_codes;              // codes seen by the switching process
  int unsigned   n_codes_seen;         // codes seen by the settling process
  real p_settled, p_target, p_new;     // i_p side
  real n_settled, n_target, n_new;     // i_n side

  initial begin
    sw_prev      = '0;
    n_codes      = 0;
    n_codes_seen = 0;
    p_settled    = 0.0; p_target = 0.0; p_new = 0.0;
    n_settled    = 0.0; n_target = 0.0; n_new = 0.0;
  end

  // New code: re-lump the cells into "already there" and "just switched".
  always @(sw) begin
    p_settled = 0.0; p_target = 0.0;
    n_settled = 0.0; n_target = 0.0;
    for (int i = 0; i < NL; i++) begin
      if (sw[i] && sw_prev[i])  p_settled += GAIN * cell_current[i];
      else if (sw[i])           p_target  += GAIN * cell_current[i];
      else if (!sw_prev[i])     n_settled += GAIN * cell_current[i];
      else                      n_target  += GAIN * cell_current[i];
    end
    sw_prev = sw;
    n_codes = n_codes + 1;
  end

  // Settling of the part just switched over; it starts from zero current.
  always begin
    #(TSTEP_NS);
    if (n_codes != n_codes_seen) begin
      n_codes_seen = n_codes;
      p_new = 0.0;
      n_new = 0.0;
    end
    p_new = p_new + (p_target - p_new) * ALPHA;
    n_new = n_new + (n_target - n_new) * ALPHA;
  end

  assign i_p = p_settled + p_new;
  assign i_n = n_settled + n_new;

endmodule
