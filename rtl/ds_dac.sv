// ds_dac: first-order, single-bit Delta-Sigma DAC for an FPGA.
//
// The converter turns an unsigned binary word into a pulse string whose
// average duty cycle is dac_in / 2^(MSBI+1); an external RC low-pass filter
// turns the pulses into a voltage between 0 V and the I/O supply.
//
// How it works. The Sigma latch is an (MSBI+3)-bit register. Its top bit is
// the current output decision. The Delta adder forms
//   delta = dac_in + {L[MSBI+2], L[MSBI+2], 0...0}
// which is dac_in - 2^(MSBI+1) when the top bit is set (the output is "all
// ones") and dac_in otherwise. The Sigma adder adds delta to the latch. The
// output D flip-flop registers the latch's top bit, so the pulse string lags
// the latch by one clock. For a constant input held for any window of
// 2^(MSBI+1) clocks the output is high in exactly dac_in of them.
//
// Interface: clk (rising edge), reset (active high, asynchronous), dac_in
// (MSBI+1 bits, or MSBI+2 bits with RAIL_TO_RAIL), dac_out (pulse string).
// Reset loads the Sigma latch with 2^(MSBI+1), the state that belongs to
// 0 in and 0 out, and clears the output flip-flop, so an input that starts
// at zero gives no glitch.
//
// Following the reference: the adder and latch widths, the DeltaB
// concatenation, the reset value and the one-bit-wider input option that
// lets the output reach the full supply (then only values up to
// 2^(MSBI+1) are legal). This design's choice: the reset is asynchronous for
// both registers, and an assertion flags an illegal input in the wider mode.
`timescale 1ns / 1ps
module ds_dac #(
  parameter int unsigned MSBI         = 7,
  parameter bit          RAIL_TO_RAIL = 1'b0,
  localparam int unsigned IN_W        = MSBI + 1 + (RAIL_TO_RAIL ? 1 : 0)
) (
  input  logic            clk,
  input  logic            reset,
  input  logic [IN_W-1:0] dac_in,
  output logic            dac_out
);

  localparam int unsigned SW = MSBI + 3;  // Delta/Sigma adder and latch width

  logic [SW-1:0] delta_b;      // {L[top], L[top], 0, ..., 0}
  logic [SW-1:0] delta_sum;    // Delta adder output
  logic [SW-1:0] sigma_sum;    // Sigma adder output
  logic [SW-1:0] sigma_latch;  // Sigma latch

  assign delta_b   = {sigma_latch[SW-1], sigma_latch[SW-1], {(SW-2){1'b0}}};
  assign delta_sum = SW'(dac_in) + delta_b;
  assign sigma_sum = delta_sum + sigma_latch;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      sigma_latch <= SW'(1) << (MSBI + 1);
      dac_out     <= 1'b0;
    end else begin
      sigma_latch <= sigma_sum;
      dac_out     <= sigma_latch[SW-1];
    end
  end

  // In the rail-to-rail mode, inputs above 2^(MSBI+1) are illegal.
  if (RAIL_TO_RAIL) begin : g_range_check
    a_input_range : assert property (@(posedge clk) disable iff (reset)
      dac_in <= IN_W'(2 ** (MSBI + 1)))
      else $error("ds_dac: dac_in %0d above 2^(MSBI+1)", dac_in);
  end

endmodule
