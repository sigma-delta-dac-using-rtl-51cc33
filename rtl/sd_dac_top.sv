// sd_dac_top: the two sigma-delta DACs of this design, side by side.
//
// 1. Single-bit Delta-Sigma DAC for an FPGA (ds_dac). An 8-bit unsigned
//    word ds_dac_in, clocked at 100 MHz, becomes the pulse string
//    ds_dac_out, which leaves the FPGA through an output buffer and drives
//    an external RC low-pass filter (3.3 kOhm, 4.7 nF). The filtered
//    voltage is ds_dac_in / 256 of the I/O supply.
//
// 2. Multi-bit Sigma-Delta DAC: the k-bit word ns_din goes through the
//    n-bit digital noise shaper (noise_shaper), the thermometer decoder
//    with optional dynamic element matching (thermo_decoder), the array of
//    2^n current cells (current_source_array, behavioural model) and the
//    differential current-to-voltage converter (iv_converter, behavioural
//    model), giving v_outp - v_outn. The per-cell currents, which the cells'
//    current initialisation sets, are inputs of the top (cell_current).
//
// Both converters share clk (rising edge) and reset (active high,
// asynchronous). Timing: ds_dac_out follows ds_dac_in through the Sigma
// latch and the output flip-flop; in the multi-bit chain the noise shaper
// and the decoder each add one clock, and the analog models settle within
// a few nanoseconds of each new code. ns_clip marks samples on which the
// noise shaper's limiter acted, thermo shows the code driving the cells.
//
// Following the reference: the two block schemes and their connections,
// the 8-bit input and 100 MHz clock of the FPGA converter. This design's
// own choices: sharing clock and reset, and the multi-bit sizes k = 16 and
// n = 4.
`timescale 1ns / 1ps
module sd_dac_top
  import sd_dac_pkg::*;
#(
  parameter int unsigned MSBI         = DS_MSBI,
  parameter bit          RAIL_TO_RAIL = 1'b0,
  parameter int unsigned K            = NS_K,
  parameter int unsigned N            = NS_N,
  localparam int unsigned DS_IN_W     = MSBI + 1 + (RAIL_TO_RAIL ? 1 : 0),
  localparam int unsigned NL          = 2 ** N
) (
  input  logic               clk,
  input  logic               reset,
  // Single-bit FPGA Delta-Sigma DAC
  input  logic [DS_IN_W-1:0] ds_dac_in,
  output logic               ds_dac_out,
  // Multi-bit Sigma-Delta DAC
  input  ns_order_e          ns_order,
  input  logic               dem_en,
  input  logic [K-1:0]       ns_din,
  input  real                cell_current [NL],
  output logic               ns_clip,
  output logic [NL-1:0]      thermo,
  output real                v_outp,
  output real                v_outn
);

  // ---- Single-bit converter --------------------------------------------
  ds_dac #(
    .MSBI        (MSBI),
    .RAIL_TO_RAIL(RAIL_TO_RAIL)
  ) u_ds_dac (
    .clk    (clk),
    .reset  (reset),
    .dac_in (ds_dac_in),
    .dac_out(ds_dac_out)
  );

  // ---- Multi-bit converter ---------------------------------------------
  logic [N-1:0] ns_word;
  real          i_p, i_n;

  noise_shaper #(
    .K(K),
    .N(N)
  ) u_noise_shaper (
    .clk  (clk),
    .reset(reset),
    .order(ns_order),
    .din  (ns_din),
    .dout (ns_word),
    .clip (ns_clip)
  );

  thermo_decoder #(
    .N(N)
  ) u_thermo_decoder (
    .clk   (clk),
    .reset (reset),
    .dem_en(dem_en),
    .din   (ns_word),
    .thermo(thermo)
  );

  current_source_array #(
    .NL(NL)
  ) u_current_source_array (
    .sw          (thermo),
    .cell_current(cell_current),
    .i_p         (i_p),
    .i_n         (i_n)
  );

  iv_converter u_iv_converter (
    .i_p   (i_p),
    .i_n   (i_n),
    .v_outp(v_outp),
    .v_outn(v_outn)
  );

endmodule
