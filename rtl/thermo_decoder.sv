// thermo_decoder: n-bit binary to 2^n-bit thermometer decoder with optional
// dynamic element matching (DEM).
//
// Each clock the decoder switches on as many of the NL = 2^n output lines
// as the input word says. In the standard mode lines 0 .. din-1 are on. In
// DEM mode the lines switched on start at a rotating index p and wrap
// around modulo NL: lines p, p+1, ..., p+din-1 (mod NL). The index then
// advances by din, modulo NL, so successive codes use the current cells in
// turn and cell mismatch is averaged out instead of showing up as a fixed
// error for each code (data-weighted averaging). The index is held while
// DEM is off.
//
// Interface: clk (rising edge), reset (active high, asynchronous; clears
// the index and the output), dem_en (1 selects DEM), din (n bits), thermo
// (NL bits, registered: one clock of latency, a new code every clock).
//
// Following the reference: the thermometer output of length 2^n, the
// choice between the standard code and DEM, and a DEM counter kept as an
// index advanced with addition and a modulo. This design's choices: the
// rotation rule (each code starts where the previous one ended), the
// registered output and holding the index in standard mode.
`timescale 1ns / 1ps
module thermo_decoder #(
  parameter int unsigned N  = 4,
  localparam int unsigned NL = 2 ** N
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          dem_en,
  input  logic [N-1:0]  din,
  output logic [NL-1:0] thermo
);

  logic [N-1:0]  ptr;        // DEM rotation index
  logic [NL-1:0] code_next;

  always_comb begin
    for (int i = 0; i < NL; i++) begin
      // Position of line i counted from the index; N-bit wrap is modulo NL.
      logic [N-1:0] pos;
      pos = dem_en ? N'(i) - ptr : N'(i);
      code_next[i] = ({1'b0, pos} < {1'b0, din});
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      ptr    <= '0;
      thermo <= '0;
    end else begin
      thermo <= code_next;
      if (dem_en) ptr <= ptr + din;
    end
  end

  // The number of lines on always equals the word decoded a clock before.
  a_count : assert property (@(posedge clk) disable iff (reset)
    ##1 $countones(thermo) == int'($past(din)))
    else $error("thermo_decoder: %0d lines on for input %0d",
                $countones(thermo), $past(din));

endmodule
