// Shared types and default sizes of the sigma-delta DAC designs.
//
// The multi-bit converter selects the order of its noise-shaping filter at
// run time with an ns_order_e value. The default sizes below are this
// design's own choices: the multi-bit converter is described with symbolic
// widths (k-bit input, n-bit truncator, 2^n current cells) only. The single-
// bit converter's 8-bit input (MSBI = 7) is the size of the reference
// implementation it follows.
`timescale 1ns / 1ps
package sd_dac_pkg;

  // Single-bit Delta-Sigma DAC: index of the most significant input bit.
  localparam int unsigned DS_MSBI = 7;

  // Multi-bit Sigma-Delta DAC: input word width k and truncator width n.
  localparam int unsigned NS_K = 16;
  localparam int unsigned NS_N = 4;

  // Order m of the error-feedback filter. Order m gives a noise transfer
  // function of (1 - z^-1)^m.
  typedef enum logic [1:0] {
    NS_ORDER_1 = 2'd1,
    NS_ORDER_2 = 2'd2,
    NS_ORDER_3 = 2'd3
  } ns_order_e;

endpackage
