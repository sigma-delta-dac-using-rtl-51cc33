// noise_shaper: n-bit digital noise shaper of the multi-bit Sigma-Delta DAC.
//
// A feedback loop of an adder, an n-bit truncator and an error-feedback
// filter. Each clock the k-bit unsigned input u is added to the filtered
// truncation error of earlier samples, giving a (k+1)-bit word v. The
// truncator keeps the n most significant bits of v as the output y and
// strips the k-n+1 low bits; those bits, v - y*2^(k-n+1), are the new error
// e. The m-th order filter feeds back
//   order 1:  e[-1]
//   order 2:  2 e[-1] - e[-2]
//   order 3:  3 e[-1] - 3 e[-2] + e[-3]
// so that y*2^(k-n+1) = u - (1 - z^-1)^m e: the truncation error is pushed to
// high frequencies and the average of y*2^(k-n+1) follows u.
//
// With order 2 and 3 the feedback can be negative or larger than the
// headroom, so v can leave the (k+1)-bit range. A limiter then clamps v to
// 0 or 2^(k+1)-1 and raises clip for that sample.
//
// Interface: clk (rising edge), reset (active high, asynchronous; clears the
// error memory and the outputs), order (run-time filter order), din (k
// bits, unsigned), dout (n bits), clip. dout and clip are registered: the
// sample taken at one rising edge appears after it, one clock of latency,
// and a new sample is taken every clock.
//
// Following the reference: the structure of adder, truncator, subtractor
// and filter, the widths k, k+1, k-n+1 and n, the selectable order and the
// limiter. This design's choices: error feedback with the (1 - z^-1)^m
// noise transfer function, orders 1 to 3 (an order value of 0 acts as 1),
// the default sizes k = 16 and n = 4, and the limiter's clamp bounds.
`timescale 1ns / 1ps
module noise_shaper
  import sd_dac_pkg::*;
#(
  parameter int unsigned K = NS_K,  // input word width
  parameter int unsigned N = NS_N   // truncator (output) width
) (
  input  logic         clk,
  input  logic         reset,
  input  ns_order_e    order,
  input  logic [K-1:0] din,
  output logic [N-1:0] dout,
  output logic         clip
);

  localparam int unsigned S  = K + 1 - N;  // width of the truncation error
  localparam int unsigned VW = K + 4;      // signed width of the loop sum

  typedef logic signed [VW-1:0] sum_t;

  localparam sum_t V_MAX = sum_t'((2 ** (K + 1)) - 1);

  logic [S-1:0] e1, e2, e3;   // truncation errors of the last three samples
  sum_t         fb;           // filter output
  sum_t         v;            // adder output before the limiter
  logic [K:0]   v_lim;        // limited (k+1)-bit word
  logic         clip_now;

  always_comb begin
    unique case (order)
      NS_ORDER_2: fb = 2 * sum_t'(e1) - sum_t'(e2);
      NS_ORDER_3: fb = 3 * sum_t'(e1) - 3 * sum_t'(e2) + sum_t'(e3);
      default:    fb = sum_t'(e1);
    endcase

    v = sum_t'(din) + fb;

    clip_now = 1'b0;
    if (v < 0) begin
      v_lim    = '0;
      clip_now = 1'b1;
    end else if (v > V_MAX) begin
      v_lim    = '1;
      clip_now = 1'b1;
    end else begin
      v_lim    = v[K:0];
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      dout <= '0;
      clip <= 1'b0;
      e1   <= '0;
      e2   <= '0;
      e3   <= '0;
    end else begin
      dout <= v_lim[K -: N];
      clip <= clip_now;
      e1   <= v_lim[S-1:0];
      e2   <= e1;
      e3   <= e2;
    end
  end

endmodule
