// tb_noise_shaper: self-checking testbench of the n-bit noise shaper.
//
// A reference model in plain integer arithmetic (filter taps 1 / 2,-1 /
// 3,-3,1 on the last truncation errors, clamp to the (k+1)-bit range,
// split into top n bits and remainder) predicts every output word and
// limiter flag, one clock after the input it belongs to. Random inputs are
// run in each order, including inputs small enough to make orders 2 and 3
// overload so that the limiter acts. For constant inputs that do not
// overload, the sum of the output words, scaled by 2^(k-n+1), must match
// the sum of the inputs to within the bound that the noise transfer
// function (1 - z^-1)^m gives, which shows the noise shaping keeps the
// signal. A watchdog ends a run that hangs.
`timescale 1ns / 1ps
module tb_noise_shaper;
  import sd_dac_pkg::*;

  localparam int K = 16;
  localparam int N = 4;
  localparam int S = K + 1 - N;

  logic         clk = 1'b0;
  logic         reset;
  ns_order_e    order;
  logic [K-1:0] din;
  logic [N-1:0] dout;
  logic         clip;

  int checks   = 0;
  int failures = 0;
  int clips    = 0;

  noise_shaper #(.K(K), .N(N)) dut (
    .clk(clk), .reset(reset), .order(order), .din(din), .dout(dout), .clip(clip)
  );

  always #5 clk = ~clk;

  int ea, eb, ec;      // reference error memory, newest first
  int exp_y, exp_clip;

  task automatic ref_reset();
    ea = 0; eb = 0; ec = 0; exp_y = 0; exp_clip = 0;
  endtask

  task automatic ref_step();
    int f, v;
    case (order)
      NS_ORDER_2: f = 2 * ea - eb;
      NS_ORDER_3: f = 3 * ea - 3 * eb + ec;
      default:    f = ea;
    endcase
    v = int'(din) + f;
    exp_clip = 0;
    if (v < 0) begin v = 0; exp_clip = 1; end
    if (v >= (1 << (K + 1))) begin v = (1 << (K + 1)) - 1; exp_clip = 1; end
    exp_y = v / (1 << S);
    ec = eb;
    eb = ea;
    ea = v % (1 << S);
  endtask

  task automatic clock_and_compare();
    @(posedge clk);
    ref_step();
    #1;
    checks++;
    if (int'(dout) != exp_y || int'(clip) != exp_clip) begin
      failures++;
      if (failures < 10)
        $display("mismatch at %0t: order %0d din %0d: dout %0d clip %0d, expected %0d %0d",
                 $time, order, din, dout, clip, exp_y, exp_clip);
    end
    if (clip) clips++;
  endtask

  // Hold a constant input in one order and check the average.
  task automatic check_average(input ns_order_e o, input int u, input int len);
    longint sum_y;
    int bound;
    @(negedge clk);
    order = o;
    din   = K'(u);
    // Let the loop settle into the new order.
    for (int i = 0; i < 8; i++) clock_and_compare();
    sum_y = 0;
    for (int i = 0; i < len; i++) begin
      clock_and_compare();
      sum_y += longint'(dout);
    end
    bound = (1 << S) * (1 << (int'(o) - 1)) * 2;
    checks++;
    if (sum_y * (1 << S) - longint'(u) * len > bound ||
        longint'(u) * len - sum_y * (1 << S) > bound) begin
      failures++;
      $display("order %0d input %0d: output sum %0d against %0d", int'(o), u,
               sum_y * (1 << S), longint'(u) * len);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    order = NS_ORDER_1;
    din   = '0;
    reset = 1'b1;
    ref_reset();
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;

    // Latency: one clock from input to output word.
    din = K'(65535);
    @(posedge clk);
    ref_step();
    #1;
    checks++;
    if (int'(dout) != 7) begin
      failures++;
      $display("latency: dout %0d one clock after full scale", dout);
    end

    // Random inputs in every order, full range (order 2 and 3 overload
    // near zero).
    for (int o = 1; o <= 3; o++) begin
      for (int i = 0; i < 3000; i++) begin
        @(negedge clk);
        order = ns_order_e'(o);
        din   = (i % 4 == 0) ? K'($urandom_range(3000)) : K'($urandom);
        clock_and_compare();
      end
    end

    // Switching order on every sample.
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      order = ns_order_e'($urandom_range(3, 1));
      din   = K'($urandom);
      clock_and_compare();
    end

    // Averages with constant inputs clear of the limiter.
    check_average(NS_ORDER_1, 12345, 4096);
    check_average(NS_ORDER_1, 65535, 4096);
    check_average(NS_ORDER_2, 40000, 4096);
    check_average(NS_ORDER_2, 9001, 4096);
    check_average(NS_ORDER_3, 30000, 4096);
    check_average(NS_ORDER_3, 51234, 4096);

    checks++;
    if (clips == 0) begin
      failures++;
      $display("the limiter never acted");
    end
    $display("limiter acted on %0d samples", clips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
