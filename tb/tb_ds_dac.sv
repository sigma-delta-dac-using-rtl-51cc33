// tb_ds_dac: self-checking testbench of the single-bit Delta-Sigma DAC.
//
// Three converters run side by side: the 8-bit default, the rail-to-rail
// variant with a 9-bit input, and a 4-bit one (MSBI = 3) fed with the low
// four bits of the 8-bit input, which exercises the configurable width. A
// reference model, written as a modulo-2^(MSBI+1) phase accumulator whose
// carry is the pulse (an independent formulation of the same first-order
// loop), predicts every output bit, including the latency from reset and
// from each input change. Each input value is held for two averaging
// periods of 256 clocks; over the second one the number of high output bits
// must equal the input exactly (for the 4-bit converter, over the last 16
// clocks), which is the rate the converter promises. A watchdog ends a run
// that hangs.
`timescale 1ns / 1ps
module tb_ds_dac;

  localparam int unsigned MSBI   = 7;
  localparam int unsigned PERIOD = 2 ** (MSBI + 1);  // averaging window

  logic       clk = 1'b0;
  logic       reset;
  logic [7:0] din8;
  logic [8:0] din9;
  logic       out8, out9, out4;

  int checks   = 0;
  int failures = 0;

  ds_dac #(.MSBI(MSBI)) dut8 (
    .clk(clk), .reset(reset), .dac_in(din8), .dac_out(out8)
  );

  ds_dac #(.MSBI(MSBI), .RAIL_TO_RAIL(1'b1)) dut9 (
    .clk(clk), .reset(reset), .dac_in(din9), .dac_out(out9)
  );

  ds_dac #(.MSBI(3)) dut4 (
    .clk(clk), .reset(reset), .dac_in(din8[3:0]), .dac_out(out4)
  );

  always #5 clk = ~clk;

  // Reference: phase accumulator q, pulse = carry, delayed by the output
  // flip-flop.
  int unsigned q8, q9, q4;
  bit          c8, c9, c4, r8, r9, r4;

  task automatic ref_reset();
    q8 = 0; q9 = 0; q4 = 0; c8 = 0; c9 = 0; c4 = 0; r8 = 0; r9 = 0; r4 = 0;
  endtask

  task automatic ref_step();
    int unsigned s8, s9, s4;
    r8 = c8;
    r9 = c9;
    r4 = c4;
    s4 = q4 + din8[3:0];
    c4 = (s4 >= 16);
    q4 = s4 % 16;
    s8 = q8 + din8;
    s9 = q9 + din9;
    c8 = (s8 >= PERIOD);
    c9 = (s9 >= PERIOD);
    q8 = s8 % PERIOD;
    q9 = s9 % PERIOD;
  endtask

  // One clock: inputs are stable across the rising edge.
  task automatic clock_and_compare();
    @(posedge clk);
    ref_step();
    #1;
    checks++;
    if (out8 !== r8 || out9 !== r9 || out4 !== r4) begin
      failures++;
      if (failures < 10)
        $display("mismatch at %0t: din8=%0d out8=%b exp %b, din9=%0d out9=%b exp %b, out4=%b exp %b",
                 $time, din8, out8, r8, din9, out9, r9, out4, r4);
    end
  endtask

  task automatic hold_value(input int unsigned v8, input int unsigned v9);
    int ones8, ones9, ones4;
    @(negedge clk);
    din8 = 8'(v8);
    din9 = 9'(v9);
    for (int i = 0; i < PERIOD; i++) clock_and_compare();
    ones8 = 0;
    ones9 = 0;
    ones4 = 0;
    for (int i = 0; i < PERIOD; i++) begin
      clock_and_compare();
      ones8 += int'(out8);
      ones9 += int'(out9);
      if (i >= PERIOD - 16) ones4 += int'(out4);
    end
    checks += 3;
    if (ones4 != int'(v8 % 16)) begin
      failures++;
      $display("4-bit DAC: %0d ones in 16 clocks for input %0d", ones4, v8 % 16);
    end
    if (ones8 != int'(v8)) begin
      failures++;
      $display("8-bit DAC: %0d ones in %0d clocks for input %0d", ones8, PERIOD, v8);
    end
    if (ones9 != int'(v9)) begin
      failures++;
      $display("rail-to-rail DAC: %0d ones in %0d clocks for input %0d", ones9, PERIOD, v9);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din8  = '0;
    din9  = '0;
    reset = 1'b1;
    ref_reset();
    repeat (3) @(posedge clk);
    @(negedge clk);
    // Zero in gives zero out, with no pulse after reset.
    reset = 1'b0;
    for (int i = 0; i < 20; i++) clock_and_compare();

    // Latency from reset: full scale after a fresh reset. The first pulse
    // leaves the latch after two clocks and the output flip-flop one later.
    @(negedge clk);
    reset = 1'b1;
    ref_reset();
    din8 = 8'd255;
    din9 = 9'd256;
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 3; i++) begin
      clock_and_compare();
      checks++;
      if (out8 !== (i == 2)) begin
        failures++;
        $display("latency: out8=%b after %0d clocks", out8, i + 1);
      end
    end
    for (int i = 0; i < 30; i++) clock_and_compare();

    hold_value(0, 0);
    hold_value(1, 1);
    hold_value(128, 128);
    hold_value(255, 255);
    hold_value(77, 256);
    hold_value(200, 0);
    hold_value(3, 256);
    for (int n = 0; n < 8; n++) hold_value($urandom_range(255), $urandom_range(256));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
