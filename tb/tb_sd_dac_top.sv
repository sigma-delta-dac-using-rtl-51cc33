// tb_sd_dac_top: end-to-end testbench of both converters at their default
// sizes (8-bit single-bit DAC, 16-bit input / 4-bit / 16-cell multi-bit
// DAC, 100 MHz clock).
//
// Single-bit DAC: every output bit is compared with a phase-accumulator
// reference, and the pulse string is passed through a numerical model of
// the external RC filter (3.3 kOhm, 4.7 nF, so a 15.5 us time constant).
// After about ten time constants the filtered voltage must equal
// dac_in / 256 of the 3.3 V I/O supply, and 256 consecutive clocks must
// hold exactly dac_in pulses.
//
// Multi-bit DAC: the cells get 10 uA each with a 1 % spread. Just before
// every clock edge the differential output voltage is compared with the
// value the current thermometer code should give, and over each run of
// constant input its average is compared with the input scaled to the
// output range. The runs cover all three filter orders, both decoder
// modes, and inputs small enough to make the limiter act. Finally, with a
// 10 % current mismatch between the two halves of the array, the average
// error must be large without DEM and vanish with it.
//
// The testbench counts how often each mechanism occurred (limiter action,
// DEM index wrap, filter order changes, decoder mode changes, zero and
// full-scale single-bit output) and counts a failure for any that never
// did. A watchdog ends a run that hangs.
`timescale 1ns / 1ps
module tb_sd_dac_top;
  import sd_dac_pkg::*;

  localparam int  K     = NS_K;
  localparam int  N     = NS_N;
  localparam int  NL    = 2 ** N;
  localparam int  S     = K + 1 - N;
  localparam real TCLK  = 10.0;                       // ns, 100 MHz
  localparam real VCC0  = 3.3;                        // I/O supply, V
  localparam real RC_NS = 3.3e3 * 0.0047e-6 * 1.0e9;  // RC filter, ns
  localparam real I_NOM = 10.0e-6;
  localparam real GAIN  = 1.0e6 / (1.0e6 + 1.0e3);    // cell R_CS, R_ON
  localparam real R_F   = 2.5e3;                      // I/V feedback
  localparam int  HOLD  = 12000;                      // clocks per DAC value

  logic          clk = 1'b0;
  logic          reset;
  logic [7:0]    ds_dac_in;
  logic          ds_dac_out;
  ns_order_e     ns_order;
  logic          dem_en;
  logic [K-1:0]  ns_din;
  real           cell_current [NL];
  logic          ns_clip;
  logic [NL-1:0] thermo;
  real           v_outp, v_outn;

  int checks   = 0;
  int failures = 0;

  // Mechanism counters.
  int n_clip = 0, n_wrap = 0, n_order_change = 0, n_mode_change = 0;
  int n_ds_zero = 0, n_ds_full = 0, n_dem_gain = 0;
  real err_static, err_dem;

  sd_dac_top dut (
    .clk(clk), .reset(reset),
    .ds_dac_in(ds_dac_in), .ds_dac_out(ds_dac_out),
    .ns_order(ns_order), .dem_en(dem_en), .ns_din(ns_din),
    .cell_current(cell_current), .ns_clip(ns_clip), .thermo(thermo),
    .v_outp(v_outp), .v_outn(v_outn)
  );

  always #(TCLK / 2.0) clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%0t: %s", $time, msg);
  endtask

  // ---------------------------------------------------------------------
  // Single-bit converter
  int unsigned q = 0;
  bit          carry = 0, exp_out = 0;
  real         v_rc = 0.0;
  real         rc_a;

  task automatic ds_hold(input int unsigned d);
    int  ones = 0;
    real v_sum = 0.0;
    ds_dac_in = 8'(d);
    for (int c = 0; c < HOLD; c++) begin
      @(posedge clk);
      exp_out = carry;
      carry   = (q + d >= 256);
      q       = (q + d) % 256;
      #1;
      checks++;
      if (ds_dac_out !== exp_out) fail($sformatf("ds_dac_out %b, expected %b", ds_dac_out, exp_out));
      // RC filter over one clock, output held for the whole clock.
      v_rc = v_rc + ((ds_dac_out ? VCC0 : 0.0) - v_rc) * rc_a;
      if (c >= HOLD - 256) begin
        ones  += int'(ds_dac_out);
        v_sum += v_rc;
      end
    end
    checks += 2;
    if (ones != int'(d)) fail($sformatf("%0d pulses in 256 clocks for input %0d", ones, d));
    if (v_sum / 256.0 - VCC0 * d / 256.0 > 0.01 || VCC0 * d / 256.0 - v_sum / 256.0 > 0.01)
      fail($sformatf("V_OUT %f V for input %0d, expected %f V", v_sum / 256.0, d,
                     VCC0 * d / 256.0));
    else
      $display("single-bit DAC: input %0d gives V_OUT %f V", d, v_sum / 256.0);
    if (d == 0 && ones == 0) n_ds_zero++;
    if (d == 255 && ones == 255) n_ds_full++;
  endtask

  // ---------------------------------------------------------------------
  // Multi-bit converter
  ns_order_e last_order;
  logic      last_dem;

  function automatic real code_voltage(input logic [NL-1:0] code);
    real s = 0.0;
    for (int i = 0; i < NL; i++) s += (code[i] ? 1.0 : -1.0) * cell_current[i];
    return s * GAIN * 2.0 * R_F;
  endfunction

  real last_mean, last_ideal;

  task automatic ms_run(input ns_order_e o, input bit dem, input int u, input int len,
                        input bit check_mean, input bit check_samples = 1'b1);
    real sum_v = 0.0, want, vd;
    ns_order = o;
    dem_en   = dem;
    ns_din   = K'(u);
    if (o != last_order) n_order_change++;
    if (dem != last_dem) n_mode_change++;
    last_order = o;
    last_dem   = dem;
    for (int c = 0; c < len; c++) begin
      @(posedge clk);
      #(TCLK - 0.1);
      // Just before the next edge: the code set at this edge has settled.
      vd = v_outp - v_outn;
      if (check_samples) checks++;
      if (check_samples &&
          (vd - code_voltage(thermo) > 0.05 || code_voltage(thermo) - vd > 0.05))
        fail($sformatf("output %f V for code %h, expected %f V", vd, thermo,
                       code_voltage(thermo)));
      if (ns_clip) n_clip++;
      if (thermo[0] && thermo[NL-1] && !(&thermo) && dem_en) n_wrap++;
      if (c >= 64) sum_v += vd;
    end
    want       = (2.0 * real'(u) / real'(1 << S) - real'(NL)) * I_NOM * GAIN * 2.0 * R_F;
    last_mean  = sum_v / (len - 64);
    last_ideal = want;
    if (check_mean) begin
      checks++;
      if (sum_v / (len - 64) - want > 0.02 || want - sum_v / (len - 64) > 0.02)
        fail($sformatf("order %0d dem %b input %0d: mean output %f V, expected %f V",
                       int'(o), dem, u, sum_v / (len - 64), want));
      else
        $display("multi-bit DAC: order %0d dem %b input %0d: mean %f V (ideal %f V)",
                 int'(o), dem, u, sum_v / (len - 64), want);
    end
  endtask

  // ---------------------------------------------------------------------
  initial begin
    repeat (200000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rc_a = 1.0 - $exp(-TCLK / RC_NS);
    for (int i = 0; i < NL; i++)
      cell_current[i] = I_NOM * (1.0 + 0.01 * real'((i * 7) % NL - NL / 2) / NL);
    ds_dac_in  = '0;
    ns_order   = NS_ORDER_1;
    dem_en     = 1'b0;
    ns_din     = '0;
    last_order = NS_ORDER_1;
    last_dem   = 1'b0;
    reset      = 1'b1;
    repeat (4) @(posedge clk);
    #1;
    reset = 1'b0;

    fork
      begin
        ds_hold(0);
        ds_hold(64);
        ds_hold(128);
        ds_hold(200);
        ds_hold(255);
        ds_hold(17);
      end
      begin
        ms_run(NS_ORDER_1, 1'b0, 40000, 3000, 1'b1);
        ms_run(NS_ORDER_1, 1'b1, 40000, 3000, 1'b1);
        ms_run(NS_ORDER_2, 1'b1, 30000, 3000, 1'b1);
        ms_run(NS_ORDER_2, 1'b0, 60000, 3000, 1'b1);
        ms_run(NS_ORDER_3, 1'b1, 50000, 3000, 1'b1);
        ms_run(NS_ORDER_3, 1'b1, 25000, 3000, 1'b1);
        // Small input in order 3: the feedback overloads and is limited.
        ms_run(NS_ORDER_3, 1'b1, 1500, 3000, 1'b0);
        ms_run(NS_ORDER_2, 1'b0, 20000, 3000, 1'b1);
        // A slow ramp through the range.
        for (int r = 0; r < 64; r++)
          ms_run(ns_order_e'(1 + r % 3), r[0], r * 1000, 40, 1'b0);
      end
    join

    // Cell mismatch: half of the cells 10 % strong, half 10 % weak. With a
    // static thermometer code the average output is off by the mismatch of
    // the cells that the code uses; with DEM every cell is used equally and
    // the error averages out.
    for (int i = 0; i < NL; i++)
      cell_current[i] = I_NOM * ((i < NL / 2) ? 1.1 : 0.9);
    ms_run(NS_ORDER_1, 1'b1, 30000, 80, 1'b0, 1'b0);  // pick up the new currents
    ms_run(NS_ORDER_1, 1'b0, 40000, 2000, 1'b0);
    err_static = last_mean - last_ideal;
    ms_run(NS_ORDER_1, 1'b1, 40000, 2000, 1'b0);
    err_dem = last_mean - last_ideal;
    $display("10 %% cell mismatch, input 40000: mean error %f V without DEM, %f V with DEM",
             err_static, err_dem);
    checks += 2;
    if (err_static < 0.03 && err_static > -0.03)
      fail($sformatf("mismatch error without DEM only %f V", err_static));
    if (err_dem > 0.005 || err_dem < -0.005)
      fail($sformatf("mismatch error with DEM %f V", err_dem));
    else
      n_dem_gain++;

    checks += 7;
    if (n_dem_gain == 0)     fail("DEM never removed the mismatch error");
    if (n_clip == 0)         fail("the limiter never acted");
    if (n_wrap == 0)         fail("the DEM index never wrapped");
    if (n_order_change == 0) fail("the filter order never changed");
    if (n_mode_change == 0)  fail("the decoder mode never changed");
    if (n_ds_zero == 0)      fail("no zero-scale single-bit output");
    if (n_ds_full == 0)      fail("no full-scale single-bit output");
    $display("limiter %0d, DEM wraps %0d, order changes %0d, mode changes %0d, zero %0d, full %0d",
             n_clip, n_wrap, n_order_change, n_mode_change, n_ds_zero, n_ds_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
