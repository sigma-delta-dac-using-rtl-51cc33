// tb_thermo_decoder: self-checking testbench of the thermometer decoder.
//
// The expected code is built line by line: in the standard mode the lowest
// din lines, in DEM mode din lines starting at a reference index that
// advances by din modulo 2^n. Every registered output is compared one clock
// after its input. Two properties of dynamic element matching are checked
// as well: with a constant input, 2^n successive codes use every cell
// equally often, and the index wraps around the array. A watchdog ends a
// run that hangs.
`timescale 1ns / 1ps
module tb_thermo_decoder;

  localparam int N  = 4;
  localparam int NL = 2 ** N;

  logic          clk = 1'b0;
  logic          reset;
  logic          dem_en;
  logic [N-1:0]  din;
  logic [NL-1:0] thermo;

  int checks   = 0;
  int failures = 0;
  int wraps    = 0;

  thermo_decoder #(.N(N)) dut (
    .clk(clk), .reset(reset), .dem_en(dem_en), .din(din), .thermo(thermo)
  );

  always #5 clk = ~clk;

  int            ref_ptr;
  logic [NL-1:0] exp_code;

  task automatic ref_step();
    exp_code = '0;
    for (int j = 0; j < int'(din); j++)
      exp_code[dem_en ? (ref_ptr + j) % NL : j] = 1'b1;
    if (dem_en) ref_ptr = (ref_ptr + int'(din)) % NL;
  endtask

  task automatic clock_and_compare();
    @(posedge clk);
    ref_step();
    #1;
    checks++;
    if (thermo !== exp_code) begin
      failures++;
      if (failures < 10)
        $display("mismatch at %0t: dem %b din %0d: %b, expected %b",
                 $time, dem_en, din, thermo, exp_code);
    end
    if (dem_en && thermo[NL-1] && thermo[0] && !(&thermo)) wraps++;
  endtask

  task automatic check_equal_use(input int d);
    int use_count [NL];
    @(negedge clk);
    dem_en = 1'b1;
    din    = N'(d);
    clock_and_compare();
    foreach (use_count[i]) use_count[i] = 0;
    for (int c = 0; c < NL; c++) begin
      @(negedge clk);
      clock_and_compare();
      for (int i = 0; i < NL; i++) use_count[i] += int'(thermo[i]);
    end
    for (int i = 0; i < NL; i++) begin
      checks++;
      if (use_count[i] != d) begin
        failures++;
        $display("input %0d: cell %0d used %0d times in %0d codes", d, i,
                 use_count[i], NL);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dem_en  = 1'b0;
    din     = '0;
    ref_ptr = 0;
    reset   = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;

    // Standard mode, every code.
    for (int d = 0; d < NL; d++) begin
      @(negedge clk);
      din = N'(d);
      clock_and_compare();
    end
    // DEM mode, every code, then random codes and mode switches.
    for (int d = 0; d < NL; d++) begin
      @(negedge clk);
      dem_en = 1'b1;
      din    = N'(d);
      clock_and_compare();
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i % 50 == 0) dem_en = ~dem_en;
      din = N'($urandom);
      clock_and_compare();
    end
    check_equal_use(5);
    check_equal_use(7);
    check_equal_use(15);

    checks++;
    if (wraps == 0) begin
      failures++;
      $display("the DEM index never wrapped around the array");
    end
    $display("DEM codes wrapping around the array: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
