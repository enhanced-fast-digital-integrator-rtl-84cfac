// timebase_tb: checks the UTC counter, the ADC tick divider and the DSP clock.
// The UTC must advance by one per cycle from zero; with run high, ticks must
// come exactly every `div` cycles, the first on the div-th cycle with run high,
// with `phase` counting the cycles since the last tick; none while run is low.
module timebase_tb;
  import efdi_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic [DIV_W-1:0] div = 5;
  logic [UTC_W-1:0] utc;
  logic adc_tick, dsp_clk;
  logic [DIV_W-1:0] phase;
  int checks = 0, failures = 0;

  timebase dut (.*);
  always #20 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc;
  longint last_tick;
  int     nticks;
  logic   prev_dsp;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(utc == 0, "utc not zero after reset");
    // UTC and DSP clock
    cyc = 0;
    prev_dsp = dsp_clk;
    repeat (20) begin
      @(posedge clk); #1 cyc++;
      check(utc == UTC_W'(cyc), $sformatf("utc=%0d expected %0d", utc, cyc));
      check(dsp_clk != prev_dsp, "dsp_clk did not toggle");
      prev_dsp = dsp_clk;
      check(!adc_tick, "tick while not running");
    end
    foreach (div_vals[i]) run_with_div(div_vals[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int div_vals[3] = '{5, 2, 50};

  task automatic run_with_div(input int d);
    div = DIV_W'(d);
    @(negedge clk);
    run = 1;
    last_tick = -1;
    nticks = 0;
    for (int c = 0; c < 10 * d; c++) begin
      // c = number of clk edges seen with run high
      if (c > 0) @(negedge clk);
      check(phase == DIV_W'((c - 1 - last_tick) % d), $sformatf("phase=%0d at c=%0d", phase, c));
      if (adc_tick) begin
        nticks++;
        check(c - last_tick == d, $sformatf("tick spacing %0d expected %0d", c - last_tick, d));
        last_tick = c;
      end
    end
    check(nticks == 10, $sformatf("div=%0d: %0d ticks expected 10", d, nticks));
    run = 0;
    @(negedge clk);
    repeat (2 * d) begin
      @(negedge clk);
      check(!adc_tick, "tick after run fell");
    end
  endtask
endmodule
