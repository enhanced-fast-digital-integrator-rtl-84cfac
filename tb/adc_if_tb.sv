// adc_if_tb: drives adc_if against the behavioural converter model. Each
// tick must start exactly one conversion; the code the model sampled must
// come out on smp_data, once, within a bounded latency; data must be latched
// only while CS#/RD# are low (the model shows a filler code otherwise). Ticks
// faster than a conversion must set adc_overrun.
module adc_if_tb;
  logic clk = 0, rst_n = 0, run = 0, adc_tick = 0;
  logic cnvst_n, busy, cs_n, rd_n;
  logic [17:0] adc_data, next_code;
  logic smp_valid, adc_overrun;
  logic signed [17:0] smp_data;
  int unsigned n_conv;
  int checks = 0, failures = 0;

  adc_if dut (.*);
  ad7634_model #(.T_BUSY_ON(15), .T_CONV(600)) adc (
    .cnvst_n, .busy, .cs_n, .rd_n, .data(adc_data), .next_code, .n_conv
  );
  always #20 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [17:0] exp_q[$];
  int lat, max_lat, n_smp;
  logic [17:0] e;

  always @(negedge cnvst_n) exp_q.push_back(next_code);

  task automatic one_sample(input int period);
    next_code = 18'($urandom);
    if (next_code == 18'h2AAAA) next_code = 18'h1;
    @(negedge clk) adc_tick = 1;
    @(negedge clk) adc_tick = 0;
    lat = 1;
    while (!smp_valid && lat < period) begin @(negedge clk); lat++; end
    check(smp_valid, "no sample within the period");
    if (smp_valid) begin
      e = exp_q.pop_front();
      check(smp_data == e, $sformatf("smp_data=%h expected %h", smp_data, e));
      n_smp++;
      if (lat > max_lat) max_lat = lat;
    end
    repeat (period - lat - 1) begin
      @(negedge clk);
      check(!smp_valid, "extra sample");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1; run = 1;
    repeat (40) one_sample(50);
    check(n_conv == 40, $sformatf("%0d conversions, expected 40", n_conv));
    check(n_smp == 40, "sample count");
    // 2 + 0.6 us/40 ns + sync + read: about 25 cycles
    check(max_lat <= 30, $sformatf("latency %0d cycles", max_lat));
    check(!adc_overrun, "false overrun");
    // ticks every 5 cycles: faster than the converter
    repeat (4) begin
      @(negedge clk) adc_tick = 1;
      @(negedge clk) adc_tick = 0;
      repeat (3) @(negedge clk);
    end
    check(adc_overrun, "overrun not flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
