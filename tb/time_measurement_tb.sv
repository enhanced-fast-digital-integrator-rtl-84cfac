// time_measurement_tb: checks trigger time stamps, residual times and the
// internal trigger. The testbench runs its own sample-tick generator and
// UTC counter. External triggers are raised at random cycles (at least two
// sample periods apart); each must appear in the tag of the first tick at
// or after its detection (pin time + 2 synchronizer cycles), with tau_b equal
// to the UTC distance from the previous tick. Two triggers in one interval
// must set trig_overrun. With the internal trigger every `osr` ticks, every
// osr-th tag must carry tau_b = div and the tick's own time.
module time_measurement_tb;
  import efdi_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, trig_in = 0, trig_int_en = 0;
  logic [15:0] osr = 4;
  logic adc_tick;
  logic [DIV_W-1:0] phase;
  logic [UTC_W-1:0] utc;
  logic tag_valid, trig_overrun;
  smp_tag_t tag;
  logic [31:0] trig_count;
  int checks = 0, failures = 0;
  localparam int D = 9;

  time_measurement dut (.*);
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

  // reference tick generator and UTC
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin utc <= '0; phase <= '0; end
    else begin
      utc <= utc + 1;
      if (!run || adc_tick) phase <= '0; else phase <= phase + 1;
    end
  end
  assign adc_tick = run && (phase == DIV_W'(D - 1));

  // scoreboard
  longint exp_q[$];
  longint last_tick_utc;
  int     n_trig_tags, n_int_tags, n_tags;

  longint t;
  always @(posedge clk) begin
    if (adc_tick) last_tick_utc <= longint'(utc);
    if (rst_n && tag_valid) begin
      n_tags++;
      if (!trig_int_en) begin
        if (exp_q.size() > 0 && exp_q[0] <= longint'(tag.t_smp)) begin
          t = exp_q.pop_front();
          check(tag.trig, $sformatf("trigger at %0d missing in tag %0d", t, tag.t_smp));
          check(longint'(tag.t_trig) == t, $sformatf("t_trig=%0d expected %0d", tag.t_trig, t));
          check(longint'(tag.tau_b) == t - (longint'(tag.t_smp) - D),
                $sformatf("tau_b=%0d expected %0d", tag.tau_b, t - (longint'(tag.t_smp) - D)));
          check(tag.tau_b >= 1 && tag.tau_b <= D, "tau_b out of range");
          n_trig_tags++;
        end else begin
          check(!tag.trig, $sformatf("unexpected trigger in tag %0d", tag.t_smp));
        end
      end else begin
        check(tag.trig == ((n_tags % osr) == 0), $sformatf("internal trigger at tag %0d", n_tags));
        if (tag.trig) begin
          check(tag.tau_b == DIV_W'(D), "internal trigger tau_b");
          check(tag.t_trig == tag.t_smp, "internal trigger time");
          n_int_tags++;
        end
      end
    end
  end

  task automatic pulse_at(input int gap);
    repeat (gap) @(posedge clk);
    #1 trig_in = 1;
    exp_q.push_back(longint'(utc) + 2);
    repeat (3) @(posedge clk);
    #1 trig_in = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 run = 1;
    // external triggers, at least 2 sample periods apart
    for (int i = 0; i < 60; i++) pulse_at(2 * D + int'($urandom_range(0, 3 * D)));
    repeat (3 * D) @(posedge clk);
    check(exp_q.size() == 0, "triggers left unreported");
    check(n_trig_tags == 60, $sformatf("%0d trigger tags", n_trig_tags));
    check(trig_count == 60, $sformatf("trig_count=%0d", trig_count));
    check(!trig_overrun, "false trigger overrun");
    // two triggers inside one sample interval
    @(posedge clk iff adc_tick);
    #1 trig_in = 1; exp_q.push_back(longint'(utc) + 2);
    repeat (2) @(posedge clk); #1 trig_in = 0;
    repeat (2) @(posedge clk); #1 trig_in = 1; repeat (2) @(posedge clk); #1 trig_in = 0;
    repeat (2 * D) @(posedge clk);
    check(trig_overrun, "trigger overrun not flagged");
    // internal trigger
    #1 run = 0; trig_int_en = 1; osr = 4;
    repeat (2) @(posedge clk);
    n_tags = 0;
    #1 run = 1;
    repeat (D * 41) @(posedge clk);
    check(!trig_overrun, "overrun flag not cleared by run");
    check(n_int_tags == 10, $sformatf("%0d internal trigger tags, expected 10", n_int_tags));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
