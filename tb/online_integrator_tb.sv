// online_integrator_tb: checks the flux increments against a tick-by-tick
// reference. The testbench draws random 18-bit samples V_j with sampling
// instants s_j = j * D and random trigger times t (at least two sample
// periods apart). The signal held at V_j over (s_{j-1}, s_j] is summed one
// UTC tick at a time between consecutive triggers, with no multiplication,
// and each released increment must equal that sum. The interval before the
// first trigger must not be released. Digitizer mode must release every
// sample unchanged with its sampling time.
module online_integrator_tb;
  import efdi_pkg::*;
  localparam int D = 7;
  localparam int NS = 400;
  logic clk = 0, rst_n = 0, run = 0, digitizer = 0;
  logic [DIV_W-1:0] div = DIV_W'(D);
  logic tag_valid = 0, smp_valid = 0;
  smp_tag_t tag;
  logic signed [17:0] smp_data;
  logic res_valid;
  result_t res;
  int checks = 0, failures = 0;

  online_integrator dut (.*);
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

  logic signed [17:0] v[NS+1];
  longint trig_t[$];
  longint exp_val[$], exp_t[$];
  int n_res;

  always @(posedge clk) if (rst_n && res_valid) begin
    n_res++;
    if (exp_val.size() == 0) check(1'b0, "unexpected result");
    else begin
      longint ev, et;
      ev = exp_val.pop_front(); et = exp_t.pop_front();
      check(res.value == ev, $sformatf("increment %0d expected %0d", res.value, ev));
      check(longint'(res.utc) == et, $sformatf("time %0d expected %0d", res.utc, et));
      check(res.raw == digitizer, "raw flag");
    end
  end

  task automatic feed(input bit dig);
    longint t, acc, tj;
    int k;
    // random samples and triggers
    for (int j = 1; j <= NS; j++) v[j] = 18'($urandom);
    trig_t.delete();
    t = D * 3 + $urandom_range(1, D);
    while (t < longint'(D) * (NS - 2)) begin
      trig_t.push_back(t);
      t += 2 * D + $urandom_range(0, 5 * D);
    end
    // reference: tick-by-tick sum, released at every trigger but the first
    if (!dig) begin
      acc = 0; k = 0;
      for (longint u = 1; u <= longint'(D) * NS; u++) begin
        acc += v[int'((u + D - 1) / D)];
        if (k < trig_t.size() && u == trig_t[k]) begin
          if (k > 0) begin exp_val.push_back(acc); exp_t.push_back(u); end
          acc = 0; k++;
        end
      end
    end else begin
      for (int j = 1; j <= NS; j++) begin
        exp_val.push_back(longint'(v[j])); exp_t.push_back(longint'(j) * D);
      end
    end
    // stimulus: tag one cycle after each tick, sample a few cycles later
    k = 0;
    for (int j = 1; j <= NS; j++) begin
      tj = longint'(j) * D;
      @(negedge clk);
      tag_valid = 1;
      tag.t_smp = UTC_W'(tj);
      if (k < trig_t.size() && trig_t[k] <= tj) begin
        tag.trig = 1; tag.tau_b = DIV_W'(trig_t[k] - (tj - D)); tag.t_trig = UTC_W'(trig_t[k]); k++;
      end else begin
        tag.trig = 0; tag.tau_b = 0; tag.t_trig = 0;
      end
      @(negedge clk) tag_valid = 0;
      repeat (2) @(negedge clk);
      smp_valid = 1; smp_data = v[j];
      @(negedge clk) smp_valid = 0;
      repeat (2) @(negedge clk);
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk) run = 1;
    feed(0);
    check(exp_val.size() == 0, $sformatf("%0d increments not released", exp_val.size()));
    check(n_res > 30, $sformatf("only %0d increments", n_res));
    @(negedge clk) run = 0; digitizer = 1;
    @(negedge clk) run = 1;
    n_res = 0;
    feed(1);
    check(exp_val.size() == 0, "samples not released");
    check(n_res == NS, $sformatf("%0d raw samples", n_res));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
