// efdi_workloads_tb: runs the core at its default size on the operating
// points the instrument was characterized at.
//
// (a) Integrator mode with the internal trigger at 125, 250 and 500 kS/s
//     with OSR 125, 250 and 500, so that all three give one increment per
//     millisecond. The input is a 7 Hz sine of 8 V peak-to-peak on a +/-10 V
//     full scale, quantized to 18 bits at each conversion start. Every
//     increment is checked exactly against a tick-by-tick sum of the held
//     codes, against the analytic integral of the sine (within the
//     sample-and-hold error), and for its spacing of 25 000 UTC ticks.
// (b) DMA throughput: digitizer mode fills the 16 kB buffer, which is then
//     read out through the buffer window in bursts of 256 words. The rate
//     on the local bus must be at least 100 MB/s.
module efdi_workloads_tb;
  import efdi_pkg::*;
  logic clk = 0, rst_n = 0, lclk = 0, lrst_n = 0;
  logic trig_in = 0;
  logic adc_cnvst_n, adc_busy, adc_cs_n, adc_rd_n;
  logic [17:0] adc_data, next_code;
  logic dsp_clk;
  logic [1:0] dsp_irq;
  logic dsp_sclk = 0, dsp_mosi = 0, dsp_cs_n = 1, dsp_miso;
  logic [3:0] spi_cs_n, spi_sclk, spi_mosi;
  logic [3:0] spi_miso = '0;
  logic [15:0] relay;
  logic ads_n = 1, lw_r_n = 0, blast_n = 1;
  logic [31:0] lad_in = 0, lad_out;
  logic lad_oe, ready_n;
  int unsigned n_conv;
  int checks = 0, failures = 0;

  efdi_fpga dut (.*);
  ad7634_model #(.T_BUSY_ON(15), .T_CONV(600)) u_adc (
    .cnvst_n(adc_cnvst_n), .busy(adc_busy), .cs_n(adc_cs_n), .rd_n(adc_rd_n),
    .data(adc_data), .next_code, .n_conv
  );

  always #20   clk  = ~clk;
  always #12.5 lclk = ~lclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- input signal: 7 Hz sine, 4 V amplitude on a 10 V full scale ----
  localparam real PI   = 3.14159265358979;
  localparam real AMP  = 4.0 / 10.0 * 131072.0;   // LSB
  localparam real W    = 2.0 * PI * 7.0 * 40e-9;  // rad per UTC tick
  localparam real PHI0 = 0.7;

  function automatic real sig(input real u);
    return AMP * $sin(W * u + PHI0);
  endfunction

  longint cyc;
  always @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;
  // at the negedge of the tick cycle, cyc equals the UTC of that cycle
  always @(negedge clk) next_code = 18'($rtoi(sig(real'(cyc)) + (sig(real'(cyc)) >= 0 ? 0.5 : -0.5)));

  longint s_log[$];
  logic signed [17:0] v_log[$];
  always @(negedge adc_cnvst_n) begin
    v_log.push_back(next_code);
    #1 s_log.push_back(cyc - 1);
  end

  // ---- local-bus master ----
  task automatic bus_cycle(input logic [31:0] addr, input bit write, input int n,
                           ref logic [31:0] data[$]);
    @(posedge lclk); #1;
    ads_n = 0; lad_in = addr; lw_r_n = write; blast_n = 1;
    @(posedge lclk); #1;
    ads_n = 1;
    for (int i = 0; i < n; i++) begin
      blast_n = (i == n - 1) ? 1'b0 : 1'b1;
      if (write) lad_in = data[i];
      @(negedge lclk);
      while (ready_n) @(negedge lclk);
      if (!write) data.push_back(lad_out);
      @(posedge lclk); #1;
    end
    blast_n = 1;
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] v);
    logic [31:0] d[$];
    d = '{v};
    bus_cycle(32'(a), 1, 1, d);
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] v);
    logic [31:0] d[$];
    bus_cycle(32'(a), 0, 1, d);
    v = d[0];
  endtask

  result_t recs[$];

  task automatic drain(input int burst);
    logic [31:0] st, d[$];
    int n;
    rd(REG_STATUS, st);
    n = int'(st[12:0]);
    while (n > 0) begin
      int b;
      b = n > burst ? burst : n;
      d.delete();
      bus_cycle(32'h8000, 0, b, d);
      for (int i = 0; i < b; i += 4) begin
        result_t r;
        r.raw = d[i][31]; r.utc = {1'b0, d[i][30:0], d[i+1]}; r.value = {d[i+2], d[i+3]};
        recs.push_back(r);
      end
      n -= b;
    end
  endtask

  // ---- (a) one rate ----
  int n_inc_total;

  task automatic rate_run(input int div, input int osr, input int n_inc);
    logic [31:0] st;
    longint t[$];
    longint acc, u;
    real exact, tol;
    int j;
    result_t r;
    wr(REG_CTRL, 0);
    wr(REG_DIV, 32'(div));
    wr(REG_OSR, 32'(osr));
    repeat (4) @(posedge clk);
    s_log.delete(); v_log.delete(); recs.delete();
    wr(REG_CTRL, 32'h5);                           // run, internal trigger
    repeat (div * osr * (n_inc + 1) + 3 * div) @(posedge clk);
    wr(REG_CTRL, 0);
    repeat (6) @(posedge clk);
    rd(REG_STATUS, st);
    check(st[18:16] == 3'b000, $sformatf("error flags %b at %0d kS/s", st[18:16], 25000 / div));
    drain(64);
    check(recs.size() == n_inc, $sformatf("%0d kS/s: %0d increments, expected %0d",
                                          25000 / div, recs.size(), n_inc));
    for (int i = osr - 1; i < s_log.size(); i += osr) t.push_back(s_log[i]);
    j = 0;
    for (int k = 1; k < t.size() && recs.size() > 0; k++) begin
      acc = 0;
      for (u = t[k-1] + 1; u <= t[k]; u++) begin
        while (j < s_log.size() && s_log[j] < u) j++;
        acc += longint'(v_log[j]);
      end
      r = recs.pop_front();
      check(t[k] - t[k-1] == 25000, "increment spacing is not 1 ms");
      check(longint'(r.utc) == t[k], $sformatf("increment time %0d expected %0d", r.utc, t[k]));
      check(r.value == acc, $sformatf("increment %0d expected %0d", r.value, acc));
      // analytic integral of the sine over (t[k-1], t[k]]
      exact = AMP / W * ($cos(W * real'(t[k-1]) + PHI0) - $cos(W * real'(t[k]) + PHI0));
      // sample-and-hold error: about half a sample period times the slope,
      // plus rounding of every sample
      tol = AMP * W * real'(div) * 25000.0 + 0.5 * 25000.0;
      check(((real'(r.value) - exact) <= tol) && ((exact - real'(r.value)) <= tol),
            $sformatf("%0d kS/s: increment %0d vs analytic %f", 25000 / div, r.value, exact));
      n_inc_total++;
    end
  endtask

  initial begin
    logic [31:0] st;
    realtime t0, t1;
    real mbps;
    repeat (3) @(posedge clk);
    #1 rst_n = 1; lrst_n = 1;

    rate_run(200, 125, 20);   // 125 kS/s, OSR 125
    rate_run(100, 250, 20);   // 250 kS/s, OSR 250
    rate_run(50, 500, 20);   // 500 kS/s, OSR 500
    check(n_inc_total == 60, $sformatf("%0d increments checked", n_inc_total));

    // (b) fill the buffer, then move it in 256-word bursts
    wr(REG_CTRL, 0);
    wr(REG_DIV, 30);
    repeat (4) @(posedge clk);
    wr(REG_CTRL, 32'h3);                           // run, digitizer
    repeat (30 * 1050) @(posedge clk);
    wr(REG_CTRL, 0);
    repeat (6) @(posedge clk);
    rd(REG_STATUS, st);
    check(st[12:0] == 13'd4096, "buffer not full");
    recs.delete();
    t0 = $realtime;
    drain(256);
    t1 = $realtime;
    mbps = 16384.0 / ((t1 - t0) * 1e-9) / 1e6;
    $display("16 kB moved in %0.0f ns: %0.1f MB/s", t1 - t0, mbps);
    check(recs.size() == 1024, "records moved");
    check(mbps >= 100.0, $sformatf("throughput %0.1f MB/s below 100 MB/s", mbps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
