// efdi_fpga_tb: end-to-end test of the integrator core at its default size
// (4096-word buffer). The testbench plays the ADC (behavioural converter
// model fed with random codes), the encoder trigger, the DSP's SPI master and
// the PCI 9056 local-bus master that configures the core and empties the
// buffer with DMA-style bursts. It keeps its own log of every conversion
// start (UTC time and code) and every trigger, and from that log computes
// the expected flux increments tick by tick.
//
// Scenarios: (1) integrator mode with external triggers at random spacing;
// (2) integrator mode with the internal trigger every OSR samples; (3)
// digitizer mode, raw codes with their sampling times; (4) a burst that
// waits on an empty buffer; (5) buffer overflow with records dropped; (6)
// two triggers in one sample interval (trigger overrun); (7) a sample
// period shorter than a conversion (ADC overrun); (8) SPI frames routed to
// both reference DACs. Each mechanism is counted and must occur.
module efdi_fpga_tb;
  import efdi_pkg::*;
  logic clk = 0, rst_n = 0, lclk = 0, lrst_n = 0;
  logic trig_in = 0;
  logic adc_cnvst_n, adc_busy, adc_cs_n, adc_rd_n;
  logic [17:0] adc_data, next_code;
  logic dsp_clk;
  logic [1:0] dsp_irq;
  logic dsp_sclk = 0, dsp_mosi = 0, dsp_cs_n = 1, dsp_miso;
  logic [3:0] spi_cs_n, spi_sclk, spi_mosi, spi_miso;
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

  always #20   clk  = ~clk;    // 25 MHz UTC
  always #12.5 lclk = ~lclk;   // 40 MHz local bus

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- UTC reference and conversion log ----
  longint cyc;
  always @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  longint s_log[$];
  logic signed [17:0] v_log[$];
  always @(negedge adc_cnvst_n) begin
    v_log.push_back(next_code);
    #1 s_log.push_back(cyc - 1);
    next_code = 18'($urandom);
  end

  // ---- mechanism counters ----
  int n_ext_inc, n_int_inc, n_raw, n_wait, n_overflow, n_trig_ovr, n_adc_ovr, n_spi, n_irq;
  always @(posedge clk) if (rst_n && dsp_irq[0]) n_irq++;

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
      while (ready_n) begin n_wait++; @(negedge lclk); end
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

  // records read back: {raw, utc, value}
  result_t recs[$];

  // DMA: read the whole buffer in bursts of up to 16 words
  task automatic drain();
    logic [31:0] st, d[$];
    int n;
    rd(REG_STATUS, st);
    n = int'(st[12:0]);
    check(n % 4 == 0, $sformatf("buffer holds %0d words, not whole records", n));
    while (n > 0) begin
      int b;
      b = n > 16 ? 16 : n;
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

  // expected increments between consecutive triggers t[k-1], t[k]
  task automatic check_increments(input longint t[$], input bit internal_src);
    int j, k, nchk;
    longint acc;
    result_t r;
    j = 0; acc = 0; nchk = 0;
    check(recs.size() == t.size() - 1,
          $sformatf("%0d increments for %0d triggers", recs.size(), t.size()));
    for (k = 1; k < t.size() && recs.size() > 0; k++) begin
      acc = 0;
      for (longint u = t[k-1] + 1; u <= t[k]; u++) begin
        while (j < s_log.size() && s_log[j] < u) j++;
        if (j < s_log.size()) acc += longint'(v_log[j]);
      end
      r = recs.pop_front();
      check(!r.raw, "raw flag in integrator mode");
      check(longint'(r.utc) == t[k], $sformatf("increment %0d time %0d expected %0d", k, r.utc, t[k]));
      check(r.value == acc, $sformatf("increment %0d = %0d expected %0d", k, r.value, acc));
      if (internal_src) n_int_inc++; else n_ext_inc++;
    end
  endtask

  longint trig_t[$];
  logic [31:0] st;

  task automatic start(input bit digitizer, input bit internal_src, input int div, input int osr);
    wr(REG_CTRL, 0);
    wr(REG_DIV, 32'(div));
    wr(REG_OSR, 32'(osr));
    repeat (4) @(posedge clk);
    s_log.delete(); v_log.delete(); recs.delete(); trig_t.delete();
    wr(REG_CTRL, {29'h0, internal_src, digitizer, 1'b1});
  endtask

  task automatic stop();
    wr(REG_CTRL, 0);
    repeat (6) @(posedge clk);
  endtask

  task automatic trigger();
    @(posedge clk); #1 trig_in = 1;
    trig_t.push_back(cyc + 2);
    repeat (3) @(posedge clk); #1 trig_in = 0;
  endtask

  // ---- SPI targets: capture frames ----
  logic [23:0] spi_rx[4];
  int          spi_bits[4];
  for (genvar i = 0; i < 4; i++) begin : g_spi
    always @(posedge spi_sclk[i]) if (!spi_cs_n[i]) begin
      spi_rx[i] = {spi_rx[i][22:0], spi_mosi[i]};
      spi_bits[i]++;
    end
    assign spi_miso[i] = 1'b0;
  end

  task automatic spi_frame(input spi_sel_e t, input logic [23:0] w);
    wr(REG_SPISEL, 32'(t));
    repeat (4) @(posedge clk);
    for (int i = 0; i < 4; i++) spi_bits[i] = 0;
    dsp_cs_n = 0; #100;
    for (int b = 23; b >= 0; b--) begin
      dsp_mosi = w[b]; #100; dsp_sclk = 1; #100; dsp_sclk = 0;
    end
    #100 dsp_cs_n = 1; #200;
    check(spi_rx[t] == w && spi_bits[t] == 24, $sformatf("SPI frame to target %0d", t));
    for (int i = 0; i < 4; i++) if (i != int'(t)) check(spi_bits[i] == 0, "SPI clock leaked");
    n_spi++;
  endtask

  initial begin
    next_code = 18'($urandom);
    repeat (3) @(posedge clk);
    #1 rst_n = 1; lrst_n = 1;
    rd(REG_ID, st);
    check(st == ID_VALUE, "ID register");

    // (1) integrator mode, external triggers, 500 kS/s
    start(0, 0, 50, 500);
    repeat (200) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      trigger();
      repeat (100 + $urandom_range(0, 300)) @(posedge clk);
    end
    repeat (150) @(posedge clk);
    stop();
    rd(REG_TRIGS, st);
    check(st == 32'(trig_t.size()), $sformatf("TRIGS=%0d expected %0d", st, trig_t.size()));
    drain();
    check_increments(trig_t, 0);

    // (2) integrator mode, internal trigger every 5 samples
    start(0, 1, 40, 5);
    repeat (40 * 5 * 30 + 100) @(posedge clk);
    stop();
    // internal triggers fall on every 5th sampling instant
    for (int i = 4; i < s_log.size(); i += 5) trig_t.push_back(s_log[i]);
    drain();
    check(recs.size() >= 25, $sformatf("%0d internal-trigger increments", recs.size()));
    while (trig_t.size() > recs.size() + 1) void'(trig_t.pop_back());
    check_increments(trig_t, 1);

    // (3) digitizer mode; (4) a burst issued before data exists waits
    start(1, 0, 30, 500);
    begin
      logic [31:0] d[$];
      bus_cycle(32'h8000, 0, 4, d);       // waits for the first record
      check(n_wait > 10, $sformatf("only %0d wait states", n_wait));
      recs.push_back({d[0][31], 1'b0, d[0][30:0], d[1], d[2], d[3]});
    end
    repeat (30 * 60) @(posedge clk);
    stop();
    drain();
    check(recs.size() >= 55, $sformatf("%0d raw samples", recs.size()));
    for (int i = 0; i < recs.size(); i++) begin
      check(recs[i].raw, "raw flag");
      check(longint'(recs[i].utc) == s_log[i], $sformatf("sample %0d time %0d expected %0d", i, recs[i].utc, s_log[i]));
      check(recs[i].value == longint'(v_log[i]), $sformatf("sample %0d value", i));
      n_raw++;
    end

    // (5) overflow: digitizer mode, nobody reads
    start(1, 0, 30, 500);
    repeat (30 * 1100) @(posedge clk);
    stop();
    rd(REG_STATUS, st);
    check(st[16], "overflow flag");
    check(st[12:0] == 13'd4096, $sformatf("full buffer holds %0d words", st[12:0]));
    if (st[16]) n_overflow++;
    rd(REG_DROPS, st);
    // the last conversion may still be in flight when run falls
    check(int'(st) == s_log.size() - 1024 || int'(st) == s_log.size() - 1025,
          $sformatf("DROPS=%0d for %0d conversions", st, s_log.size()));
    drain();
    check(recs.size() == 1024, "records kept in full buffer");
    for (int i = 0; i < recs.size(); i++)
      check(recs[i].value == longint'(v_log[i]), "kept records are the oldest ones");

    // (6) trigger overrun: two triggers 4 cycles apart at 25 kS/s
    start(0, 0, 1000, 500);
    repeat (2500) @(posedge clk);
    @(posedge clk); #1 trig_in = 1; repeat (2) @(posedge clk); #1 trig_in = 0;
    repeat (2) @(posedge clk); #1 trig_in = 1; repeat (2) @(posedge clk); #1 trig_in = 0;
    repeat (10) @(posedge clk);
    rd(REG_STATUS, st);
    check(st[17], "trigger overrun flag");
    if (st[17]) n_trig_ovr++;
    stop();

    // (7) ADC overrun: sample period of 10 cycles is shorter than a conversion
    start(0, 0, 10, 500);
    repeat (200) @(posedge clk);
    rd(REG_STATUS, st);
    check(st[18], "ADC overrun flag");
    if (st[18]) n_adc_ovr++;
    stop();
    drain();

    // (8) SPI to the two reference DACs
    spi_frame(SPI_DAC_P, 24'h1FFFFF);
    spi_frame(SPI_DAC_N, 24'h100001);
    spi_frame(SPI_FLASH, 24'h0B0000);

    check(n_ext_inc >= 30, $sformatf("external-trigger increments: %0d", n_ext_inc));
    check(n_int_inc > 0,  "no internal-trigger increment");
    check(n_raw > 0,      "no digitizer sample");
    check(n_wait > 0,     "no wait state");
    check(n_overflow > 0, "no overflow");
    check(n_trig_ovr > 0, "no trigger overrun");
    check(n_adc_ovr > 0,  "no ADC overrun");
    check(n_spi == 3,     "SPI frames");
    check(n_irq > 1000,   $sformatf("record interrupts: %0d", n_irq));
    $display("mechanisms: ext=%0d int=%0d raw=%0d wait=%0d overflow=%0d trig_ovr=%0d adc_ovr=%0d spi=%0d irq=%0d",
             n_ext_inc, n_int_inc, n_raw, n_wait, n_overflow, n_trig_ovr, n_adc_ovr, n_spi, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
