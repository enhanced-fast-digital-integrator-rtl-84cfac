// spi_dispatch_tb: plays the DSP's SPI master. A 24-bit frame sent with each
// target selected must reach that target alone (the others see no chip
// select and no clock) and the selected target's MISO must come back. A
// change of selection during a frame must only take effect after it.
module spi_dispatch_tb;
  import efdi_pkg::*;
  logic clk = 0, rst_n = 0;
  spi_sel_e sel = SPI_DAC_P, active;
  logic m_sclk = 0, m_mosi = 0, m_cs_n = 1, m_miso;
  logic [3:0] s_cs_n, s_sclk, s_mosi, s_miso;
  int checks = 0, failures = 0;

  spi_dispatch dut (.*);
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

  // four SPI targets: shift in MOSI on rising SCLK, return a fixed pattern
  logic [23:0] rx[4];
  int          edges[4];
  logic [23:0] pat[4] = '{24'h1A2B3C, 24'h4D5E6F, 24'h708192, 24'hA3B4C5};
  int          bitn[4];
  for (genvar i = 0; i < 4; i++) begin : g_tgt
    always @(posedge s_sclk[i]) if (!s_cs_n[i]) begin
      rx[i] = {rx[i][22:0], s_mosi[i]};
      edges[i]++;
    end
    always @(negedge s_sclk[i] or negedge s_cs_n[i]) if (!s_cs_n[i]) bitn[i]++;
    assign s_miso[i] = s_cs_n[i] ? 1'b0 : pat[i][23 - (bitn[i] % 24)];
  end

  logic [23:0] got;

  task automatic frame(input logic [23:0] w, input int mid_sel);
    m_cs_n = 0; #100;
    for (int b = 23; b >= 0; b--) begin
      m_mosi = w[b]; #100;
      if (b == 12 && mid_sel >= 0) sel = spi_sel_e'(mid_sel);
      got = {got[22:0], m_miso};
      m_sclk = 1; #100; m_sclk = 0;
    end
    #100 m_cs_n = 1; #200;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      logic [23:0] w;
      sel = spi_sel_e'(t);
      #300;
      for (int i = 0; i < 4; i++) begin edges[i] = 0; bitn[i] = -1; end
      w = 24'($urandom);
      frame(w, -1);
      check(rx[t] == w, $sformatf("target %0d received %h expected %h", t, rx[t], w));
      check(got == pat[t], $sformatf("MISO from target %0d %h", t, got));
      for (int i = 0; i < 4; i++)
        check(edges[i] == (i == t ? 24 : 0), $sformatf("target %0d saw %0d clocks", i, edges[i]));
    end
    // selection change inside a frame
    sel = SPI_DAC_P; #300;
    for (int i = 0; i < 4; i++) edges[i] = 0;
    frame(24'h123456, int'(SPI_FLASH));
    check(edges[0] == 24 && edges[2] == 0, "selection switched inside a frame");
    #300;
    check(active == SPI_FLASH, "selection not taken after the frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
