// spi_dispatch: routes the DSP's SPI bus to one of four targets.
//
// The DSP is the only SPI master. Its chip select, clock and data are
// forwarded to the target chosen by `sel`: the DAC that makes VREF+, the DAC
// that makes VREF-, the configuration flash or a memory inside the FPGA.
// Only the selected target sees its chip select fall and the clock toggle;
// the others see an idle bus (CS# high, SCLK low, MOSI low), and the
// selected target's MISO is returned to the DSP. A new `sel` takes effect
// only while the DSP's chip select is high (after two clk cycles of
// synchronization), so a frame in progress is never cut between targets.
// The signal paths themselves are combinational; only the selection is
// clocked.
//
// From the source: the FPGA dispatches the SPI bus between internal memory,
// the DACs and the flash, and the DSP programs the two DACs over SPI. The
// selection register and the frame-boundary rule are this design's.
module spi_dispatch
  import efdi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  spi_sel_e   sel,
  // from the DSP
  input  logic       m_sclk,
  input  logic       m_mosi,
  input  logic       m_cs_n,
  output logic       m_miso,
  // to the targets, indexed by spi_sel_e
  output logic [3:0] s_cs_n,
  output logic [3:0] s_sclk,
  output logic [3:0] s_mosi,
  input  logic [3:0] s_miso,
  output spi_sel_e   active
);

  logic cs_s;
  sync2 #(.RESET_VAL(1'b1)) u_sync (.clk, .rst_n, .d(m_cs_n), .q(cs_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                active <= SPI_DAC_P;
    else if (cs_s && m_cs_n)   active <= sel;
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (active == spi_sel_e'(i)) begin
        s_cs_n[i] = m_cs_n;
        s_sclk[i] = m_sclk;
        s_mosi[i] = m_mosi;
      end else begin
        s_cs_n[i] = 1'b1;
        s_sclk[i] = 1'b0;
        s_mosi[i] = 1'b0;
      end
    end
  end

  assign m_miso = s_miso[active];

endmodule
