// efdi_fpga: digital core of the fast digital integrator.
//
// A coil voltage is digitized continuously and integrated between
// consecutive trigger pulses; each trigger releases one flux increment with
// its time stamp, which the host collects over PXI by DMA. This module wires
// the acquisition chain and the bus side together:
//
//   timebase          25 MHz UTC, ADC sample ticks (UTC / div), 12.5 MHz DSP clock
//   time_measurement  trigger recognition, UTC stamp, residual time tau_b
//   adc_if            CNVST#/BUSY/RD# control of the 18-bit ADC
//   online_integrator per-trigger increments (or raw codes in digitizer mode)
//   record_packer     four 32-bit words per result
//   dpram_fifo        4096-word (16 kB) dual-clock buffer, clk -> lclk
//   local_bus_slave   registers and DMA window for the PCI 9056 local bus
//   spi_dispatch      DSP SPI bus to the two reference DACs, flash, memory
//
// Two clocks: `clk` is the 25 MHz UTC crystal clock and drives the whole
// acquisition side; `lclk` is the 40 MHz local-bus clock. Only the buffer,
// the run bit and the status flags cross between them (through the Gray-
// coded FIFO and two-flip-flop synchronizers). The other control registers
// (div, osr, digitizer, trigger source, SPI target) are written by software
// while run is low and are used in the clk domain without synchronization;
// changing them during a run is not supported.
//
// dsp_irq[0] pulses for one clk cycle when a record has been buffered;
// dsp_irq[1] is high while any of the overflow / overrun flags is set.
// The relay drive bits for the analog front end come straight from a
// register; their meaning is set by the board.
module efdi_fpga
  import efdi_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4096
) (
  input  logic        clk,        // 25 MHz UTC clock
  input  logic        rst_n,
  input  logic        trig_in,    // external trigger (encoder pulses)
  // ADC
  output logic        adc_cnvst_n,
  input  logic        adc_busy,
  output logic        adc_cs_n,
  output logic        adc_rd_n,
  input  logic [17:0] adc_data,
  // DSP
  output logic        dsp_clk,
  output logic [1:0]  dsp_irq,
  input  logic        dsp_sclk,
  input  logic        dsp_mosi,
  input  logic        dsp_cs_n,
  output logic        dsp_miso,
  // SPI targets: [0] DAC VREF+, [1] DAC VREF-, [2] flash, [3] memory
  output logic [3:0]  spi_cs_n,
  output logic [3:0]  spi_sclk,
  output logic [3:0]  spi_mosi,
  input  logic [3:0]  spi_miso,
  // analog front-end relays
  output logic [15:0] relay,
  // PCI 9056 local bus
  input  logic        lclk,       // 40 MHz
  input  logic        lrst_n,
  input  logic        ads_n,
  input  logic        lw_r_n,
  input  logic        blast_n,
  input  logic [31:0] lad_in,
  output logic [31:0] lad_out,
  output logic        lad_oe,
  output logic        ready_n
);
  localparam int unsigned CNT_BITS = $clog2(FIFO_DEPTH) + 1;

  // ---- configuration (lclk domain) ----
  logic       cfg_run, cfg_digitizer, cfg_trig_int;
  logic [DIV_W-1:0] cfg_div;
  logic [15:0] cfg_osr;
  spi_sel_e   cfg_spi_sel;

  logic run;
  sync2 u_run_sync (.clk, .rst_n, .d(cfg_run), .q(run));

  // ---- acquisition chain (clk domain) ----
  logic [UTC_W-1:0] utc;
  logic             adc_tick;
  logic [DIV_W-1:0] phase;

  timebase u_timebase (
    .clk, .rst_n, .run, .div(cfg_div),
    .utc, .adc_tick, .phase, .dsp_clk
  );

  logic     tag_valid;
  smp_tag_t tag;
  logic     trig_overrun;
  logic [31:0] trig_count;

  time_measurement u_time (
    .clk, .rst_n, .run, .trig_in, .trig_int_en(cfg_trig_int), .osr(cfg_osr),
    .adc_tick, .phase, .utc, .tag_valid, .tag, .trig_overrun, .trig_count
  );

  logic               smp_valid;
  logic signed [17:0] smp_data;
  logic               adc_overrun;

  adc_if u_adc (
    .clk, .rst_n, .run, .adc_tick,
    .cnvst_n(adc_cnvst_n), .busy(adc_busy), .cs_n(adc_cs_n), .rd_n(adc_rd_n),
    .adc_data, .smp_valid, .smp_data, .adc_overrun
  );

  logic    res_valid;
  result_t res;

  online_integrator u_integ (
    .clk, .rst_n, .run, .digitizer(cfg_digitizer), .div(cfg_div),
    .tag_valid, .tag, .smp_valid, .smp_data, .res_valid, .res
  );

  logic                wr_en, wr_full;
  logic [31:0]         wr_data;
  logic [CNT_BITS-1:0] wr_free;
  logic                overflow, rec_done;
  logic [15:0]         drop_count;

  record_packer #(.FREE_BITS(CNT_BITS)) u_pack (
    .clk, .rst_n, .run, .res_valid, .res, .wr_free,
    .wr_en, .wr_data, .overflow, .drop_count, .rec_done
  );

  assign dsp_irq = {overflow | trig_overrun | adc_overrun, rec_done};

  // ---- buffer ----
  logic                fifo_rd_en, fifo_empty;
  logic [31:0]         fifo_data;
  logic [CNT_BITS-1:0] fifo_count;

  dpram_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en, .wr_data, .wr_full, .wr_free,
    .rclk(lclk), .rrst_n(lrst_n), .rd_en(fifo_rd_en), .rd_data(fifo_data),
    .rd_empty(fifo_empty), .rd_count(fifo_count)
  );

  // ---- bus side (lclk domain) ----
  logic st_overflow, st_trig_overrun, st_adc_overrun;
  sync2 u_s0 (.clk(lclk), .rst_n(lrst_n), .d(overflow),     .q(st_overflow));
  sync2 u_s1 (.clk(lclk), .rst_n(lrst_n), .d(trig_overrun), .q(st_trig_overrun));
  sync2 u_s2 (.clk(lclk), .rst_n(lrst_n), .d(adc_overrun),  .q(st_adc_overrun));

  local_bus_slave #(.CNT_BITS(CNT_BITS)) u_lbus (
    .lclk, .lrst_n, .ads_n, .lw_r_n, .blast_n, .lad_in, .lad_out, .lad_oe, .ready_n,
    .fifo_rd_en, .fifo_data, .fifo_empty, .fifo_count,
    .cfg_run, .cfg_digitizer, .cfg_trig_int, .cfg_div, .cfg_osr,
    .cfg_spi_sel, .cfg_relay(relay),
    .st_overflow, .st_trig_overrun, .st_adc_overrun,
    .st_trig_count(trig_count), .st_drop_count(drop_count)
  );

  // ---- SPI ----
  spi_sel_e spi_active;
  spi_dispatch u_spi (
    .clk, .rst_n, .sel(cfg_spi_sel),
    .m_sclk(dsp_sclk), .m_mosi(dsp_mosi), .m_cs_n(dsp_cs_n), .m_miso(dsp_miso),
    .s_cs_n(spi_cs_n), .s_sclk(spi_sclk), .s_mosi(spi_mosi), .s_miso(spi_miso),
    .active(spi_active)
  );

endmodule
