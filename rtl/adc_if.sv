// adc_if: conversion control and parallel read-out of the 18-bit ADC.
//
// Every adc_tick starts one conversion: CNVST# is pulled low for CNV_LOW
// clk cycles. The converter raises BUSY while it converts; after BUSY has
// fallen again (seen through a two-flip-flop synchronizer) the block drives
// CS# and RD# low for RD_CYC cycles, latches the 18-bit two's-complement
// code on the last of them, and presents it for one cycle on `smp_valid` /
// `smp_data`. Latency from tick to smp_valid is CNV_LOW + conversion time +
// about 4 + RD_CYC cycles; it must be shorter than the sample period. A tick
// that arrives before the previous read-out has finished is not converted
// and sets the sticky `adc_overrun` flag (cleared when run rises). If BUSY
// never rises after a start, the block gives up after BUSY_TIMEOUT cycles.
//
// From the source: an 18-bit ADC with a parallel data bus and a control
// bus, clocked from the FPGA. This design's choices: the CNVST#/BUSY/CS#/RD#
// handshake (that of the usual 18-bit parallel SAR converters), two's-
// complement output coding, the pulse lengths and the overrun handling.
module adc_if
  import efdi_pkg::*;
#(
  parameter int unsigned DATA_W       = ADC_W,
  parameter int unsigned CNV_LOW      = 2,
  parameter int unsigned RD_CYC       = 2,
  parameter int unsigned BUSY_TIMEOUT = 255
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  input  logic                     adc_tick,
  // converter pins
  output logic                     cnvst_n,
  input  logic                     busy,
  output logic                     cs_n,
  output logic                     rd_n,
  input  logic [DATA_W-1:0]        adc_data,
  // sample stream
  output logic                     smp_valid,
  output logic signed [DATA_W-1:0] smp_data,
  output logic                     adc_overrun
);

  typedef enum logic [2:0] {IDLE, START, WAIT_HI, WAIT_LO, READ} state_e;
  state_e state;

  logic busy_s;
  sync2 u_sync (.clk, .rst_n, .d(busy), .q(busy_s));

  logic [7:0] cnt;
  logic       run_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      cnt         <= '0;
      cnvst_n     <= 1'b1;
      cs_n        <= 1'b1;
      rd_n        <= 1'b1;
      smp_valid   <= 1'b0;
      smp_data    <= '0;
      adc_overrun <= 1'b0;
      run_d       <= 1'b0;
    end else begin
      run_d     <= run;
      smp_valid <= 1'b0;
      if (run && !run_d) adc_overrun <= 1'b0;
      if (adc_tick && state != IDLE) adc_overrun <= 1'b1;
      unique case (state)
        IDLE: if (adc_tick) begin
          cnvst_n <= 1'b0;
          cnt     <= 8'(CNV_LOW - 1);
          state   <= START;
        end
        START: if (cnt == 0) begin
          cnvst_n <= 1'b1;
          cnt     <= 8'(BUSY_TIMEOUT);
          state   <= WAIT_HI;
        end else cnt <= cnt - 1'b1;
        WAIT_HI: if (busy_s) state <= WAIT_LO;
          else if (cnt == 0) state <= IDLE;
          else cnt <= cnt - 1'b1;
        WAIT_LO: if (!busy_s) begin
          cs_n  <= 1'b0;
          rd_n  <= 1'b0;
          cnt   <= 8'(RD_CYC - 1);
          state <= READ;
        end
        READ: if (cnt == 0) begin
          cs_n      <= 1'b1;
          rd_n      <= 1'b1;
          smp_data  <= adc_data;
          smp_valid <= 1'b1;
          state     <= IDLE;
        end else cnt <= cnt - 1'b1;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
