// timebase: universal time counter (UTC) and the clocks derived from it.
//
// The 25 MHz crystal clock counts the UTC, a free-running time stamp counter
// that starts at zero after reset and advances by one every clk edge. The ADC
// sampling clock is derived from the same counter by a programmable divider,
// so sampling and time stamps share one low-jitter source: while `run` is
// high, `adc_tick` is high for one clk cycle every `div` cycles. `phase` is
// the number of cycles since the last tick (0 .. div-1, equal to div-1 on the
// tick cycle). `dsp_clk` is clk divided by two (12.5 MHz for the DSP).
//
// From the source: UTC at 25 MHz, ADC clock divided from the UTC, 12.5 MHz
// DSP clock. This design's choices: a 64-bit UTC, a 16-bit divider whose
// value is any integer >= 2 (so any rate 25 MHz / div), and the divider
// restarting at phase 0 when run rises, so the first tick comes div cycles
// after the run edge.
module timebase
  import efdi_pkg::*;
#(
  parameter int unsigned UTC_BITS = UTC_W,
  parameter int unsigned DIV_BITS = DIV_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                run,
  input  logic [DIV_BITS-1:0] div,      // sample period in clk cycles, >= 2
  output logic [UTC_BITS-1:0] utc,
  output logic                adc_tick,
  output logic [DIV_BITS-1:0] phase,
  output logic                dsp_clk
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      utc     <= '0;
      dsp_clk <= 1'b0;
    end else begin
      utc     <= utc + 1'b1;
      dsp_clk <= ~dsp_clk;
    end
  end

  assign adc_tick = run && (phase >= div - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        phase <= '0;
    else if (!run)     phase <= '0;
    else if (adc_tick) phase <= '0;
    else               phase <= phase + 1'b1;
  end

endmodule
