// time_measurement: trigger recognition and residual-time measurement.
//
// A trigger (an encoder pulse from the external input, or an internal trigger
// every `osr` samples) ends one integration interval and starts the next.
// This block time-stamps each trigger with the UTC and measures where it
// falls inside the current ADC sample interval: tau_b is the number of UTC
// ticks from the previous sample to the trigger (1 .. div), and the rest of
// the interval, tau_a = div - tau_b, belongs to the next integral. The
// measurement is attached to the sample that closes the interval: one cycle
// after every adc_tick, `tag_valid` pulses with a smp_tag_t holding the
// trigger flag, tau_b, the trigger time and the sample's own UTC time.
//
// External triggers pass a two-flip-flop synchronizer and a rising-edge
// detector, so their time stamps lag the pin by a constant three clk cycles;
// the offset is the same for every trigger and cancels in the increments.
// An internal trigger coincides with a sample tick (tau_b = div, tau_a = 0).
// The source requires f_ADC >= 2 f_trigger; a second trigger within one
// sample interval violates that and is dropped, setting the sticky
// `trig_overrun` flag (cleared when run rises).
//
// From the source: trigger time measured against the UTC, the residual
// times tau_a / tau_b, f_ADC >= 2 f_t. This design's choices: the internal
// trigger generator, the tag format and the overrun handling.
module time_measurement
  import efdi_pkg::*;
#(
  parameter int unsigned UTC_BITS = UTC_W,
  parameter int unsigned DIV_BITS = DIV_W,
  parameter int unsigned OSR_BITS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                run,
  input  logic                trig_in,     // asynchronous external trigger
  input  logic                trig_int_en, // 1: internal trigger every osr samples
  input  logic [OSR_BITS-1:0] osr,         // >= 2
  input  logic                adc_tick,
  input  logic [DIV_BITS-1:0] phase,
  input  logic [UTC_BITS-1:0] utc,
  output logic                tag_valid,
  output smp_tag_t            tag,
  output logic                trig_overrun,
  output logic [31:0]         trig_count   // triggers accepted since run rose
);

  // ---- trigger sources ----
  logic trig_s, trig_d;
  sync2 u_sync (.clk, .rst_n, .d(trig_in), .q(trig_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trig_d <= 1'b0;
    else        trig_d <= trig_s;
  end

  logic                trig_ext;
  logic [OSR_BITS-1:0] smp_cnt;
  logic                trig_int;

  assign trig_ext = !trig_int_en && trig_s && !trig_d;
  assign trig_int = trig_int_en && adc_tick && (smp_cnt >= osr - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  smp_cnt <= '0;
    else if (!run)               smp_cnt <= '0;
    else if (trig_int)           smp_cnt <= '0;
    else if (adc_tick)           smp_cnt <= smp_cnt + 1'b1;
  end

  logic trig;
  assign trig = run && (trig_ext || trig_int);

  // ---- pending trigger for the interval in progress ----
  logic                pend;
  logic [DIV_BITS-1:0] pend_tau;
  logic [UTC_BITS-1:0] pend_t;
  logic                run_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend         <= 1'b0;
      pend_tau     <= '0;
      pend_t       <= '0;
      tag_valid    <= 1'b0;
      tag          <= '0;
      trig_overrun <= 1'b0;
      trig_count   <= '0;
      run_d        <= 1'b0;
    end else begin
      run_d     <= run;
      tag_valid <= 1'b0;
      if (run && !run_d) begin
        trig_overrun <= 1'b0;
        trig_count   <= '0;
      end
      if (!run) begin
        pend <= 1'b0;
      end else begin
        if (trig) begin
          if (pend) trig_overrun <= 1'b1;
          else      trig_count   <= trig_count + 1'b1;
        end
        if (adc_tick) begin
          // Close the interval that ends at this sample.
          tag_valid  <= 1'b1;
          tag.t_smp  <= utc;
          if (pend) begin
            tag.trig   <= 1'b1;
            tag.tau_b  <= pend_tau;
            tag.t_trig <= pend_t;
          end else if (trig) begin
            tag.trig   <= 1'b1;
            tag.tau_b  <= phase + 1'b1;
            tag.t_trig <= utc;
          end else begin
            tag.trig   <= 1'b0;
            tag.tau_b  <= '0;
            tag.t_trig <= '0;
          end
          pend <= 1'b0;
        end else if (trig && !pend) begin
          pend     <= 1'b1;
          pend_tau <= phase + 1'b1;
          pend_t   <= utc;
        end
      end
    end
  end

endmodule
