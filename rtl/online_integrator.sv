// online_integrator: on-line numerical integration between triggers.
//
// Each ADC sample V_j stands for the interval that ends at its conversion
// start, one sample period (div UTC ticks) long; the signal is held at V_j
// over that interval. Between two triggers the integrator adds V_j * div for
// every sample. When a trigger falls inside a sample's interval, the sample
// is split at the trigger: V_j * tau_b closes the current integral, which is
// released as one flux increment time-stamped with the trigger, and
// V_j * tau_a = V_j * (div - tau_b) opens the next one. Increments are thus
// in ADC LSB x UTC ticks (40 ns at 25 MHz). The interval before the first
// trigger after run rises is incomplete and is not released.
//
// In digitizer mode (`digitizer` = 1) every sample is released unchanged,
// sign-extended, with the UTC time of its conversion start.
//
// Timing: the time tag for sample j arrives on `tag_valid` one cycle after
// its tick, the sample itself on `smp_valid` some cycles later but before the
// next tag. A result appears on `res_valid` one cycle after `smp_valid`.
// One multiplier (ADC_W x DIV_W) and one ACC_BITS adder per sample.
//
// From the source: summing the samples between consecutive triggers with
// the partial intervals tau_a and tau_b at the two ends, one result per
// trigger, and the rectangle (sample-and-hold) picture of the integral. In
// the source this runs as DSP software; here it is logic. The hold
// direction (a sample covers the interval before it) is read from the
// source's integration picture; the first-interval rule is this design's.
module online_integrator
  import efdi_pkg::*;
#(
  parameter int unsigned DATA_W   = ADC_W,
  parameter int unsigned DIV_BITS = DIV_W,
  parameter int unsigned ACC_BITS = ACC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  input  logic                     digitizer,
  input  logic [DIV_BITS-1:0]      div,
  input  logic                     tag_valid,
  input  smp_tag_t                 tag,
  input  logic                     smp_valid,
  input  logic signed [DATA_W-1:0] smp_data,
  output logic                     res_valid,
  output result_t                  res
);

  smp_tag_t tag_q;
  logic     armed;   // a first trigger has been seen since run rose
  logic signed [ACC_BITS-1:0] acc;

  // Products of the sample with the three interval lengths.
  logic signed [DIV_BITS:0]           tau_b_s, tau_a_s, div_s;
  logic signed [DATA_W+DIV_BITS:0]    p_full, p_b, p_a;

  assign div_s   = {1'b0, div};
  assign tau_b_s = {1'b0, tag_q.tau_b};
  assign tau_a_s = div_s - tau_b_s;
  assign p_full  = smp_data * div_s;
  assign p_b     = smp_data * tau_b_s;
  assign p_a     = smp_data * tau_a_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_q     <= '0;
      armed     <= 1'b0;
      acc       <= '0;
      res_valid <= 1'b0;
      res       <= '0;
    end else begin
      res_valid <= 1'b0;
      if (tag_valid) tag_q <= tag;
      if (!run) begin
        armed <= 1'b0;
        acc   <= '0;
      end else if (smp_valid) begin
        if (digitizer) begin
          res_valid <= 1'b1;
          res.raw   <= 1'b1;
          res.utc   <= tag_q.t_smp;
          res.value <= ACC_BITS'(smp_data);
        end else if (tag_q.trig) begin
          res_valid <= armed;
          res.raw   <= 1'b0;
          res.utc   <= tag_q.t_trig;
          res.value <= acc + ACC_BITS'(p_b);
          acc       <= ACC_BITS'(p_a);
          armed     <= 1'b1;
        end else begin
          acc <= acc + ACC_BITS'(p_full);
        end
      end
    end
  end

endmodule
