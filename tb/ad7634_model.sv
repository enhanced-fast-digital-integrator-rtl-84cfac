// ad7634_model: behavioural model of an 18-bit parallel SAR ADC for the
// testbenches (not synthesizable, timing in ns).
//
// A falling CNVST# samples the next value from the testbench's `next_code`
// input and raises BUSY after T_BUSY_ON; BUSY falls T_CONV later. The code
// is driven on the data bus only while CS# and RD# are both low; otherwise
// the bus shows the filler 18'h2AAAA, so a read at the wrong time is seen.
// `n_conv` counts conversions.
module ad7634_model #(
  parameter int unsigned T_BUSY_ON = 15,
  parameter int unsigned T_CONV    = 600
) (
  input  logic        cnvst_n,
  output logic        busy,
  input  logic        cs_n,
  input  logic        rd_n,
  output logic [17:0] data,
  input  logic [17:0] next_code,
  output int unsigned n_conv
);
  logic [17:0] code;

  initial begin
    busy   = 1'b0;
    code   = '0;
    n_conv = 0;
  end

  always @(negedge cnvst_n) begin
    code   = next_code;
    n_conv = n_conv + 1;
    #(T_BUSY_ON) busy = 1'b1;
    #(T_CONV)    busy = 1'b0;
  end

  assign data = (!cs_n && !rd_n) ? code : 18'h2AAAA;
endmodule
