// sync2: two-flip-flop synchronizer for a single-bit level crossing into the
// clock domain of clk. Latency two clk edges. The reset value is a parameter
// so that active-low inputs can idle high.
module sync2 #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
