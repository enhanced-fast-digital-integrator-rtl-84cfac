// record_packer: serializes acquisition results into 32-bit buffer words.
//
// Each result becomes a record of four words written on four consecutive
// clk cycles, most significant first:
//   word 0: {raw flag, UTC[62:32]}
//   word 1: UTC[31:0]
//   word 2: value[63:32]
//   word 3: value[31:0]
// A record is only started when the buffer has room for all four words
// (`wr_free` >= 4), so the host always reads whole records. A result that
// arrives while the buffer lacks room, or while the previous record is still
// being written, is dropped: `drop_count` counts such results and the sticky
// `overflow` flag is set (both cleared when run rises).
//
// From the source: the data stream is integral increments with time stamps.
// The record layout and the drop policy are this design's choices.
module record_packer
  import efdi_pkg::*;
#(
  parameter int unsigned FREE_BITS = 13
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  logic                 res_valid,
  input  result_t              res,
  input  logic [FREE_BITS-1:0] wr_free,
  output logic                 wr_en,
  output logic [31:0]          wr_data,
  output logic                 overflow,
  output logic [15:0]          drop_count,
  output logic                 rec_done    // pulses when a record's last word is written
);

  logic [127:0] sh;
  logic [2:0]   left;   // words still to write
  logic         run_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh         <= '0;
      left       <= '0;
      wr_en      <= 1'b0;
      wr_data    <= '0;
      overflow   <= 1'b0;
      drop_count <= '0;
      rec_done   <= 1'b0;
      run_d      <= 1'b0;
    end else begin
      run_d    <= run;
      wr_en    <= 1'b0;
      rec_done <= 1'b0;
      if (run && !run_d) begin
        overflow   <= 1'b0;
        drop_count <= '0;
      end
      if (left != 0) begin
        wr_en    <= 1'b1;
        wr_data  <= sh[127:96];
        sh       <= {sh[95:0], 32'h0};
        left     <= left - 1'b1;
        rec_done <= (left == 3'd1);
      end
      if (res_valid) begin
        if (left == 0 && wr_free >= FREE_BITS'(4)) begin
          sh   <= {res.raw, res.utc[62:0], res.value};
          left <= 3'd4;
        end else begin
          overflow <= 1'b1;
          if (drop_count != '1) drop_count <= drop_count + 1'b1;
        end
      end
    end
  end

endmodule
