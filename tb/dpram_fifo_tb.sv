// dpram_fifo_tb: the dual-clock buffer between a 25 MHz writer and a 40 MHz
// reader. Random write and read activity must deliver every word once and in
// order; a full buffer must refuse writes (the reader stopped); wr_free and
// rd_count must settle to the true fill level; the read side must be first-
// word-fall-through.
module dpram_fifo_tb;
  localparam int DEPTH = 64;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0, wr_full, rd_empty;
  logic [31:0] wr_data, rd_data;
  logic [6:0] wr_free, rd_count;
  int checks = 0, failures = 0;

  dpram_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);
  always #20 wclk = ~wclk;
  always #12.5 rclk = ~rclk;

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

  logic [31:0] model[$];
  int n_wr, n_rd;
  logic rd_go = 0, wr_go = 0;
  int wr_prob = 50;

  // writer
  always @(posedge wclk) if (wrst_n) begin
    if (wr_en && !wr_full) begin model.push_back(wr_data); n_wr++; end
    #1;
    wr_en   = wr_go && ($urandom_range(0, 99) < wr_prob);
    wr_data = $urandom;
  end

  // reader
  always @(posedge rclk) if (rrst_n) begin
    if (rd_en && !rd_empty) begin
      check(model.size() > 0 && rd_data == model[0],
            $sformatf("read %h expected %h", rd_data, model.size() ? model[0] : 0));
      if (model.size() > 0) void'(model.pop_front());
      n_rd++;
    end
    #1;
    rd_en = rd_go && ($urandom_range(0, 99) < 50);
  end

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    check(rd_empty && !wr_full && wr_free == 7'(DEPTH), "state after reset");
    wr_go = 1; rd_go = 1;
    repeat (3000) @(posedge wclk);
    wr_go = 0;
    repeat (500) @(posedge wclk);
    check(model.size() == 0 && rd_empty, "words left over");
    check(n_wr > 1000 && n_wr == n_rd, $sformatf("wrote %0d read %0d", n_wr, n_rd));
    // fill with the reader stopped
    rd_go = 0; wr_prob = 100; wr_go = 1;
    repeat (DEPTH + 20) @(posedge wclk);
    wr_go = 0;
    repeat (10) @(posedge wclk);
    check(wr_full && wr_free == 0, "not full");
    check(model.size() == DEPTH, $sformatf("accepted %0d words", model.size()));
    check(rd_count == 7'(DEPTH), $sformatf("rd_count=%0d", rd_count));
    // first word visible without a read
    check(!rd_empty && rd_data == model[0], "first word not presented");
    rd_go = 1;
    repeat (400) @(posedge wclk);
    check(rd_empty && model.size() == 0 && wr_free == 7'(DEPTH), "drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
