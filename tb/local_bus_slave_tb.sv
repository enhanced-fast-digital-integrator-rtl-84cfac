// local_bus_slave_tb: plays the PCI 9056 local-bus master. Register writes
// and reads (single and burst) must round-trip; STATUS and ID must read as
// specified; a burst on the buffer window must pop one word per data phase
// in order and insert wait states (READY# high) while the buffer is empty.
// The buffer is a first-word-fall-through queue modelled in the testbench.
module local_bus_slave_tb;
  import efdi_pkg::*;
  logic lclk = 0, lrst_n = 0;
  logic ads_n = 1, lw_r_n = 0, blast_n = 1;
  logic [31:0] lad_in = 0, lad_out;
  logic lad_oe, ready_n;
  logic fifo_rd_en, fifo_empty;
  logic [31:0] fifo_data;
  logic [12:0] fifo_count;
  logic cfg_run, cfg_digitizer, cfg_trig_int;
  logic [DIV_W-1:0] cfg_div;
  logic [15:0] cfg_osr, cfg_relay;
  spi_sel_e cfg_spi_sel;
  logic st_overflow = 0, st_trig_overrun = 1, st_adc_overrun = 0;
  logic [31:0] st_trig_count = 32'h0001_2345;
  logic [15:0] st_drop_count = 16'h00AB;
  int checks = 0, failures = 0;

  local_bus_slave dut (.*);
  always #12.5 lclk = ~lclk;

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

  // FWFT buffer model
  logic [31:0] q[$];
  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? 32'hDEAD_BEEF : q[0];
  assign fifo_count = 13'(q.size());
  always @(posedge lclk) if (fifo_rd_en && q.size() > 0) void'(q.pop_front());

  int waits;

  task automatic bus_cycle(input logic [31:0] addr, input bit write, input int n,
                           ref logic [31:0] data[$]);
    @(posedge lclk); #1;
    ads_n = 0; lad_in = addr; lw_r_n = write; blast_n = 1;
    @(posedge lclk); #1;
    ads_n = 1;
    for (int i = 0; i < n; i++) begin
      blast_n = (i == n - 1) ? 1'b0 : 1'b1;
      if (write) lad_in = data[i];
      @(negedge lclk);
      while (ready_n) begin waits++; @(negedge lclk); end
      if (!write) begin
        check(lad_oe, "LAD not driven during read");
        data.push_back(lad_out);
      end else check(!lad_oe, "LAD driven during write");
      @(posedge lclk); #1;
    end
    blast_n = 1;
  endtask

  logic [31:0] d[$];
  logic [31:0] exp_w[$];

  initial begin
    repeat (3) @(posedge lclk);
    #1 lrst_n = 1;
    check(cfg_div == 50 && cfg_osr == 500 && !cfg_run, "reset values");
    d = '{32'h7, 32'd25}; bus_cycle(32'(REG_CTRL), 1, 2, d);   // burst: CTRL, DIV
    check(cfg_run && cfg_digitizer && cfg_trig_int, "CTRL write");
    check(cfg_div == 25, "DIV write in burst");
    d = '{32'd125}; bus_cycle(32'(REG_OSR), 1, 1, d);
    d = '{32'd1};   bus_cycle(32'(REG_SPISEL), 1, 1, d);
    d = '{32'hA5C3}; bus_cycle(32'(REG_RELAY), 1, 1, d);
    check(cfg_osr == 125 && cfg_spi_sel == SPI_DAC_N && cfg_relay == 16'hA5C3, "register writes");
    d.delete(); bus_cycle(32'(REG_CTRL), 0, 7, d);
    check(d.size() == 7, "burst read length");
    if (d.size() == 7) begin
      check(d[0] == 32'h7 && d[1] == 32'd25 && d[2] == 32'd125 && d[3] == 32'd1 &&
            d[4] == 32'hA5C3, "register read-back");
      check(d[5] == {12'h0, 1'b1, 1'b0, 1'b1, 1'b0, 3'h0, 13'd0}, $sformatf("STATUS %h", d[5]));
      check(d[6] == ID_VALUE, "ID");
    end
    d.delete(); bus_cycle(32'(REG_TRIGS), 0, 2, d);
    check(d[0] == 32'h0001_2345 && d[1] == 32'h0000_00AB, "TRIGS/DROPS");
    // buffer window: 20 words present
    for (int i = 0; i < 20; i++) begin q.push_back($urandom); exp_w.push_back(q[i]); end
    d.delete(); bus_cycle(32'h0000_0014, 0, 1, d);
    check(d[0][12:0] == 13'd20, "STATUS fill level");
    waits = 0;
    d.delete(); bus_cycle(32'h0000_8000, 0, 16, d);
    check(waits == 0, "wait states with data present");
    for (int i = 0; i < 16; i++) check(d[i] == exp_w[i], $sformatf("window word %0d", i));
    check(q.size() == 4, "words popped");
    // burst longer than the data: wait states until the writer adds more
    fork
      begin
        repeat (30) @(posedge lclk);
        #2 for (int i = 0; i < 4; i++) begin q.push_back($urandom); exp_w.push_back(q[q.size()-1]); end
      end
    join_none
    waits = 0;
    d.delete(); bus_cycle(32'h0000_8000, 0, 8, d);
    check(waits >= 20, $sformatf("only %0d wait states on empty buffer", waits));
    for (int i = 0; i < 8; i++) check(d[i] == exp_w[16 + i], $sformatf("window word %0d after wait", 16 + i));
    check(q.size() == 0, "buffer drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
