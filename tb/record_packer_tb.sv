// record_packer_tb: checks the four-word record layout, that records are
// written on consecutive cycles, and the drop rule: a result arriving while
// a record is being written, or while fewer than four words are free, is
// dropped and counted.
module record_packer_tb;
  import efdi_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, res_valid = 0;
  result_t res;
  logic [12:0] wr_free = 13'd4096;
  logic wr_en, overflow, rec_done;
  logic [31:0] wr_data;
  logic [15:0] drop_count;
  int checks = 0, failures = 0;

  record_packer dut (.*);
  always #20 clk = ~clk;

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

  logic [31:0] words[$];
  int n_done;
  always @(posedge clk) if (rst_n) begin
    if (wr_en) words.push_back(wr_data);
    if (rec_done) n_done++;
  end

  task automatic send(input result_t r, input bit expect_drop);
    int n0;
    n0 = words.size();
    @(negedge clk) res = r; res_valid = 1;
    @(negedge clk) res_valid = 0;
    if (!expect_drop) begin
      repeat (4) @(negedge clk);
      check(words.size() == n0 + 3, "record words not on consecutive cycles");
      @(negedge clk);
      check(words.size() == n0 + 4, "record not written in 4 consecutive cycles");
      if (words.size() == n0 + 4) begin
        check(words[n0]   == {r.raw, r.utc[62:32]}, $sformatf("word0 %h", words[n0]));
        check(words[n0+1] == r.utc[31:0],   $sformatf("word1 %h", words[n0+1]));
        check(words[n0+2] == r.value[63:32], $sformatf("word2 %h", words[n0+2]));
        check(words[n0+3] == r.value[31:0],  $sformatf("word3 %h", words[n0+3]));
      end
    end
  endtask

  function automatic result_t rnd();
    result_t r;
    r.raw = 1'($urandom); r.utc = {1'b0, 31'($urandom), 32'($urandom)};
    r.value = {32'($urandom), 32'($urandom)};
    return r;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1; run = 1;
    repeat (50) send(rnd(), 0);
    check(n_done == 50, $sformatf("rec_done %0d", n_done));
    check(!overflow && drop_count == 0, "false drop");
    // no room
    wr_free = 13'd3;
    send(rnd(), 1);
    repeat (6) @(negedge clk);
    check(words.size() == 200, "record written without room");
    check(overflow && drop_count == 1, "drop for full buffer not counted");
    wr_free = 13'd100;
    // back-to-back results: the second is dropped
    @(negedge clk) res = rnd(); res_valid = 1;
    @(negedge clk) res = rnd();
    @(negedge clk) res_valid = 0;
    repeat (6) @(negedge clk);
    check(words.size() == 204, $sformatf("%0d words after back-to-back", words.size()));
    check(drop_count == 2, $sformatf("drop_count=%0d", drop_count));
    // run restart clears the flags
    @(negedge clk) run = 0; @(negedge clk) run = 1; @(negedge clk);
    check(!overflow && drop_count == 0, "flags not cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
