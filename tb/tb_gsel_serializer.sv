// tb_gsel_serializer: self-checking test of the 2-line word serializer.
//
// The clock enable is high every other cycle, as in the full FEB. A random
// word source answers each word request with a random word, valid or not,
// belonging to the data block or not. The test checks that requests come
// exactly every 8 enabled cycles, that each loaded word (or zeros when none
// was offered) leaves as eight bit pairs, most significant pair first with
// the higher bit on line[1], and that dav_n is low exactly for valid data
// block words.
module tb_gsel_serializer;
  import feb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic word_req, word_valid, word_dav, dav_n;
  word_t word;
  logic [1:0] line;

  int checks = 0, failures = 0;
  int nwords = 0, ce_since_req = -1;
  logic [15:0] cur_w;
  logic        cur_dav_n;
  int          idx = -1;

  gsel_serializer dut (.clk, .rst_n, .ce, .word_req, .word, .word_valid,
                       .word_dav, .line, .dav_n);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) ce <= ~ce;

  // word source: a new random offer after every request
  always @(posedge clk) begin
    if (!rst_n || word_req) begin
      word       <= 16'($urandom);
      word_valid <= ($urandom_range(0, 3) != 0);
      word_dav   <= ($urandom_range(0, 3) != 0);
    end
  end

  always @(posedge clk) if (rst_n && ce) begin
    if (idx >= 0 && idx < 8) begin
      check(line == cur_w[15 - 2*idx -: 2], $sformatf("pair %0d of %h", idx, cur_w));
      check(dav_n == cur_dav_n, "dav_n");
      idx++;
    end
    if (ce_since_req >= 0) ce_since_req++;
    if (word_req) begin
      if (ce_since_req >= 0) check(ce_since_req == 8, "8 cycles per word");
      check(idx == -1 || idx == 8, "all 8 pairs sent before the next word");
      ce_since_req = 0;
      cur_w     = word_valid ? word : 16'h0000;
      cur_dav_n = !(word_valid && word_dav);
      idx       = 0;
      nwords++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (nwords == 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
