// tb_gsel_formatter: self-checking test of one fragment formatter.
//
// Random configurations (1-6 samples, 1-3 gains in a random order,
// auto-gain, test mode), random events, SCAC status bytes and EDC flags.
// Word requests come at random intervals and sample records are offered
// with random gaps, so the formatter also has to wait for data. Every word
// it hands out is compared with the reference fragment of feb_tb_pkg,
// including DAV; the number of words per event must be exactly the
// fragment length plus one frame end word, and no word may be offered
// between events.
module tb_gsel_formatter;
  import feb_pkg::*;
  import feb_tb_pkg::*;

  localparam int NEV = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] adc_id;
  gsel_cfg_t cfg;
  logic ev_valid, ev_ready;
  event_t ev;
  logic [7:0] scac_status;
  logic smp_valid, smp_ready;
  sample_t smp;
  logic edc_single, edc_double;
  logic word_req;
  word_t word;
  logic word_valid, word_dav;

  int checks = 0, failures = 0;
  ref_word_t exp_q[$];
  sample_t   sq[$];
  int        waits = 0, words_this_ev = 0;
  bit        in_event = 0;

  gsel_formatter dut (
    .clk, .rst_n, .ce(1'b1), .adc_id, .cfg,
    .ev_valid, .ev_ready, .ev, .scac_status,
    .smp_valid, .smp_ready, .smp,
    .edc_single, .edc_double,
    .word_req, .word, .word_valid, .word_dav
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // random word requests
  always @(posedge clk) word_req <= ($urandom_range(0, 2) == 0);

  // sample records with random gaps
  always @(posedge clk) begin
    if (smp_valid && smp_ready) void'(sq.pop_front());
    if (sq.size() > 0 && $urandom_range(0, 3) != 0) begin
      smp_valid <= 1'b1;
      smp       <= sq[0];
    end else begin
      smp_valid <= 1'b0;
    end
  end

  // word monitor
  always @(posedge clk) if (rst_n) begin
    if (word_req && !word_valid && in_event) waits++;
    if (word_req && word_valid) begin
      if (exp_q.size() == 0) begin
        check(0, "word outside of an event");
      end else begin
        automatic ref_word_t e = exp_q.pop_front();
        check(word == e.w, $sformatf("word %h expected %h", word, e.w));
        check(word_dav == e.dav, "dav");
        words_this_ev++;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ev_valid = 0; smp_valid = 0; smp = '0; cfg = '0; ev = '0; scac_status = '0;
    edc_single = 0; edc_double = 0; adc_id = 4'd5; word_req = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NEV; n++) begin
      automatic gsel_cfg_t  c  = rand_cfg();
      automatic event_t     e  = rand_event();
      automatic logic [7:0] st = 8'($urandom);
      automatic bit         es = 1'($urandom_range(0, 1));
      automatic bit         ed = 1'($urandom_range(0, 1));
      automatic sample_t    ss[$];
      if (n == 0) begin c.n_samples = 5; c.n_gains = 3; c.auto_gain = 0; c.test_mode = 0; end
      if (n == 1) begin c.auto_gain = 1; c.test_mode = 0; end
      if (n == 2) begin c.test_mode = 1; end
      if (n == 3) begin c.n_samples = 1; end
      adc_id = 4'($urandom);
      for (int i = 0; i < int'(c.n_samples); i++) ss.push_back(rand_sample());
      ref_fragment(exp_q, adc_id, c, e, st, es, ed, ss);
      check(exp_q.size() == frag_words(c) + 1, "reference length");
      words_this_ev = 0;
      @(negedge clk);
      cfg = c; ev = e; scac_status = st; edc_single = es; edc_double = ed;
      ev_valid = 1;
      while (!ev_ready) @(negedge clk);
      @(posedge clk);
      in_event = 1;
      foreach (ss[i]) sq.push_back(ss[i]);
      @(negedge clk);
      ev_valid = 0;
      // scramble the inputs: the formatter must use what it captured
      cfg = rand_cfg(); ev = rand_event(); scac_status = 8'($urandom);
      while (exp_q.size() > 0) @(posedge clk);
      in_event = 0;
      check(words_this_ev == frag_words(c) + 1, "words per event");
      repeat ($urandom_range(0, 20)) begin
        @(posedge clk);
        check(!word_valid, "idle after frame end");
      end
    end
    check(waits > 0, "formatter waited for a sample record at least once");
    $display("waits for sample records: %0d", waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
