// tb_gsel: self-checking test of one Gain Selector output section.
//
// Several events with random configurations go through both fragments at
// once. Each fragment's two lines are decoded back into words by a
// frag_decoder and compared with the reference fragment (feb_tb_pkg),
// including the GSEL's DAV, which must be low for all data block words,
// high for the frame end word and high while idle. The test also sets the
// EDC single and double error flags, checks that they appear in trailer
// bits 9 and 10 of later events and that the SPAC clear command removes
// them, and checks the fragment rate: 8 enabled cycles per word.
module tb_gsel;
  import feb_pkg::*;
  import feb_tb_pkg::*;

  localparam int NEV = 10;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  gsel_cfg_t cfg;
  logic ev_valid, ev_ready;
  event_t ev;
  logic [7:0] scac_status;
  logic [1:0] smp_valid, smp_ready;
  sample_t [1:0] smp;
  logic edc_single_err = 0, edc_double_err = 0, spac_clear_flags = 0;
  logic edc_single_flag, edc_double_flag;
  logic [3:0] lines;
  logic dav_n;

  int checks = 0, failures = 0, ce_count = 0;
  ref_word_t exp_q[2][$];
  sample_t   sq[2][$];
  logic [1:0] wstrobe, dav_lo, dav_hi, idle_err;
  logic [1:0][15:0] dword;
  int flags_seen = 0;
  bit m_single = 0, m_double = 0;  // reference copy of the EDC flags

  gsel dut (
    .clk, .rst_n, .ce, .adc_id({4'd7, 4'd6}), .cfg,
    .ev_valid, .ev_ready, .ev, .scac_status,
    .smp_valid, .smp_ready, .smp,
    .edc_single_err, .edc_double_err, .spac_clear_flags,
    .edc_single_flag, .edc_double_flag,
    .lines, .dav_n
  );

  for (genvar f = 0; f < 2; f++) begin : g_dec
    frag_decoder u_dec (.clk, .rst_n, .en(ce), .pair(lines[2*f +: 2]), .dav_n,
                        .wstrobe(wstrobe[f]), .word(dword[f]), .dav_lo(dav_lo[f]),
                        .dav_hi(dav_hi[f]), .idle_dav_err(idle_err[f]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin ce <= ~ce; if (ce) ce_count++; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // sample records: always ready for the formatter
  for (genvar f = 0; f < 2; f++) begin : g_src
    always @(posedge clk) begin
      if (smp_valid[f] && smp_ready[f]) void'(sq[f].pop_front());
      smp_valid[f] <= (sq[f].size() > 0);
      if (sq[f].size() > 0) smp[f] <= sq[f][0];
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int f = 0; f < 2; f++) begin
      check(!idle_err[f], "DAV low while idle");
      if (wstrobe[f]) begin
        if (exp_q[f].size() == 0) check(0, "unexpected word");
        else begin
          automatic ref_word_t e = exp_q[f].pop_front();
          check(dword[f] == e.w, $sformatf("frag %0d word %h expected %h", f, dword[f], e.w));
          check(e.dav ? dav_lo[f] : dav_hi[f], "DAV over the word");
          if (e.w[11] && e.w[0] && (e.w[10] || e.w[9]) && exp_q[f].size() == 1) flags_seen++;
        end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ev_valid = 0; cfg = '0; ev = '0; scac_status = '0; smp_valid = '0; smp = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NEV; n++) begin
      automatic gsel_cfg_t  c  = rand_cfg();
      automatic event_t     e  = rand_event();
      automatic logic [7:0] st = 8'($urandom);
      automatic int         t0, nw;
      automatic bit         es = m_single, ed = m_double;
      automatic sample_t    ss[2][$];
      if (n == 0) begin c.n_samples = 5; c.n_gains = 1; c.auto_gain = 1; c.test_mode = 0; end
      for (int f = 0; f < 2; f++)
        for (int i = 0; i < int'(c.n_samples); i++) ss[f].push_back(rand_sample());
      ref_fragment(exp_q[0], 4'd6, c, e, st, es, ed, ss[0]);
      ref_fragment(exp_q[1], 4'd7, c, e, st, es, ed, ss[1]);
      nw = exp_q[0].size();
      @(negedge clk);
      cfg = c; ev = e; scac_status = st; ev_valid = 1;
      while (!ev_ready) @(negedge clk);
      @(posedge clk);
      t0 = ce_count;
      for (int f = 0; f < 2; f++) foreach (ss[f][i]) sq[f].push_back(ss[f][i]);
      @(negedge clk) ev_valid = 0;
      while (exp_q[0].size() > 0 || exp_q[1].size() > 0) @(posedge clk);
      // the last pair of the frame end word arrives after 8 * words enabled
      // cycles, plus at most one word of wait for the word boundary and the
      // decoder's own register
      check(ce_count - t0 >= 8 * nw && ce_count - t0 <= 8 * nw + 9,
            $sformatf("fragment took %0d cycles for %0d words", ce_count - t0, nw));
      // EDC flags: set both after event 2, clear them after event 6
      @(negedge clk);
      if (n == 2) begin
        edc_single_err = 1; @(negedge clk) edc_single_err = 0;
        repeat (3) @(negedge clk);
        edc_double_err = 1; @(negedge clk) edc_double_err = 0;
        m_single = 1; m_double = 1;
        check(edc_single_flag && edc_double_flag, "EDC flags set");
      end
      if (n == 6) begin
        spac_clear_flags = 1; @(negedge clk) spac_clear_flags = 0;
        m_single = 0; m_double = 0;
        check(!edc_single_flag && !edc_double_flag, "EDC flags cleared");
      end
      repeat ($urandom_range(0, 30)) @(posedge clk);
    end
    check(flags_seen >= 2 * 4, "EDC flags reported in trailers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
