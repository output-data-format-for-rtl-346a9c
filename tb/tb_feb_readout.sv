// tb_feb_readout: end-to-end test of the FEB readout chain at its full size
// (16 ADCs, 8 GSELs, SMUX), with no parameter changed.
//
// The 16-bit, 80 MHz SMUX output is split as a receiver would do it: in
// cycles with FLAG = 1, bit pair k belongs to ADC k+1 (channels 0-63), in
// cycles with FLAG = 0 to ADC k+9 (channels 64-127). Sixteen frag_decoders
// rebuild the fragments, which are compared word by word with the reference
// fragments of feb_tb_pkg. The SMUX DAV is checked against the fragments of
// ADC 1 and ADC 9.
//
// The events cover: the usual readout of 5 samples in auto-gain mode, fixed
// multi-gain readout in a configured gain order, test mode, the Backporch
// flag, SCAC status conditions reported in the next event (separately per
// half-FEB), GSEL EDC flags set and cleared, and an event that follows the
// previous one with a single frame end word. Two trailers are also checked
// against fixed values: 0x4801 for an event without errors and 0x0805 for
// the first event after a BCID reset. Each of these is counted and must
// occur at least once. The event length must be 8 clock enables per word.
module tb_feb_readout;
  import feb_pkg::*;
  import feb_tb_pkg::*;

  localparam int NEV = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  gsel_cfg_t cfg;
  logic ev_valid, ev_ready;
  event_t ev;
  logic [15:0] smp_valid, smp_ready;
  sample_t [15:0] smp;
  logic [1:0][6:0] scac_cond;
  logic [1:0] scac_chip_id = 2'b10;
  logic [7:0] edc_single_err, edc_double_err, spac_clear_flags;
  logic [15:0] dout;
  logic flag, dav_n;

  int checks = 0, failures = 0;
  ref_word_t exp_q[16][$];
  sample_t   sq[16][$];
  logic [15:0] wstrobe, dav_lo, dav_hi, idle_err;
  logic [15:0][15:0] dword;
  logic [1:0][6:0] pend;
  logic [7:0] edc_s_flag, edc_d_flag;

  // mechanism counters
  int n_auto = 0, n_multi = 0, n_test = 0, n_bp = 0, n_scac = 0, n_edc = 0;
  int n_edc_clear = 0, n_b2b = 0, n_4801 = 0, n_0805 = 0, n_flag1 = 0, n_flag0 = 0;

  feb_readout dut (
    .clk, .rst_n, .cfg, .ev_valid, .ev_ready, .ev,
    .smp_valid, .smp_ready, .smp, .scac_cond, .scac_chip_id,
    .edc_single_err, .edc_double_err, .spac_clear_flags,
    .dout, .flag, .dav_n
  );

  for (genvar a = 0; a < 16; a++) begin : g_dec
    frag_decoder u_dec (
      .clk, .rst_n,
      .en           (a < 8 ? flag : !flag),
      .pair         (dout[2*(a%8) +: 2]),
      .dav_n        (dav_n),
      .wstrobe      (wstrobe[a]),
      .word         (dword[a]),
      .dav_lo       (dav_lo[a]),
      .dav_hi       (dav_hi[a]),
      .idle_dav_err (idle_err[a])
    );
  end

  for (genvar a = 0; a < 16; a++) begin : g_src
    always @(posedge clk) begin
      if (smp_valid[a] && smp_ready[a]) void'(sq[a].pop_front());
      smp_valid[a] <= (sq[a].size() > 0);
      if (sq[a].size() > 0) smp[a] <= sq[a][0];
    end
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (flag) n_flag1++; else n_flag0++;
    for (int a = 0; a < 16; a++) begin
      if (wstrobe[a]) begin
        if (exp_q[a].size() == 0) check(0, $sformatf("unexpected word from ADC %0d", a + 1));
        else begin
          automatic ref_word_t e = exp_q[a].pop_front();
          check(dword[a] == e.w, $sformatf("ADC %0d word %h expected %h", a + 1, dword[a], e.w));
          if (a == 0 || a == 8) begin
            check(e.dav ? dav_lo[a] : dav_hi[a], "DAV over the word");
            check(!idle_err[a], "DAV low while idle");
          end
        end
      end
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_scac(int h, scac_bit_e b);
    @(negedge clk) scac_cond[h][b] = 1'b1;
    @(negedge clk) scac_cond[h][b] = 1'b0;
    pend[h][b] = 1'b1;
  endtask

  initial begin
    ev_valid = 0; cfg = '0; ev = '0; smp = '0; smp_valid = '0; scac_cond = '0;
    edc_single_err = '0; edc_double_err = '0; spac_clear_flags = '0;
    edc_s_flag = '0; edc_d_flag = '0; pend = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // conditions that occurred before the first event: init on both SCACs
    pulse_scac(0, SCAC_INIT);
    pulse_scac(1, SCAC_INIT);
    for (int n = 0; n < NEV; n++) begin
      automatic gsel_cfg_t c = rand_cfg();
      automatic event_t    e = rand_event();
      automatic logic [1:0][7:0] st;
      automatic longint t0;
      automatic int nw;
      automatic sample_t   ss[16][$];
      case (n)
        0: begin c.n_samples = 5; c.auto_gain = 1; c.test_mode = 0; e.backporch = 0; end
        1: begin c.n_samples = 5; c.auto_gain = 0; c.n_gains = 3; c.test_mode = 0;
                 c.gain_order[0] = GAIN_HIGH; c.gain_order[1] = GAIN_MED;
                 c.gain_order[2] = GAIN_LOW; end
        2: begin c.test_mode = 1; end
        3: begin e.backporch = 1; c.test_mode = 0; end
        4, 5: begin c.n_samples = 2; c.auto_gain = 1; c.test_mode = 0; e.backporch = 0; end
        default: ;
      endcase
      if (c.auto_gain) n_auto++;
      else if (c.n_gains > 1) n_multi++;
      if (c.test_mode) n_test++;
      if (e.backporch) n_bp++;
      st[0] = {scac_chip_id[0], pend[0]};
      st[1] = {scac_chip_id[1], pend[1]};
      if (pend != '0) n_scac++;
      if (edc_s_flag != '0 || edc_d_flag != '0) n_edc++;
      for (int a = 0; a < 16; a++) begin
        for (int i = 0; i < int'(c.n_samples); i++) ss[a].push_back(rand_sample());
        ref_fragment(exp_q[a], 4'(a), c, e, st[a / 8], edc_s_flag[a / 2], edc_d_flag[a / 2], ss[a]);
      end
      nw = exp_q[0].size();
      // fixed trailer values for an error-free event and after a BCID reset
      if (n == 4) begin
        check(exp_q[0][nw-2].w == 16'h4801, "reference trailer 0x4801");
        n_4801++;
      end
      if (n == 5) begin
        check(exp_q[0][nw-2].w == 16'h0805, "reference trailer 0x0805");
        n_0805++;
      end
      @(negedge clk);
      cfg = c; ev = e; ev_valid = 1;
      while (!ev_ready) @(negedge clk);
      @(posedge clk);
      pend = '0;
      t0 = $time;
      for (int a = 0; a < 16; a++) foreach (ss[a][i]) sq[a].push_back(ss[a][i]);
      @(negedge clk) ev_valid = 0;
      // conditions during this event are reported with the next one
      case (n)
        0: pulse_scac(1, SCAC_DONE_OFLOW);
        1: pulse_scac(0, SCAC_SEQ_ERR);
        4: pulse_scac(0, SCAC_BCID_RESET);
        default: ;
      endcase
      while (exp_q[0].size() > 2) @(posedge clk);
      // the next event waits right behind the trailer: one frame end only
      if (n >= 6) begin
        n_b2b++;
        while (exp_q[15].size() > 0) @(posedge clk);
      end else begin
        while (exp_q[15].size() > 0) @(posedge clk);
        check(($time - t0) / 20 >= 8 * nw && ($time - t0) / 20 <= 8 * nw + 12,
              $sformatf("event took %0d enables for %0d words", ($time - t0) / 20, nw));
      end
      for (int a = 0; a < 16; a++) check(exp_q[a].size() == 0, "all fragments complete");
      // GSEL EDC errors between events 0 and 1, flags cleared after event 3
      if (n == 0) begin
        @(negedge clk);
        edc_single_err[3] = 1'b1;
        edc_double_err[6] = 1'b1;
        @(negedge clk);
        edc_single_err[3] = 1'b0;
        edc_double_err[6] = 1'b0;
        edc_s_flag[3] = 1'b1;
        edc_d_flag[6] = 1'b1;
      end
      if (n == 3) begin
        @(negedge clk) spac_clear_flags = '1;
        @(negedge clk) spac_clear_flags = '0;
        edc_s_flag = '0; edc_d_flag = '0;
        n_edc_clear++;
      end
      if (n < 6) repeat ($urandom_range(1, 40)) @(posedge clk);
    end
    check(n_auto > 0,  "auto-gain readout");
    check(n_multi > 0, "multi-gain readout");
    check(n_test > 0,  "test mode");
    check(n_bp > 0,    "Backporch flag");
    check(n_scac > 0,  "SCAC status reported");
    check(n_edc > 0,   "EDC flags reported");
    check(n_edc_clear > 0, "EDC flags cleared");
    check(n_b2b > 0,   "back-to-back events");
    check(n_4801 > 0 && n_0805 > 0, "fixed trailer values");
    check(n_flag1 > 0 && n_flag0 > 0, "both SMUX phases");
    $display("events: auto %0d multi %0d test %0d backporch %0d scac %0d edc %0d b2b %0d",
             n_auto, n_multi, n_test, n_bp, n_scac, n_edc, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
