// feb_tb_pkg: reference model of the FEB event fragment for the testbenches.
//
// ref_fragment() lists, word by word, what one ADC's fragment must contain
// for a given configuration, event, SCAC status, EDC flags and sample
// records, together with the DAV value of each word. It is written from the
// output format directly (bit positions, odd parity counted with
// $countones) and shares no code with the RTL word builders. rand_* helpers
// make random stimulus.
package feb_tb_pkg;
  import feb_pkg::*;

  typedef struct {
    logic [15:0] w;
    bit          dav;
  } ref_word_t;

  function automatic logic [15:0] odd(logic [15:0] w);
    logic [15:0] r = w;
    if ($countones(w) % 2 == 0) r = r | 16'h4000;
    return r;
  endfunction

  function automatic void ref_fragment(ref ref_word_t q[$],
                                       input logic [3:0] adc_id,
                                       input gsel_cfg_t cfg,
                                       input event_t ev,
                                       input logic [7:0] status,
                                       input bit edc_s, input bit edc_d,
                                       ref sample_t s[$]);
    int ng;
    q.push_back('{16'hFFFF, 1});
    q.push_back('{odd((16'(adc_id) << 8) | (16'(ev.phase) << 5) | 16'(ev.evtn)), 1});
    q.push_back('{odd(16'(ev.bcid)), 1});
    ng = cfg.auto_gain ? 1 : int'(cfg.n_gains);
    for (int i = 0; i < int'(cfg.n_samples); i++) begin
      logic [15:0] h = 16'(s[i].celln);
      if (i == 0)                      h[11] = 1'b1;
      if (i == int'(cfg.n_samples) - 1) h[10] = 1'b1;
      if (ev.backporch)                h[9]  = 1'b1;
      if (cfg.test_mode)               h[8]  = 1'b1;
      q.push_back('{odd(h), 1});
      for (int g = 0; g < ng; g++)
        for (int c = 0; c < 8; c++) begin
          logic [1:0]  gc;
          logic [11:0] v;
          gc = cfg.auto_gain ? 2'(s[i].sel_gain[c]) : 2'(cfg.gain_order[g]);
          if (cfg.test_mode)  v = cfg.test_pattern;
          else if (gc == 2'd0) v = s[i].adc[0][c];
          else                v = s[i].adc[gc-1][c];
          q.push_back('{odd({2'b00, gc, v}), 1});
        end
    end
    q.push_back('{odd(16'h0801 | (16'(status) << 1) | (edc_s ? 16'h0200 : 16'h0)
                      | (edc_d ? 16'h0400 : 16'h0)), 1});
    q.push_back('{16'h0000, 0});
  endfunction

  function automatic gsel_cfg_t rand_cfg();
    gsel_cfg_t c;
    c.n_samples    = 5'($urandom_range(1, 6));
    c.n_gains      = 2'($urandom_range(1, 3));
    c.auto_gain    = ($urandom_range(0, 2) == 0);
    c.gain_order[0] = gain_t'($urandom_range(1, 3));
    c.gain_order[1] = gain_t'($urandom_range(1, 3));
    c.gain_order[2] = gain_t'($urandom_range(1, 3));
    c.test_mode    = ($urandom_range(0, 4) == 0);
    c.test_pattern = 12'($urandom);
    return c;
  endfunction

  function automatic event_t rand_event();
    event_t e;
    e.phase     = 3'($urandom);
    e.evtn      = 5'($urandom);
    e.bcid      = 12'($urandom);
    e.backporch = ($urandom_range(0, 2) == 0);
    return e;
  endfunction

  function automatic sample_t rand_sample();
    sample_t s;
    s.celln = 8'($urandom);
    for (int g = 0; g < 3; g++)
      for (int c = 0; c < 8; c++) s.adc[g][c] = 12'($urandom);
    for (int c = 0; c < 8; c++) s.sel_gain[c] = gain_t'($urandom_range(1, 3));
    return s;
  endfunction

  function automatic int frag_words(gsel_cfg_t c);
    int ng = c.auto_gain ? 1 : int'(c.n_gains);
    return 4 + int'(c.n_samples) * (1 + 8 * ng);
  endfunction

endpackage
