// gsel_formatter: builds the event fragment of one ADC (8 channels) as a
// sequence of 16-bit words, one word per word request.
//
// Fragment layout (from the FEB output format):
//   frame start (0xFFFF)
//   event header 1 : 0 P 0 0 | ADCID[3:0] | PHASE[2:0] | EVENTN[4:0]
//   event header 2 : 0 P 0 0 | BCID[11:0]
//   for every sample:
//     sample header: 0 P 0 0 | F L B A | CELLN[7:0]
//     n_gains x 8 ADC words: 0 P | gain[1:0] | value[11:0], channels 0..7 in
//     increasing order, all 8 channels of the first gain slot first
//   trailer        : 0 P 0 0 | 1 | EDC double | EDC single | SCAC[7:0] | 1
//   frame end (0x0000), at least once before the next event
// P makes every word except frame start and frame end odd parity. F and L
// mark the first and last sample, B repeats the event's Backporch flag and A
// is set in test mode, where a configured test value replaces the ADC data.
//
// Interface. The word stream is pulled: on a cycle with word_req high the
// current word (word, word_valid, word_dav) is consumed and the formatter
// advances. word_dav is high for every word of the data block, frame start to
// trailer, and low for the frame end word. word_valid is low while idle and
// while a sample header waits for its sample record; the serializer then
// sends zeros, so the sample records must be there in time.
// ev_valid/ev_ready accept an event (with its SCAC status byte) while the
// formatter is idle and only in a cycle with ce high; the configuration is
// captured at the same moment and holds for the whole event.
// smp_valid/smp_ready hand over one sample record when its sample header
// word is consumed.
//
// Timing: one word per word request; the fragment is
// 4 + n_samples * (1 + 8 * n_gains) words plus one frame end word.
//
// Choices of this design, not fixed by the format: in auto-gain mode exactly
// one gain slot is read, with each channel's gain taken from the sample
// record; a gain code of 00 reads the LOW gain value; the EDC flags are
// sampled when the trailer word is sent; the record layouts are in feb_pkg.
module gsel_formatter
  import feb_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,          // 40 MHz clock enable

  input  logic [3:0] adc_id,
  input  gsel_cfg_t  cfg,

  input  logic       ev_valid,
  output logic       ev_ready,
  input  event_t     ev,
  input  logic [7:0] scac_status,

  input  logic       smp_valid,
  output logic       smp_ready,
  input  sample_t    smp,

  input  logic       edc_single,
  input  logic       edc_double,

  input  logic       word_req,
  output word_t      word,
  output logic       word_valid,
  output logic       word_dav
);

  typedef enum logic [2:0] {
    S_IDLE, S_START, S_HDR1, S_HDR2, S_SHDR, S_DATA, S_TRAIL, S_FEND
  } state_e;

  state_e             state;
  gsel_cfg_t          cfg_q;
  event_t             ev_q;
  logic [7:0]         scac_q;
  logic [N_GAINS-1:0][CH_PER_ADC-1:0][ADC_W-1:0] smp_adc_q;
  gain_t [CH_PER_ADC-1:0]                        smp_gain_q;
  logic [NSAMP_W-1:0] samp_idx;
  logic [1:0]         slot;
  logic [2:0]         ch;

  logic       take;
  logic       last_samp;
  logic [1:0] slots_m1;
  gain_t      cur_gain;
  logic [1:0] gidx;
  logic [ADC_W-1:0] cur_val;

  assign take      = word_req && word_valid;
  assign ev_ready  = (state == S_IDLE) && ce;
  assign smp_ready = (state == S_SHDR) && take;

  assign last_samp = (samp_idx + NSAMP_W'(1)) >= cfg_q.n_samples;
  assign slots_m1  = (cfg_q.auto_gain || cfg_q.n_gains == 2'd0) ? 2'd0
                                                                : cfg_q.n_gains - 2'd1;

  always_comb begin
    cur_gain = cfg_q.auto_gain ? smp_gain_q[ch] : cfg_q.gain_order[slot];
    gidx     = (cur_gain == GAIN_NONE) ? 2'd0 : 2'(cur_gain) - 2'd1;
    cur_val  = cfg_q.test_mode ? cfg_q.test_pattern : smp_adc_q[gidx][ch];
  end

  always_comb begin
    word       = FRAME_END;
    word_valid = 1'b1;
    word_dav   = 1'b1;
    unique case (state)
      S_IDLE:  begin word_valid = 1'b0; word_dav = 1'b0; end
      S_START: word = FRAME_START;
      S_HDR1:  word = head1_word(adc_id, ev_q.phase, ev_q.evtn);
      S_HDR2:  word = head2_word(ev_q.bcid);
      S_SHDR:  begin
        word       = samp_head_word(samp_idx == '0, last_samp, ev_q.backporch,
                                    cfg_q.test_mode, smp.celln);
        word_valid = smp_valid;
      end
      S_DATA:  word = adc_word(cur_gain, cur_val);
      S_TRAIL: word = trailer_word(edc_double, edc_single, scac_q);
      S_FEND:  word_dav = 1'b0;
      default: begin word_valid = 1'b0; word_dav = 1'b0; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cfg_q    <= '0;
      ev_q     <= '0;
      scac_q   <= '0;
      smp_adc_q  <= '0;
      smp_gain_q <= {CH_PER_ADC{GAIN_LOW}};
      samp_idx <= '0;
      slot     <= '0;
      ch       <= '0;
    end else begin
      if (ev_valid && ev_ready) begin
        cfg_q    <= cfg;
        ev_q     <= ev;
        scac_q   <= scac_status;
        samp_idx <= '0;
        slot     <= '0;
        ch       <= '0;
        state    <= S_START;
      end else if (take) begin
        unique case (state)
          S_START: state <= S_HDR1;
          S_HDR1:  state <= S_HDR2;
          S_HDR2:  state <= S_SHDR;
          S_SHDR:  begin
            smp_adc_q  <= smp.adc;
            smp_gain_q <= smp.sel_gain;
            state <= S_DATA;
          end
          S_DATA:  begin
            ch <= ch + 3'd1;
            if (ch == 3'd7) begin
              if (slot == slots_m1) begin
                slot <= '0;
                if (last_samp) begin
                  state <= S_TRAIL;
                end else begin
                  samp_idx <= samp_idx + NSAMP_W'(1);
                  state    <= S_SHDR;
                end
              end else begin
                slot <= slot + 2'd1;
              end
            end
          end
          S_TRAIL: state <= S_FEND;
          S_FEND:  state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // A sample record is taken only with its sample header word.
  a_smp_handshake: assert property (@(posedge clk) disable iff (!rst_n)
    smp_ready |-> smp_valid);

endmodule
