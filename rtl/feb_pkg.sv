// feb_pkg: types, constants and word-building functions shared by the FEB
// readout RTL.
//
// Every word of an event fragment is 16 bits. Apart from the frame start
// word (all ones) and the frame end / idle word (all zeros), every word has
// bit 15 = 0 and carries in bit 14 a parity bit that makes the number of ones
// in the whole word odd. The field layouts below follow the published FEB
// output format; the widths of the sample count, the configuration record and
// the way records are grouped into structs are this design's own choices.
package feb_pkg;

  localparam int unsigned WORD_W     = 16;
  localparam int unsigned ADC_W      = 12;  // ADC value, bits 11:0
  localparam int unsigned CH_PER_ADC = 8;   // channels digitized by one ADC
  localparam int unsigned N_GAINS    = 3;   // LOW, MEDIUM, HIGH
  localparam int unsigned NSAMP_W    = 5;   // sample count field (1..31)

  typedef logic [WORD_W-1:0] word_t;

  localparam word_t FRAME_START = 16'hFFFF;
  localparam word_t FRAME_END   = 16'h0000;

  // Gain codes as carried in bits 13:12 of an ADC data word.
  typedef enum logic [1:0] {
    GAIN_NONE = 2'b00,
    GAIN_LOW  = 2'b01,
    GAIN_MED  = 2'b10,
    GAIN_HIGH = 2'b11
  } gain_t;

  // SCA Controller status byte, trailer bits 8:1 (index 0 here = bit 1).
  typedef enum int unsigned {
    SCAC_INIT       = 0,  // reinitialisation of the sequence
    SCAC_BCID_RESET = 1,  // BCID counter was reset
    SCAC_DOUBLE_ERR = 2,  // cell address with two bits in error
    SCAC_SINGLE_ERR = 3,  // cell address with one (corrected) bit error
    SCAC_SEQ_ERR    = 4,  // cell address sequence corrupted
    SCAC_FREE_UFLOW = 5,  // free FIFO underrun
    SCAC_DONE_OFLOW = 6,  // done FIFO overflow
    SCAC_CHIP_ID    = 7   // chip ID (serial address bit 6)
  } scac_bit_e;

  // GSEL configuration that applies to one fragment.
  typedef struct packed {
    logic [NSAMP_W-1:0] n_samples;   // samples per event, 1..31
    logic [1:0]         n_gains;     // gains read per sample, 1..3
    logic               auto_gain;   // 1: one gain per channel, chosen per channel
    gain_t [2:0]        gain_order;  // gain read in slot 0, 1, 2 (fixed-gain mode)
    logic               test_mode;   // send test_pattern instead of ADC data
    logic [ADC_W-1:0]   test_pattern;
  } gsel_cfg_t;

  // Per-L1Accept information, common to all fragments of the event.
  typedef struct packed {
    logic [2:0]  phase;      // phase of the 5 MHz RCLK for this L1Accept
    logic [4:0]  evtn;       // event number
    logic [11:0] bcid;       // bunch crossing ID
    logic        backporch;  // Backporch flag from the SCA Controller
  } event_t;

  // One sample of one ADC: the SCA cell it was stored in, the ADC value of
  // every gain for all 8 channels, and the gain the gain selection chose for
  // each channel (used in auto-gain mode).
  typedef struct packed {
    logic [7:0]                                  celln;
    logic [N_GAINS-1:0][CH_PER_ADC-1:0][ADC_W-1:0] adc;  // [gain code - 1][channel]
    gain_t [CH_PER_ADC-1:0]                      sel_gain;
  } sample_t;

  // Set bit 14 so that the word has an odd number of ones.
  function automatic word_t with_parity(word_t w);
    word_t r;
    r     = w;
    r[14] = 1'b0;
    r[14] = ~(^r);
    return r;
  endfunction

  function automatic word_t head1_word(logic [3:0] adc_id, logic [2:0] phase,
                                       logic [4:0] evtn);
    return with_parity({4'b0000, adc_id, phase, evtn});
  endfunction

  function automatic word_t head2_word(logic [11:0] bcid);
    return with_parity({4'b0000, bcid});
  endfunction

  function automatic word_t samp_head_word(logic first, logic last, logic bp,
                                           logic test, logic [7:0] celln);
    return with_parity({4'b0000, first, last, bp, test, celln});
  endfunction

  function automatic word_t adc_word(gain_t g, logic [ADC_W-1:0] v);
    return with_parity({2'b00, g, v});
  endfunction

  // Trailer: bit 0 and bit 11 set, SCAC status in bits 8:1, GSEL EDC single
  // bit error flag in bit 9 and double bit error flag in bit 10.
  function automatic word_t trailer_word(logic edc_double, logic edc_single,
                                         logic [7:0] scac);
    return with_parity({4'b0000, 1'b1, edc_double, edc_single, scac, 1'b1});
  endfunction

endpackage
