// gsel: output section of one Gain Selector, which serves two ADCs (16
// channels).
//
// For each of its two ADCs (fragment 0 and fragment 1) a gsel_formatter
// builds the event fragment and a gsel_serializer sends it on two lines at
// 40 MHz, eight cycles per 16-bit word. The two fragments of an event are
// prepared separately but start together: the event is accepted (ev_ready)
// only when both formatters are idle. Both use the same configuration.
//
// The GSEL also keeps the two flags of its parameter error detection and
// correction logic: a pulse on edc_single_err or edc_double_err sets the
// flag, which is then reported in trailer bit 9 (single) or bit 10 (double)
// of every event until a SPAC command (spac_clear_flags) clears it. The EDC
// logic itself is outside this block; only its error pulses come in.
//
// Outputs: lines[1:0] carry fragment 0, lines[3:2] fragment 1. dav_n is the
// GSEL's DataValid, active low while either fragment sends a word of its
// data block; it is high for frame end and idle words.
//
// Timing: see gsel_serializer; the first word of an accepted event (frame
// start) goes out at the next 8-cycle word boundary.
//
// Sticky EDC flags cleared by command, the word format and the two-line
// serialization follow the FEB output format; the shared acceptance of an
// event and the combination of the two fragments' DAV are this design's own.
module gsel
  import feb_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,            // 40 MHz clock enable

  input  logic [1:0][3:0] adc_id,      // ADC ID of fragment 0 and 1
  input  gsel_cfg_t     cfg,

  input  logic          ev_valid,
  output logic          ev_ready,
  input  event_t        ev,
  input  logic [7:0]    scac_status,

  input  logic [1:0]    smp_valid,
  output logic [1:0]    smp_ready,
  input  sample_t [1:0] smp,

  input  logic          edc_single_err,
  input  logic          edc_double_err,
  input  logic          spac_clear_flags,
  output logic          edc_single_flag,
  output logic          edc_double_flag,

  output logic [3:0]    lines,
  output logic          dav_n
);

  logic [1:0] f_ev_ready;
  logic [1:0] word_req, word_valid, word_dav, s_dav_n;
  word_t [1:0] word;

  assign ev_ready = &f_ev_ready;
  assign dav_n    = &s_dav_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      edc_single_flag <= 1'b0;
      edc_double_flag <= 1'b0;
    end else if (spac_clear_flags) begin
      edc_single_flag <= 1'b0;
      edc_double_flag <= 1'b0;
    end else begin
      edc_single_flag <= edc_single_flag | edc_single_err;
      edc_double_flag <= edc_double_flag | edc_double_err;
    end
  end

  for (genvar f = 0; f < 2; f++) begin : g_frag
    gsel_formatter u_fmt (
      .clk, .rst_n, .ce,
      .adc_id      (adc_id[f]),
      .cfg,
      .ev_valid    (ev_valid && ev_ready),
      .ev_ready    (f_ev_ready[f]),
      .ev,
      .scac_status,
      .smp_valid   (smp_valid[f]),
      .smp_ready   (smp_ready[f]),
      .smp         (smp[f]),
      .edc_single  (edc_single_flag),
      .edc_double  (edc_double_flag),
      .word_req    (word_req[f]),
      .word        (word[f]),
      .word_valid  (word_valid[f]),
      .word_dav    (word_dav[f])
    );

    gsel_serializer u_ser (
      .clk, .rst_n, .ce,
      .word_req    (word_req[f]),
      .word        (word[f]),
      .word_valid  (word_valid[f]),
      .word_dav    (word_dav[f]),
      .line        (lines[2*f +: 2]),
      .dav_n       (s_dav_n[f])
    );
  end

endmodule
