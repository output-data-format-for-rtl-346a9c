// feb_readout: digital readout chain of one 128-channel LAr Front End Board,
// from the ADC data to the 16-bit, 80 MHz stream handed to the GLink
// serializer.
//
// Structure. Sixteen ADCs digitize 8 channels each (ADC k+1 holds channels
// 8k..8k+7). Eight Gain Selectors (gsel) each take two neighbouring ADCs and
// turn every L1Accept into two event fragments of 16-bit words, sent on two
// lines per ADC at 40 MHz. The 32 lines go to the SMUX (smux), which
// multiplexes them 2:1 onto 16 lines at 80 MHz with a FLAG that is 1 for the
// half carrying channels 0-63 and 0 for channels 64-127. Two SCA Controller
// status registers (scac_status), one per half-FEB, supply the status byte
// of each event's trailer. The DAV of GSEL 1 (ADCs 1-2) and of GSEL 5
// (ADCs 9-10) go to the SMUX as the DataValid of the two halves.
// The DAV outputs of the other six GSELs and the EDC flag outputs of all
// GSELs stay unconnected, so lint reports them as unused.
//
// Clocking. One 80 MHz clock. A register toggling every cycle after reset
// gives the 40 MHz clock enable for the GSELs and the SMUX sample point.
//
// Interface. An event (phase, event number, BCID, Backporch) is offered on
// ev_valid and accepted in the cycle with ev_ready high, which happens only
// when all sixteen formatters are idle; the GSEL configuration cfg is taken
// at the same moment. Each ADC then hands over one sample record per sample
// on smp_valid[a]/smp_ready[a], a = ADC number - 1. ADC IDs in header word 1
// are 0..15 for ADC_1..ADC_16. SCAC condition pulses, GSEL EDC error pulses
// and the SPAC command that clears the EDC flags are inputs; the GLink
// input (dout, flag, dav_n) is the output.
//
// Timing: every fragment word takes 8 cycles of 40 MHz (200 ns); an event of
// n_samples samples and n_gains gains is 4 + n_samples*(1 + 8*n_gains) words
// plus at least one frame end word.
//
// The partition into GSELs, SMUX and GLink, the channel mapping and the rates
// follow the FEB design. The single-clock scheme, the order of the two SMUX
// phases, the ADC ID numbering, which SCAC serves which half and the record
// based input interface are this design's own choices.
module feb_readout
  import feb_pkg::*;
(
  input  logic                clk,          // 80 MHz
  input  logic                rst_n,

  input  gsel_cfg_t           cfg,

  input  logic                ev_valid,
  output logic                ev_ready,
  input  event_t              ev,

  input  logic [15:0]         smp_valid,
  output logic [15:0]         smp_ready,
  input  sample_t [15:0]      smp,

  input  logic [1:0][6:0]     scac_cond,    // per half-FEB SCAC condition pulses
  input  logic [1:0]          scac_chip_id,

  input  logic [7:0]          edc_single_err,
  input  logic [7:0]          edc_double_err,
  input  logic [7:0]          spac_clear_flags,

  output logic [15:0]         dout,
  output logic                flag,
  output logic                dav_n
);

  localparam int unsigned N_GSEL = 8;

  logic                    ce40;
  logic [N_GSEL-1:0]       g_ev_ready;
  logic [N_GSEL-1:0]       g_dav_n;
  logic [31:0]             lines;
  logic [1:0][7:0]         status;
  logic                    ev_take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ce40 <= 1'b0;
    else        ce40 <= ~ce40;
  end

  assign ev_ready = &g_ev_ready;
  assign ev_take  = ev_valid && ev_ready;

  for (genvar h = 0; h < 2; h++) begin : g_scac
    scac_status u_scac (
      .clk, .rst_n,
      .cond    (scac_cond[h]),
      .chip_id (scac_chip_id[h]),
      .take    (ev_take),
      .status  (status[h])
    );
  end

  for (genvar g = 0; g < N_GSEL; g++) begin : g_gsel
    gsel u_gsel (
      .clk, .rst_n,
      .ce               (ce40),
      .adc_id           ({4'(2*g + 1), 4'(2*g)}),
      .cfg,
      .ev_valid         (ev_take),
      .ev_ready         (g_ev_ready[g]),
      .ev,
      .scac_status      (status[g / 4]),
      .smp_valid        (smp_valid[2*g +: 2]),
      .smp_ready        (smp_ready[2*g +: 2]),
      .smp              (smp[2*g +: 2]),
      .edc_single_err   (edc_single_err[g]),
      .edc_double_err   (edc_double_err[g]),
      .spac_clear_flags (spac_clear_flags[g]),
      .edc_single_flag  (),
      .edc_double_flag  (),
      .lines            (lines[4*g +: 4]),
      .dav_n            (g_dav_n[g])
    );
  end

  smux u_smux (
    .clk, .rst_n,
    .ce       (ce40),
    .din      (lines),
    .dav_n_in ({g_dav_n[4], g_dav_n[0]}),
    .dout,
    .flag,
    .dav_n
  );

endmodule
