// scac_status: the status byte an SCA Controller hands to the Gain Selectors
// for the event trailer.
//
// Each of seven conditions (bits 1..7 of the trailer: init, BCID reset,
// double bit error, single bit error, sequence error, free FIFO underrun,
// done FIFO overflow) arrives as a one-cycle pulse on cond[]. A pulse sets a
// sticky bit that stays set until the next event is read out, so that the
// condition is reported with the data of that event. The eighth bit is the
// chip ID (serial address bit 6), taken from the chip_id input.
//
// status is combinational: the sticky bits ORed with this cycle's pulses,
// plus the chip ID. A one-cycle take pulse marks the moment an event is
// accepted for readout; the value of status in that cycle belongs to the
// event, and the sticky bits are cleared at the following clock edge.
// A condition that arrives after take is reported with the next event.
//
// The meaning of the bits and "report in the next event read out" follow the
// FEB output format; the pulse interface and the choice of the readout
// acceptance as the capture point are this design's own.
module scac_status
  import feb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] cond,      // cond[i] -> status bit i+1 of the trailer
  input  logic       chip_id,
  input  logic       take,
  output logic [7:0] status     // status[i] -> trailer bit i+1
);

  logic [6:0] sticky;

  assign status = {chip_id, sticky | cond};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sticky <= '0;
    else if (take) sticky <= '0;
    else           sticky <= sticky | cond;
  end

endmodule
