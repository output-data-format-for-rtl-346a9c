// smux: 2:1 time multiplexer between the Gain Selectors (32 lines at 40 MHz)
// and the GLink serializer (16 lines at 80 MHz).
//
// The block runs on the 80 MHz clock. ce marks the 80 MHz cycle at whose end
// the 40 MHz inputs are sampled (every other cycle). At that edge the lines of
// ADCs 1-8 (din[15:0], channels 0-63) go to dout with flag = 1 and the lines of
// ADCs 9-16 (din[31:16], channels 64-127) are held; at the next edge they go
// to dout with flag = 0. Input 2k+1 and 2k carry the two lines of ADC k+1.
// The DAV signals of one GSEL per half-FEB (dav_n_in[0] for the half with
// channels 0-63, dav_n_in[1] for 64-127) follow the same schedule on dav_n,
// so dav_n always belongs to the half flag names.
//
// Timing: outputs are registered; data sampled at a ce edge leaves in the two
// following 80 MHz cycles, low half first.
//
// The 2:1 multiplexing, the 16-line output and the meaning of FLAG follow the
// FEB output chain; which half goes first and how DAV is carried are this
// design's own choices.
module smux (
  input  logic        clk,       // 80 MHz
  input  logic        rst_n,
  input  logic        ce,        // high in every other cycle: 40 MHz sample point
  input  logic [31:0] din,
  input  logic [1:0]  dav_n_in,
  output logic [15:0] dout,
  output logic        flag,
  output logic        dav_n
);

  logic [15:0] hold;
  logic        hold_dav_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold       <= '0;
      hold_dav_n <= 1'b1;
      dout       <= '0;
      flag       <= 1'b0;
      dav_n      <= 1'b1;
    end else if (ce) begin
      dout       <= din[15:0];
      flag       <= 1'b1;
      dav_n      <= dav_n_in[0];
      hold       <= din[31:16];
      hold_dav_n <= dav_n_in[1];
    end else begin
      dout  <= hold;
      flag  <= 1'b0;
      dav_n <= hold_dav_n;
    end
  end

endmodule
