// frag_decoder: receiver-side model that turns one ADC's two-line stream
// back into 16-bit words, as the readout end of the link would.
//
// On every cycle with en high it takes one bit pair, most significant pair
// of a word first. Between events the lines are all zeros; the first
// non-zero pair (the start of the all-ones frame start word) aligns the
// receiver. It then assembles eight pairs per word and presents each word
// for one cycle with wstrobe. A word of all zeros (frame end) ends the frame.
// dav_n is sampled with each pair: dav_lo / dav_hi tell whether it was low
// (or high) for all eight pairs of the word, and idle_dav_err pulses if it
// was low on a pair outside any frame.
module frag_decoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [1:0]  pair,
  input  logic        dav_n,
  output logic        wstrobe,
  output logic [15:0] word,
  output logic        dav_lo,
  output logic        dav_hi,
  output logic        idle_dav_err
);
  logic        in_frame;
  logic [2:0]  cnt;
  logic [13:0] sh;
  logic        all_lo, all_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame <= 1'b0; cnt <= '0; sh <= '0; wstrobe <= 1'b0; word <= '0;
      all_lo <= 1'b1; all_hi <= 1'b1; dav_lo <= 1'b0; dav_hi <= 1'b0;
      idle_dav_err <= 1'b0;
    end else begin
      wstrobe      <= 1'b0;
      idle_dav_err <= 1'b0;
      if (en) begin
        if (!in_frame && cnt == 3'd0 && pair == 2'b00) begin
          idle_dav_err <= !dav_n;
        end else begin
          in_frame <= 1'b1;
          if (cnt == 3'd7) begin
            word    <= {sh, pair};
            wstrobe <= 1'b1;
            dav_lo  <= all_lo && !dav_n;
            dav_hi  <= all_hi && dav_n;
            all_lo  <= 1'b1;
            all_hi  <= 1'b1;
            in_frame <= ({sh, pair} != 16'h0000);
          end else begin
            sh     <= {sh[11:0], pair};
            all_lo <= all_lo && !dav_n;
            all_hi <= all_hi && dav_n;
          end
          cnt <= cnt + 3'd1;
        end
      end
    end
  end
endmodule
