// gsel_serializer: sends 16-bit fragment words over two signal lines, two
// bits per 40 MHz cycle, so that each word takes eight 40 MHz cycles.
//
// A 3-bit counter runs on the 40 MHz clock enable. In the last cycle of a
// word (counter = 7) it raises word_req; the word offered by the formatter is
// loaded into a shift register, or all zeros (idle / frame end) if the
// formatter offers none. The word then leaves most significant pair first:
// in cycle k of the word, line[1] carries bit 15-2k and line[0] bit 14-2k.
// dav_n (active low) is registered with the word and stays low for the eight
// cycles of every word that belongs to an event's data block.
//
// Timing: a word requested in cycle t appears on the lines from the next
// 40 MHz cycle on. After reset the first request comes with the first clock
// enable, so all serializers reset together share the same word boundaries.
//
// Two lines at 40 MHz and eight cycles per word follow the FEB output chain;
// the bit order on the lines and the timing of DAV against the words are this
// design's own choices.
module gsel_serializer
  import feb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,         // 40 MHz clock enable

  output logic       word_req,
  input  word_t      word,
  input  logic       word_valid,
  input  logic       word_dav,

  output logic [1:0] line,
  output logic       dav_n
);

  logic [2:0] cnt;
  word_t      sh;

  assign word_req = ce && (cnt == 3'd7);
  assign line     = sh[15:14];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= 3'd7;
      sh    <= '0;
      dav_n <= 1'b1;
    end else if (ce) begin
      cnt <= cnt + 3'd1;
      if (cnt == 3'd7) begin
        sh    <= word_valid ? word : FRAME_END;
        dav_n <= !(word_valid && word_dav);
      end else begin
        sh <= {sh[13:0], 2'b00};
      end
    end
  end

endmodule
