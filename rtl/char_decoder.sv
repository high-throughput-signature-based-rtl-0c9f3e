// char_decoder: the input character decoders.
//
// Each of the LANES characters that arrive in a clock cycle is decoded into
// NLINES (256) one-hot bit lines, so that every later comparison against a
// known character is a single wire. Following the source architecture there
// is one 8-to-256 decoder per input character and four characters per clock.
// When valid is low all lines are driven low: an idle slot then looks like a
// character that matches nothing (this idle handling is this design's choice).
// Purely combinational; the first register is the input pipeline.
module char_decoder
  import nids_pkg::*;
(
  input  char_t  [LANES-1:0] chars,
  input  logic               valid,
  output lines_t [LANES-1:0] lines
);
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      lines[l] = '0;
      if (valid) lines[l][chars[l]] = 1'b1;
    end
  end
endmodule
