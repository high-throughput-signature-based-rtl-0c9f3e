// align_detect: Alignment Detection component.
//
// The candidate signature's u-substring begins in the aligning column, so its
// first character lies at one of LANES consecutive sections of the matching
// window, one per alignment. This block compares the raw aligning character
// read from the SMA (achar) with the window sections acol[0..LANES-1] at the
// aligning column, qualifies each comparison with the detector's delayed
// per-shift flag (so a character repeated inside the same four sections
// cannot pick the wrong shift) and returns the lowest shift that agrees.
// ok is low when the candidate is invalid or no shift agrees. Combinational.
module align_detect
  import nids_pkg::*;
(
  input  lines_t [LANES-1:0] acol,
  input  char_t              achar,
  input  logic   [LANES-1:0] shift_hit,
  input  logic               cand_valid,
  output logic   [1:0]       shift,
  output logic               ok
);
  logic [LANES-1:0] agree;
  always_comb begin
    shift = '0;
    ok    = 1'b0;
    for (int s = LANES - 1; s >= 0; s--) begin
      agree[s] = acol[s][achar] & shift_hit[s];
      if (agree[s]) begin
        shift = 2'(s);
        ok    = cand_valid;
      end
    end
  end
endmodule
