// tb_align_detect: builds the four aligning-column sections with the
// candidate's aligning character at shift s, and the same character also at
// other shifts whose detector flag is low (a repeated character), and checks
// that shift = s and ok = cand_valid. With no flag, or a flag at a section
// holding another character, ok must be low.
module tb_align_detect;
  import nids_pkg::*;
  lines_t [3:0] acol;
  char_t        achar;
  logic [3:0]   shift_hit;
  logic         cand_valid;
  logic [1:0]   shift;
  logic         ok;
  int checks = 0, failures = 0;

  align_detect dut (.acol, .achar, .shift_hit, .cand_valid, .shift, .ok);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int s, mode;
      s = $urandom_range(0, 3);
      mode = $urandom_range(0, 4);       // 0..2 normal, 3 no flag, 4 flag on wrong char
      achar = char_t'($urandom_range(8'hC0, 8'hDF));
      for (int q = 0; q < 4; q++)
        acol[q] = lines_t'(1) << (($urandom_range(0, 1) == 1) ? achar : char_t'($urandom_range(0, 191)));
      acol[s] = lines_t'(1) << achar;
      shift_hit = (mode == 3) ? 4'b0 : 4'(1) << s;
      if (mode == 4) acol[s] = lines_t'(1) << char_t'($urandom_range(0, 191));
      cand_valid = (n % 11 != 0);
      #1;
      checks++;
      if (mode >= 3) begin
        if (ok) begin failures++; $display("ok without alignment, mode %0d", mode); end
      end else if (ok != cand_valid || (cand_valid && shift != 2'(s))) begin
        failures++;
        $display("shift %0d: got ok %0d shift %0d", s, ok, shift);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
