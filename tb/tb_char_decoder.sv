// tb_char_decoder: checks that every input character lights exactly its own
// bit line and no other, for all 256 characters in every lane, and that all
// lines stay low when valid is low.
module tb_char_decoder;
  import nids_pkg::*;
  char_t  [3:0] chars;
  logic         valid;
  lines_t [3:0] lines;
  int checks = 0, failures = 0;

  char_decoder dut (.chars, .valid, .lines);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      for (int l = 0; l < 4; l++) chars[l] = (n < 256) ? char_t'(n + 61 * l) : char_t'($urandom);
      valid = (n % 7 != 3);
      #1;
      for (int l = 0; l < 4; l++) begin
        int ones;
        ones = 0;
        for (int b = 0; b < 256; b++) if (lines[l][b]) ones++;
        checks++;
        if (valid ? (ones != 1 || !lines[l][chars[l]]) : (ones != 0)) begin
          failures++;
          $display("lane %0d char %02h valid %0d: %0d lines set", l, chars[l], valid, ones);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
