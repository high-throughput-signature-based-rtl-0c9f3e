// tb_char_matrix: fills a small matching window with random characters and
// checks every character-matrix cell for every shift: cell (c, k) must be 1
// exactly when window section c+shift holds the cell's character.
module tb_char_matrix;
  import nids_pkg::*;
  localparam int unsigned WH = 5, W = 14, SMU = 2;
  localparam int unsigned NC = n_cells(WH, W);
  lines_t [W+2:0] mw;
  logic [1:0]     shift;
  logic [NC-1:0]  cells;
  char_t          ch[W+3];
  int checks = 0, failures = 0;

  char_matrix #(.SMU_ID(SMU), .W_HEAD(WH), .W(W)) dut (.mw, .shift, .cells);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      int off;
      for (int q = 0; q < W + 3; q++) begin
        // mostly characters from the matrix column, so that cells do fire
        if (q < W && $urandom_range(0, 2) != 0)
          ch[q] = cm_char(SMU, q, $urandom_range(0, col_p(q, WH) - 1), WH);
        else
          ch[q] = char_t'($urandom);
        mw[q] = lines_t'(1) << ch[q];
      end
      shift = 2'($urandom_range(0, 3));
      #1;
      off = 0;
      for (int c = 0; c < W; c++) begin
        for (int k = 0; k < col_p(c, WH); k++) begin
          checks++;
          if (cells[off + k] != (ch[c + shift] == cm_char(SMU, c, k, WH))) begin
            failures++;
            $display("col %0d cell %0d shift %0d wrong", c, k, shift);
          end
        end
        off += col_p(c, WH);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
