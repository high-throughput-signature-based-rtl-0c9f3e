// char_matrix: Character Matrix component (alignment correction).
//
// The character matrix lists, per signature-matrix column, the distinct
// characters that occur there. For every cell (column c, character k) there
// is one LANES-to-1 multiplexer that takes the bit line of that character from
// window section c+shift, i.e. from the stream character that lies under
// column c once the region of interest is aligned with the candidate
// signature. Only the bit lines of characters that exist in the matrix are
// carried on, which is what makes the per-column re-encoding cheap.
// Cells are flattened column by column (nids_pkg::cell_off); the aligning
// column has all 256 cells since it is stored raw. The cell characters are
// constants of u-set SMU_ID (nids_pkg::cm_char), so after unrolling each
// cell is a 4-to-1 multiplexer of four fixed wires. Combinational.
module char_matrix
  import nids_pkg::*;
#(
  parameter int unsigned SMU_ID = 0,
  parameter int unsigned W_HEAD = 36,
  parameter int unsigned W      = 136,
  localparam int unsigned NC    = n_cells(W_HEAD, W)
) (
  input  lines_t [W+LANES-2:0] mw,
  input  logic   [1:0]         shift,
  output logic   [NC-1:0]      cells
);
  always_comb begin
    int unsigned off;
    char_t       ch;
    off   = 0;
    cells = '0;
    for (int unsigned c = 0; c < W; c++) begin
      for (int unsigned k = 0; k < col_p(c, W_HEAD); k++) begin
        ch = cm_char(SMU_ID, c, k, W_HEAD);
        cells[off + k] = mw[c + int'(shift)][ch];
      end
      off += col_p(c, W_HEAD);
    end
  end
endmodule
