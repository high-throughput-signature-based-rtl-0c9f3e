// csig_decoder: Character Decoder component.
//
// For every signature-matrix column one multiplexer, steered by the
// candidate signature's re-encoded character for that column, selects one of
// the column's aligned cell lines. The output bit is 1 exactly when the
// region-of-interest character equals the signature character. The result is
// the raw matching vector (rm-vector), one bit per column. Columns stored
// with 0 bits have a single cell that is wired straight through; the aligning
// column's code is the raw character and selects among all 256 lines.
// Columns outside the signature produce don't-care bits that the matching
// logic masks. Combinational.
module csig_decoder
  import nids_pkg::*;
#(
  parameter int unsigned W_HEAD = 36,
  parameter int unsigned W      = 136,
  localparam int unsigned NC    = n_cells(W_HEAD, W),
  localparam int unsigned CW    = codes_w(W_HEAD, W)
) (
  input  logic [NC-1:0] cells,
  input  logic [CW-1:0] codes,
  output logic [W-1:0]  rm
);
  for (genvar c = 0; c < W; c++) begin : g_col
    localparam int unsigned OFF = cell_off(c, W_HEAD);
    localparam int unsigned B   = col_bits(c, W_HEAD);
    localparam int unsigned CO  = col_off(c, W_HEAD);
    if (B == 0) begin : g_wire
      assign rm[c] = cells[OFF];
    end else begin : g_mux
      logic [(1<<B)-1:0] col;
      assign col   = cells[OFF +: (1<<B)];
      assign rm[c] = col[codes[CO +: B]];
    end
  end
endmodule
