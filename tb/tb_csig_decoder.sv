// tb_csig_decoder: drives random cell lines and random per-column codes and
// checks that rm[c] equals the cell of column c that the code names (the
// single cell for 0-bit columns).
module tb_csig_decoder;
  import nids_pkg::*;
  localparam int unsigned WH = 6, W = 20;
  localparam int unsigned NC = n_cells(WH, W);
  localparam int unsigned CW = codes_w(WH, W);
  logic [NC-1:0] cells;
  logic [CW-1:0] codes;
  logic [W-1:0]  rm;
  int checks = 0, failures = 0;

  csig_decoder #(.W_HEAD(WH), .W(W)) dut (.cells, .codes, .rm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      int coff, boff, code;
      for (int b = 0; b < NC; b++) cells[b] = 1'($urandom);
      for (int b = 0; b < CW; b++) codes[b] = 1'($urandom);
      #1;
      coff = 0;
      boff = 0;
      for (int c = 0; c < W; c++) begin
        code = 0;
        for (int k = 0; k < col_bits(c, WH); k++) code |= int'(codes[boff + k]) << k;
        checks++;
        if (rm[c] != cells[coff + code]) begin
          failures++;
          $display("column %0d code %0d wrong", c, code);
        end
        boff += col_bits(c, WH);
        coff += col_p(c, WH);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
