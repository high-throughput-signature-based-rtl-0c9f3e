// tb_sma: reads every entry of a small signature memory array and decodes
// it field by field: the raw aligning character must be the signature's
// u-substring start, every code inside the signature must name, in the
// character matrix, the signature's character in that column, codes outside
// it must be zero, and 6*stage + (ones in index) must give the head and tail
// lengths. Unused entries must read as zero. Data must appear one clock
// after the address and hold while rd_en is low.
module tb_sma;
  import nids_pkg::*;
  localparam int unsigned NSIG = 12, DEPTH = 16, WH = 7, WT = 13, W = WH + WT;
  localparam int unsigned EW = entry_w(WH, WT);
  localparam int unsigned SMU = 5;
  logic clk = 1'b0, rd_en = 1'b0;
  logic [3:0]    rd_addr = '0;
  logic [EW-1:0] rd_data;
  int checks = 0, failures = 0;

  sma #(.SMU_ID(SMU), .NSIG(NSIG), .DEPTH(DEPTH), .W_HEAD(WH), .W_TAIL(WT)) dut (
    .clk, .rd_en, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int field(logic [EW-1:0] e, int off, int w);
    int v = 0;
    for (int k = 0; k < w; k++) v |= int'(e[off + k]) << k;
    return v;
  endfunction

  function automatic int ones(int v);
    int n = 0;
    for (int k = 0; k < 6; k++) n += (v >> k) & 1;
    return n;
  endfunction

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      int off, b, code, hl, tl, hsw, tsw, hst, hix, tst, tix;
      rd_en = 1'b1;
      rd_addr = 4'(a);
      @(negedge clk);
      rd_en = 1'b0;
      rd_addr = 4'(a + 1);
      @(negedge clk);   // data must hold with rd_en low
      checks++;
      if (a >= NSIG) begin
        if (rd_data != '0) begin failures++; $display("entry %0d not empty", a); end
        continue;
      end
      hl = sig_head_len(SMU, a, WH);
      tl = sig_tail_len(SMU, a, WT);
      off = 0;
      for (int c = 0; c < W; c++) begin
        b = col_bits(c, WH);
        code = field(rd_data, off, b);
        checks++;
        if (c + hl < WH || c >= WH + tl) begin
          if (code != 0) begin failures++; $display("entry %0d col %0d: code outside", a, c); end
        end else if (c == WH) begin
          if (code != 8'hC0 + a / 32) begin failures++; $display("entry %0d: aligning char %02h", a, code); end
        end else if (cm_char(SMU, c, code, WH) != sig_char(SMU, a, c, WH)) begin
          failures++;
          $display("entry %0d col %0d: code %0d wrong", a, c, code);
        end
        off += b;
      end
      hsw = stage_w(WH);
      tsw = stage_w(WT);
      hst = field(rd_data, off, hsw);
      hix = field(rd_data, off + hsw, 6);
      tst = field(rd_data, off + hsw + 6, tsw);
      tix = field(rd_data, off + hsw + 6 + tsw, 6);
      checks++;
      if ((hl == 0 ? (hst != 0 || hix != 0) : (6 * hst + ones(hix) != hl || hix != (1 << ones(hix)) - 1)) ||
          6 * tst + ones(tix) != tl || tix != (1 << ones(tix)) - 1) begin
        failures++;
        $display("entry %0d: mask h %0d/%b t %0d/%b for lengths %0d/%0d", a, hst, hix[5:0], tst, tix[5:0], hl, tl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
