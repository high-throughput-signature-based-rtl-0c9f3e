// tb_matching_logic: feeds one candidate per clock. Each has random head and
// tail lengths; its rm-vector has ones over the signature's columns and
// random bits elsewhere, and for every third candidate one bit inside the
// signature is cleared. The stage/index masks are computed here from the
// lengths (stage = (n-1)/6, index = low n-6*stage bits set). The expected
// result must appear exactly NS+1 clocks later (NS = 17 slices of the
// 100-column tail), with the candidate's ID.
module tb_matching_logic;
  localparam int unsigned WH = 36, WT = 100, W = WH + WT, LAT = 17 + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic          in_valid;
  logic [9:0]    in_id;
  logic [W-1:0]  rm;
  logic [2:0]    h_stage;
  logic [5:0]    h_index;
  logic [4:0]    t_stage;
  logic [5:0]    t_index;
  logic          match;
  logic [9:0]    id_out;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;
  int exp_q[$];

  matching_logic #(.W_HEAD(WH), .W_TAIL(WT), .IDW(10)) dut (
    .clk, .rst_n, .in_valid, .in_id, .rm, .h_stage, .h_index, .t_stage, .t_index,
    .match, .id_out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0;
    in_id = '0;
    rm = '0;
    {h_stage, h_index, t_stage, t_index} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000 + LAT; n++) begin
      int hl, tl, e, st;
      if (n < 3000) begin
        hl = (n % 10 == 0) ? 0 : $urandom_range(0, WH);
        tl = (n % 10 == 1) ? WT : $urandom_range(1, WT);
        for (int c = 0; c < W; c++) rm[c] = (c + hl >= WH && c < WH + tl) ? 1'b1 : 1'($urandom);
        e = 1;
        if (n % 3 == 0) begin
          rm[$urandom_range(WH - hl, WH + tl - 1)] = 1'b0;
          e = 0;
        end
        in_valid = (n % 13 != 5);
        if (!in_valid) e = 0;
        in_id = 10'(n);
        st = (hl == 0) ? 0 : (hl - 1) / 6;
        h_stage = 3'(st);
        h_index = (hl == 0) ? 6'b0 : 6'((1 << (hl - 6 * st)) - 1);
        st = (tl - 1) / 6;
        t_stage = 5'(st);
        t_index = 6'((1 << (tl - 6 * st)) - 1);
        exp_q.push_back(e ? n : -1);
      end else begin
        in_valid = 1'b0;
        exp_q.push_back(-1);
      end
      @(negedge clk);
      if (exp_q.size() >= LAT) begin
        e = exp_q.pop_front();
        checks++;
        if (e < 0 ? match : (!match || id_out != 10'(e))) begin
          failures++;
          $display("candidate %0d: expected %0d, got match %0d id %0d", n + 1 - LAT, e, match, id_out);
        end
        if (e >= 0) n_hit++; else n_miss++;
      end
    end
    $display("matches %0d, non-matches %0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
