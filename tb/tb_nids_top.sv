// tb_nids_top: end-to-end test of the matcher at reduced size (2 SMUs, 64 signatures each, 12 head + 24 tail columns).
//
// Builds a stream of random background characters (0x00..0xBF, which can
// never form a u-substring) with signatures of the synthetic u-sets written
// into it. One in six inserted signatures has one character changed, some
// pairs are packed tightly so that one SMU reports matches in consecutive
// clocks, and idle clocks (in_valid low) are mixed in. The expected matches
// come from a plain software scan of that stream: wherever a u-substring
// appears, every u-set's signature with that u-substring is compared
// character by character against the stream. Each expected match must
// appear on its SMU, with the right ID, exactly a fixed number of clocks
// after its aligning character was presented (the pipeline latency worked
// out below); any other match is a failure. The test also counts that every
// mechanism happened: matches on every SMU, all four alignments of the
// aligning character, rejected near-miss candidates, back-to-back matches
// and idle clocks.
module tb_nids_top;
  import nids_pkg::*;

  localparam int unsigned N_SMU    = 2;
  localparam int unsigned SMU_BASE = 0;
  localparam int unsigned NSIG     = 64;
  localparam int unsigned WH       = 12;
  localparam int unsigned WT       = 24;
  localparam int unsigned N_INS    = 300;
  localparam bit          SEQ      = 0;   // insert signature n/N_SMU of SMU n%N_SMU for every n
  localparam int unsigned NSL      = (num_slices(WH) > num_slices(WT)) ? num_slices(WH) : num_slices(WT);
  localparam int unsigned PD       = pipe_depth(WH, WT);
  localparam int unsigned DP       = WH + 16;           // detector window start
  // clocks from the detector window to the match output:
  // detector reg, 2 encoder regs, SMA read, rm reg, NSL matching steps, output reg
  localparam int unsigned LAT      = 1 + 2 + 1 + 1 + NSL + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  char_t [3:0] in_chars = '0;
  logic [N_SMU-1:0]       match;
  logic [N_SMU-1:0][9:0]  sig_id;

  nids_top #(.N_SMU(N_SMU), .NSIG(NSIG), .W_HEAD(WH), .W_TAIL(WT)) dut (
    .clk, .rst_n, .in_valid, .in_chars, .match, .sig_id);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int slots[$];                 // stream; -1 marks an idle slot
  int exp_id[longint];          // key: cycle * N_SMU + smu
  int n_match[N_SMU];
  int n_align[4];
  int n_reject = 0, n_b2b = 0, n_idle = 0, n_expected = 0;
  int last_match[N_SMU];
  bit seen[longint];            // workload signatures and whether they matched
  int feed0;

  function automatic int bg();
    return $urandom_range(0, Z_SIZE - 1);
  endfunction

  task automatic put_sig(int u, int i, bit corrupt);
    int hl, tl, cpos, ch;
    hl = sig_head_len(u, i, WH);
    tl = sig_tail_len(u, i, WT);
    cpos = -1;
    if (corrupt && hl + tl > 2) begin
      do cpos = $urandom_range(0, hl + tl - 1); while (cpos == hl || cpos == hl + 1);
    end
    for (int c = 0; c < hl + tl; c++) begin
      ch = sig_char(u, i, WH - hl + c, WH);
      if (c == cpos) ch = (ch + 1) % Z_SIZE;
      slots.push_back(ch);
    end
  endtask

  // Make room so that the next aligning character (at size()+hl) is not in
  // the same group of four as the previous one: the u-set partitioning
  // allows one u-substring per clock.
  task automatic keep_apart(int hl, int last_a);
    while ((slots.size() + hl) / 4 == last_a / 4) slots.push_back(bg());
  endtask

  task automatic gen_stream();
    int last_a, u, i, i2, hl, best;
    bit corrupt;
    last_a = -100;
    repeat (4 * PD) slots.push_back(bg());
    for (int n = 0; n < N_INS; n++) begin
      repeat ($urandom_range(0, 5)) slots.push_back(bg());
      if ($urandom_range(0, 7) == 0) begin
        while (slots.size() % 4 != 0) slots.push_back(bg());
        repeat (4) slots.push_back(-1);
        n_idle++;
      end
      u = SMU_BASE + $urandom_range(0, N_SMU - 1);
      if (n % 5 == 4) begin
        // tight pair: shortest tail followed by shortest head
        best = 0;
        for (int k = 1; k < NSIG; k++)
          if (sig_tail_len(u, k, WT) < sig_tail_len(u, best, WT)) best = k;
        i = best;
        best = 0;
        for (int k = 1; k < NSIG; k++)
          if (k != i && sig_head_len(u, k, WH) < sig_head_len(u, best, WH)) best = k;
        i2 = best;
        hl = sig_head_len(u, i, WH);
        keep_apart(hl, last_a);
        last_a = slots.size() + hl;
        put_sig(u, i, 1'b0);
        hl = sig_head_len(u, i2, WH);
        keep_apart(hl, last_a);
        last_a = slots.size() + hl;
        put_sig(u, i2, 1'b0);
      end
      if (SEQ) begin
        // every signature of the workload once, spread over the SMUs
        u = SMU_BASE + n % N_SMU;
        i = n / N_SMU;
        hl = sig_head_len(u, i, WH);
        keep_apart(hl, last_a);
        last_a = slots.size() + hl;
        put_sig(u, i, 1'b0);
        seen[longint'(u) * NSIG + i] = 1'b0;
        repeat ($urandom_range(0, 5)) slots.push_back(bg());
        u = SMU_BASE + $urandom_range(0, N_SMU - 1);
      end
      if (!SEQ || n % 6 == 0) begin
        i = $urandom_range(0, NSIG - 1);
        hl = sig_head_len(u, i, WH);
        corrupt = SEQ ? 1'b1 : ($urandom_range(0, 5) == 0);
        keep_apart(hl, last_a);
        last_a = slots.size() + hl;
        put_sig(u, i, corrupt);
      end
    end
    repeat (4 * (PD + LAT + 8)) slots.push_back(bg());
    while (slots.size() % 4 != 0) slots.push_back(bg());
  endtask

  // Software reference: scan for u-substrings, compare whole signatures.
  task automatic build_expected();
    int i, hl, tl, d, ecyc;
    bit ok, cand;
    for (int p = 0; p + 1 < slots.size(); p++) begin
      if (slots[p] >= int'(X_BASE) && slots[p] < int'(X_BASE + XY_SIZE) &&
          slots[p+1] >= int'(Y_BASE) && slots[p+1] < int'(Y_BASE + XY_SIZE)) begin
        i = (slots[p] - X_BASE) * XY_SIZE + (slots[p+1] - Y_BASE);
        if (i >= NSIG) continue;
        cand = 1'b0;
        for (int u = 0; u < N_SMU; u++) begin
          hl = sig_head_len(SMU_BASE + u, i, WH);
          tl = sig_tail_len(SMU_BASE + u, i, WT);
          ok = (p >= hl) && (p + tl <= slots.size());
          for (int c = 0; ok && c < hl + tl; c++)
            if (slots[p - hl + c] != int'(sig_char(SMU_BASE + u, i, WH - hl + c, WH))) ok = 1'b0;
          if (ok) begin
            // slot p enters the i-pipeline at section 4*PD-4+p%4 and moves
            // down four sections per clock until it is in the detector window
            d = (4 * PD - 4 + p % 4 - DP) / 4;
            ecyc = feed0 + p / 4 + 1 + d + LAT;
            exp_id[longint'(ecyc) * N_SMU + u] = i;
            n_expected++;
            n_align[p % 4]++;
            cand = 1'b1;
          end
        end
        if (!cand) n_reject++;
      end
    end
  endtask

  // Output monitor
  always @(negedge clk) begin
    if (rst_n) begin
      for (int u = 0; u < N_SMU; u++) begin
        if (match[u]) begin
          longint key;
          key = longint'(cyc) * N_SMU + u;
          checks++;
          if (exp_id.exists(key) && exp_id[key] == int'(sig_id[u])) begin
            exp_id.delete(key);
            if (seen.exists(longint'(SMU_BASE + u) * NSIG + sig_id[u])) seen[longint'(SMU_BASE + u) * NSIG + sig_id[u]] = 1'b1;
            n_match[u]++;
            if (last_match[u] == cyc - 1) n_b2b++;
            last_match[u] = cyc;
          end else begin
            failures++;
            $display("unexpected match: cycle %0d smu %0d id %0d", cyc, SMU_BASE + u, sig_id[u]);
          end
        end
      end
    end
  end

  initial begin
    for (int u = 0; u < N_SMU; u++) begin
      n_match[u] = 0;
      last_match[u] = -10;
    end
    for (int a = 0; a < 4; a++) n_align[a] = 0;
    gen_stream();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    feed0 = cyc;
    build_expected();
    for (int k = 0; k < slots.size() / 4; k++) begin
      in_valid = (slots[4 * k] >= 0);
      for (int j = 0; j < 4; j++) in_chars[j] = (slots[4 * k + j] >= 0) ? char_t'(slots[4 * k + j]) : 8'h00;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + PD + 4) @(negedge clk);
    foreach (exp_id[key]) begin
      checks++;
      failures++;
      $display("missed match: cycle %0d smu %0d id %0d", key / N_SMU, SMU_BASE + key % N_SMU, exp_id[key]);
    end
    checks++;
    if (n_expected == 0) failures++;
    for (int u = 0; u < N_SMU; u++) begin
      checks++;
      if (n_match[u] == 0) begin failures++; $display("no match on smu %0d", SMU_BASE + u); end
    end
    for (int a = 0; a < 4; a++) begin
      checks++;
      if (n_align[a] == 0) begin failures++; $display("alignment %0d never seen", a); end
    end
    checks++;
    if (n_reject == 0) begin failures++; $display("no rejected candidate"); end
    checks++;
    if (n_b2b == 0) begin failures++; $display("no back-to-back matches"); end
    if (SEQ) begin
      int n_seen = 0;
      foreach (seen[key]) if (seen[key]) n_seen++;
      checks++;
      if (n_seen != N_INS) begin failures++; $display("only %0d of %0d workload signatures matched", n_seen, N_INS); end
      $display("workload signatures matched: %0d of %0d", n_seen, N_INS);
    end
    checks++;
    if (n_idle == 0) begin failures++; $display("no idle clock"); end
    $display("stream %0d chars, matches %0d, rejected candidates %0d, back-to-back %0d, idle clocks %0d, alignments %0d/%0d/%0d/%0d",
             slots.size(), n_expected, n_reject, n_b2b, n_idle, n_align[0], n_align[1], n_align[2], n_align[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
