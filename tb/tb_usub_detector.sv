// tb_usub_detector: places u-substring i at shift s of a five-section window
// filled otherwise with body characters (which can never form a
// u-substring) and checks, one clock later, that hit has exactly bit i set
// and shift_hit exactly bit s. Windows with no u-substring, and windows with
// only the first or only the second character, must give no hit.
module tb_usub_detector;
  import nids_pkg::*;
  localparam int unsigned NSIG = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  lines_t [4:0]    win;
  logic [NSIG-1:0] hit;
  logic [3:0]      shift_hit;
  int checks = 0, failures = 0;

  usub_detector #(.NSIG(NSIG)) dut (.clk, .rst_n, .win, .hit, .shift_hit);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(int i, int s, int mode);
    for (int q = 0; q < 5; q++) win[q] = lines_t'(1) << $urandom_range(0, 191);
    // u-substring of i: 0xC0 + i/32 then 0xE0 + i%32
    if (mode != 2) win[s]     = lines_t'(1) << (8'hC0 + i / 32);
    if (mode != 1) win[s + 1] = lines_t'(1) << (8'hE0 + i % 32);
  endtask

  initial begin
    win = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      int i, s, mode;
      i = $urandom_range(0, NSIG - 1);
      s = $urandom_range(0, 3);
      mode = (n % 5 == 0) ? $urandom_range(1, 3) : 0;   // 1,2: half only, 3: none
      if (mode == 3) for (int q = 0; q < 5; q++) win[q] = lines_t'(1) << $urandom_range(0, 191);
      else fill(i, s, mode);
      @(negedge clk);
      checks++;
      if (mode == 0) begin
        if (hit != (NSIG'(1) << i) || shift_hit != (4'(1) << s)) begin
          failures++;
          $display("u-substring %0d shift %0d: hit wrong", i, s);
        end
      end else if (hit != '0 || shift_hit != '0) begin
        failures++;
        $display("false hit, mode %0d", mode);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
