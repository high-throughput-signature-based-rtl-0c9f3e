// tb_input_pipeline: shifts random decoded characters through a 5-step
// i-pipeline and compares every section, every clock, with a queue model of
// the last 20 characters (section 0 the oldest). Also checks that reset
// clears every section.
module tb_input_pipeline;
  import nids_pkg::*;
  localparam int unsigned D = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  lines_t [3:0]     in_lines;
  lines_t [4*D-1:0] win;
  int checks = 0, failures = 0;
  char_t hist[$];

  input_pipeline #(.DEPTH(D)) dut (.clk, .rst_n, .in_lines, .win);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_lines = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (win != '0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 4 * D; i++) hist.push_back(8'h00);
    for (int n = 0; n < 100; n++) begin
      char_t c[4];
      for (int l = 0; l < 4; l++) begin
        c[l] = char_t'($urandom);
        in_lines[l] = lines_t'(1) << c[l];
      end
      @(negedge clk);
      for (int l = 0; l < 4; l++) begin
        void'(hist.pop_front());
        hist.push_back(c[l]);
      end
      if (n >= D) begin
        for (int q = 0; q < 4 * D; q++) begin
          checks++;
          if (win[q] != (lines_t'(1) << hist[q])) begin
            failures++;
            $display("cycle %0d section %0d wrong", n, q);
          end
        end
      end
    end
    rst_n = 1'b0;
    @(negedge clk);
    checks++;
    if (win != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
