// tb_pipelined_encoder: drives one-hot and multi-hot hit vectors every clock
// and checks that, exactly two clocks later, addr is the index of the lowest
// set bit and valid is set (valid clear for an empty vector).
module tb_pipelined_encoder;
  localparam int unsigned N = 1024;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] hit;
  logic         valid;
  logic [9:0]   addr;
  int checks = 0, failures = 0;
  int exp_q[$];

  pipelined_encoder #(.N(N)) dut (.clk, .rst_n, .hit, .valid, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hit = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_q = '{-1};
    for (int n = 0; n < 2000; n++) begin
      int lo, k;
      hit = '0;
      lo = -1;
      if (n % 9 != 0) begin
        k = $urandom_range(0, N - 1);
        hit[k] = 1'b1;
        lo = k;
        if (n % 4 == 0) begin
          k = $urandom_range(0, N - 1);
          hit[k] = 1'b1;
          if (k < lo) lo = k;
        end
      end
      exp_q.push_back(lo);
      @(negedge clk);
      begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (e < 0 ? valid : (!valid || addr != 10'(e))) begin
          failures++;
          $display("step %0d: expected %0d, got valid %0d addr %0d", n, e, valid, addr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
