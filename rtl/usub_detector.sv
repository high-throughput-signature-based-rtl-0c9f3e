// usub_detector: brute-force unique-substring (u-substring) detector of one
// u-set.
//
// Every u-substring of the u-set has LANES matchers, one per possible start
// position (shift) among the LANES sections of the current cycle; a matcher
// is an AND of the one-hot lines of its characters, so it costs almost
// nothing. hit[i] reports that u-substring i (hence candidate signature i)
// was seen at some shift, shift_hit[s] that some u-substring starts at shift
// s. The u-set is partitioned so that at most one u-substring is found per
// clock; the encoder that follows resolves a violation by priority.
// win[s] is the section at shift s; win holds LANES+U_LEN-1 sections.
// Outputs are registered: one cycle of latency. The u-substring characters
// are constants (nids_pkg::usub_char); the loops below unroll into
// NSIG*LANES hard-wired AND gates.
module usub_detector
  import nids_pkg::*;
#(
  parameter int unsigned NSIG = 1024
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  lines_t [LANES+U_LEN-2:0]          win,
  output logic   [NSIG-1:0]                 hit,
  output logic   [LANES-1:0]                shift_hit
);
  // One block per group of 32 u-substrings (those that share their first
  // character); the loops inside unroll into hard-wired AND gates.
  localparam int unsigned NG = (NSIG + XY_SIZE - 1) / XY_SIZE;

  logic [NSIG-1:0]           hit_d;
  logic [NG-1:0][LANES-1:0]  shift_g;
  logic [LANES-1:0]          shift_d;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    always_comb begin
      logic m;
      shift_g[g] = '0;
      for (int b = 0; b < XY_SIZE; b++) begin
        if (g * XY_SIZE + b < NSIG) begin
          hit_d[g * XY_SIZE + b] = 1'b0;
          for (int s = 0; s < LANES; s++) begin
            m = 1'b1;
            for (int j = 0; j < U_LEN; j++) m &= win[s + j][usub_char(g * XY_SIZE + b, j)];
            hit_d[g * XY_SIZE + b] |= m;
            shift_g[g][s] |= m;
          end
        end
      end
    end
  end

  always_comb begin
    shift_d = '0;
    for (int g = 0; g < NG; g++) shift_d |= shift_g[g];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hit       <= '0;
      shift_hit <= '0;
    end else begin
      hit       <= hit_d;
      shift_hit <= shift_d;
    end
  end
endmodule
