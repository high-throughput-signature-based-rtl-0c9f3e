// nids_top: multi-character signature matcher.
//
// Four stream characters enter per clock (in_chars[0] is the earliest). They
// are decoded into one-hot bit lines and shifted into the i-pipeline, whose
// sections are read in parallel by N_SMU Signature Matching Units. Each SMU
// owns one memory array of up to 1024 signatures of one u-set, and reports at
// most one match per clock: match[u] with the matching signature's address
// in sig_id[u]. Seven SMUs of 1024 entries and four characters per clock are
// the configuration the source evaluates (3,739 signatures); W_HEAD/W_TAIL
// (36 + 100 = 136 signature-matrix columns) are this design's split of the
// 136-column example. in_valid low inserts idle slots that match nothing.
// Timing: the latency is fixed. With the default parameters match[u] rises
// on the 44th rising edge after the edge that samples the u-substring's
// first character, whatever its lane; a new match can follow every clock.
module nids_top
  import nids_pkg::*;
#(
  parameter int unsigned N_SMU  = 7,
  parameter int unsigned NSIG   = 1024,
  parameter int unsigned W_HEAD = 36,
  parameter int unsigned W_TAIL = 100,
  localparam int unsigned DEPTH = 1024,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned PD    = pipe_depth(W_HEAD, W_TAIL)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  char_t [LANES-1:0]            in_chars,
  output logic  [N_SMU-1:0]            match,
  output logic  [N_SMU-1:0][AW-1:0]    sig_id
);
  lines_t [LANES-1:0]    dec_lines;
  lines_t [LANES*PD-1:0] win;

  char_decoder u_dec (.chars(in_chars), .valid(in_valid), .lines(dec_lines));

  input_pipeline #(.DEPTH(PD)) u_pipe (.clk, .rst_n, .in_lines(dec_lines), .win);

  for (genvar u = 0; u < N_SMU; u++) begin : g_smu
    smu #(.SMU_ID(u), .NSIG(NSIG), .DEPTH(DEPTH), .W_HEAD(W_HEAD), .W_TAIL(W_TAIL)) u_smu (
      .clk, .rst_n, .win, .match(match[u]), .sig_id(sig_id[u]));
  end
endmodule
