// input_pipeline: the i-pipeline, a serial-to-parallel buffer of decoded
// characters.
//
// Every clock the LANES decoded characters of the cycle enter the newest step
// and all older steps move down by one; each step holds LANES sections of 256
// bit lines. All sections are visible in parallel on win, which feeds every
// Signature Matching Unit. win[0] is the oldest section and
// win[LANES*DEPTH-1] the newest; within a cycle lane 0 is the earliest
// character, so win[q] always holds stream character (base + q) where base
// advances by LANES per clock. DEPTH is set by the SMUs' needs (matching
// window plus the detection-to-fetch latency). Synchronous active-low reset
// clears every line, i.e. fills the pipeline with idle slots.
module input_pipeline
  import nids_pkg::*;
#(
  parameter int unsigned DEPTH = 35
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  lines_t [LANES-1:0]         in_lines,
  output lines_t [LANES*DEPTH-1:0]   win
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int q = 0; q < LANES * DEPTH; q++) win[q] <= '0;
    end else begin
      for (int q = 0; q < LANES * (DEPTH - 1); q++) win[q] <= win[q + LANES];
      for (int l = 0; l < LANES; l++) win[LANES * (DEPTH - 1) + l] <= in_lines[l];
    end
  end
endmodule
