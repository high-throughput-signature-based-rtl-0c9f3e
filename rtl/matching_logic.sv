// matching_logic: Matching Logic component.
//
// Decides whether the candidate signature matches by checking that the
// rm-vector holds consecutive ones over exactly the columns the signature
// occupies. Instead of a full per-column mask, each signature carries two
// short stage/index pairs, one for the head (columns left of the aligning
// column) and one for the tail (aligning column and right of it).
// The rm-vector is cut into six-bit slices counted outwards from the aligning
// column; bit 0 of a slice is the bit nearest that column. Pipeline step k
// holds one head MU and one tail MU that process slice k (innermost slice
// first); the unprocessed slices travel down the pipeline with the candidate.
// A side with fewer slices than the other only passes its signals on in the
// extra steps. After the last step the head and tail match signals are
// combined: a match needs both.
// Latency: NS+1 clocks (NS = slices of the longer side) from the inputs to
// match/id_out; a new candidate can enter every clock. Synchronous
// active-low reset clears the valid bits.
module matching_logic
  import nids_pkg::*;
#(
  parameter int unsigned W_HEAD = 36,
  parameter int unsigned W_TAIL = 100,
  parameter int unsigned IDW    = 10,
  localparam int unsigned W     = W_HEAD + W_TAIL,
  localparam int unsigned NSH   = num_slices(W_HEAD),
  localparam int unsigned NST   = num_slices(W_TAIL),
  localparam int unsigned NS    = (NSH > NST) ? NSH : NST,
  localparam int unsigned HSW   = stage_w(W_HEAD),
  localparam int unsigned TSW   = stage_w(W_TAIL)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [IDW-1:0]     in_id,
  input  logic [W-1:0]       rm,
  input  logic [HSW-1:0]     h_stage,
  input  logic [SLICE_W-1:0] h_index,
  input  logic [TSW-1:0]     t_stage,
  input  logic [SLICE_W-1:0] t_index,
  output logic               match,
  output logic [IDW-1:0]     id_out
);
  typedef logic [NS-1:0][SLICE_W-1:0] slices_t;

  // Slice view of the rm-vector.
  slices_t hs_in, ts_in;
  always_comb begin
    for (int k = 0; k < NS; k++) begin
      for (int j = 0; j < SLICE_W; j++) begin
        hs_in[k][j] = (W_HEAD >= 1 + SLICE_W * k + j) ? rm[W_HEAD - 1 - SLICE_W * k - j] : 1'b0;
        ts_in[k][j] = (SLICE_W * k + j < W_TAIL)     ? rm[W_HEAD + SLICE_W * k + j]     : 1'b0;
      end
    end
  end

  // Pipeline registers after step k (index k) plus the step-0 inputs.
  logic   [NS:0]                v;
  logic   [NS:0][IDW-1:0]       id;
  slices_t                      hs [NS+1];
  slices_t                      ts [NS+1];
  logic   [NS:0][HSW-1:0]       hstg;
  logic   [NS:0][SLICE_W-1:0]   hidx;
  logic   [NS:0]                hcont, hmatch;
  logic   [NS:0][TSW-1:0]       tstg;
  logic   [NS:0][SLICE_W-1:0]   tidx;
  logic   [NS:0]                tcont, tmatch;

  assign v[0]      = in_valid;
  assign id[0]     = in_id;
  assign hs[0]     = hs_in;
  assign ts[0]     = ts_in;
  assign hstg[0]   = h_stage;
  assign hidx[0]   = h_index;
  assign hcont[0]  = 1'b1;
  assign hmatch[0] = 1'b0;
  assign tstg[0]   = t_stage;
  assign tidx[0]   = t_index;
  assign tcont[0]  = 1'b1;
  assign tmatch[0] = 1'b0;

  for (genvar k = 0; k < NS; k++) begin : g_step
    logic hc, hm, tc, tm;
    if (k < NSH) begin : g_hmu
      match_unit #(.STAGE(k), .STW(HSW)) u_hmu (
        .stage(hstg[k]), .index(hidx[k]), .cont_i(hcont[k]), .match_i(hmatch[k]),
        .slice(hs[k][k]), .cont_o(hc), .match_o(hm));
    end else begin : g_hpass
      assign hc = hcont[k];
      assign hm = hmatch[k];
    end
    if (k < NST) begin : g_tmu
      match_unit #(.STAGE(k), .STW(TSW)) u_tmu (
        .stage(tstg[k]), .index(tidx[k]), .cont_i(tcont[k]), .match_i(tmatch[k]),
        .slice(ts[k][k]), .cont_o(tc), .match_o(tm));
    end else begin : g_tpass
      assign tc = tcont[k];
      assign tm = tmatch[k];
    end

    always_ff @(posedge clk) begin
      if (!rst_n) v[k+1] <= 1'b0;
      else        v[k+1] <= v[k];
      id[k+1]     <= id[k];
      hs[k+1]     <= hs[k];
      ts[k+1]     <= ts[k];
      hstg[k+1]   <= hstg[k];
      hidx[k+1]   <= hidx[k];
      hcont[k+1]  <= hc;
      hmatch[k+1] <= hm;
      tstg[k+1]   <= tstg[k];
      tidx[k+1]   <= tidx[k];
      tcont[k+1]  <= tc;
      tmatch[k+1] <= tm;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) match <= 1'b0;
    else        match <= v[NS] & hmatch[NS] & tmatch[NS];
    id_out <= id[NS];
  end
endmodule
