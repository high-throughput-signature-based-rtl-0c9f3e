// smu: Signature Matching Unit, the matcher for one signature memory array.
//
// Flow for every clock (four new characters):
//  1. usub_detector looks at LANES+1 sections of the i-pipeline and reports
//     which u-substring (if any) starts at which of the four shifts.
//  2. pipelined_encoder turns the hit into the SMA address of the candidate
//     signature (CSig); the address is also the signature ID.
//  3. sma returns the CSig entry. Meanwhile the i-pipeline has moved the
//     region of interest (RoI) down so that the u-substring's first character
//     now sits at window section W_HEAD+shift, i.e. in the aligning column.
//  4. align_detect finds the shift; char_matrix picks the aligned bit line of
//     every character-matrix cell; csig_decoder selects, per column, the cell
//     named by the CSig code, giving the rm-vector (registered).
//  5. matching_logic checks the rm-vector against the head/tail stage and
//     index mask and outputs match with the signature ID.
// The matching window is win[0 .. W+LANES-2]; the detector window starts at
// det_pos(W_HEAD) = W_HEAD + 4*LAT_FETCH, so that steps 1-3 (LAT_FETCH = 4
// clocks) bring the RoI exactly into place. A new candidate can start every
// clock. Latency: smu_latency() clocks from the detector window to match.
// The partitioning of the signature set guarantees at most one u-substring
// hit per clock; this is not checked in hardware.
module smu
  import nids_pkg::*;
#(
  parameter int unsigned SMU_ID = 0,
  parameter int unsigned NSIG   = 1024,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned W_HEAD = 36,
  parameter int unsigned W_TAIL = 100,
  localparam int unsigned W       = W_HEAD + W_TAIL,
  localparam int unsigned PD      = pipe_depth(W_HEAD, W_TAIL),
  localparam int unsigned NSEC    = LANES * PD,
  localparam int unsigned AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned NC      = n_cells(W_HEAD, W),
  localparam int unsigned CW      = codes_w(W_HEAD, W),
  localparam int unsigned ENTRY_W = entry_w(W_HEAD, W_TAIL),
  localparam int unsigned HSW     = stage_w(W_HEAD),
  localparam int unsigned TSW     = stage_w(W_TAIL),
  localparam int unsigned SW      = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  lines_t [NSEC-1:0]   win,
  output logic                match,
  output logic [AW-1:0]       sig_id
);
  localparam int unsigned DP = det_pos(W_HEAD);

  // 1. u-substring detection
  logic [NSIG-1:0]  hit;
  logic [LANES-1:0] shift_hit;
  usub_detector #(.NSIG(NSIG)) u_det (
    .clk, .rst_n, .win(win[DP +: LANES + U_LEN - 1]), .hit, .shift_hit);

  // 2. encoder (hit vector padded to the SMA depth)
  logic          enc_valid;
  logic [AW-1:0] enc_addr;
  pipelined_encoder #(.N(DEPTH)) u_enc (
    .clk, .rst_n, .hit(DEPTH'(hit)), .valid(enc_valid), .addr(enc_addr));

  // 3. SMA fetch, with the side information delayed alongside
  logic [ENTRY_W-1:0] entry;
  sma #(.SMU_ID(SMU_ID), .NSIG(NSIG), .DEPTH(DEPTH), .W_HEAD(W_HEAD), .W_TAIL(W_TAIL)) u_sma (
    .clk, .rd_en(enc_valid), .rd_addr(enc_addr), .rd_data(entry));

  logic [LAT_FETCH-2:0][LANES-1:0] shift_dly;
  logic                            cand_valid;
  logic [AW-1:0]                   cand_id;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shift_dly  <= '0;
      cand_valid <= 1'b0;
    end else begin
      shift_dly  <= {shift_dly[LAT_FETCH-3:0], shift_hit};
      cand_valid <= enc_valid;
    end
    cand_id <= enc_addr;
  end

  // 4. alignment, character matrix, character decoder
  logic [SW-1:0] shift;
  logic          align_ok;
  align_detect u_align (
    .acol(win[W_HEAD +: LANES]), .achar(entry[col_off(W_HEAD, W_HEAD) +: 8]),
    .shift_hit(shift_dly[LAT_FETCH-2]), .cand_valid, .shift, .ok(align_ok));

  logic [NC-1:0] cells;
  char_matrix #(.SMU_ID(SMU_ID), .W_HEAD(W_HEAD), .W(W)) u_cm (
    .mw(win[0 +: W + LANES - 1]), .shift, .cells);

  logic [W-1:0] rm_d;
  csig_decoder #(.W_HEAD(W_HEAD), .W(W)) u_dec (
    .cells, .codes(entry[CW-1:0]), .rm(rm_d));

  logic               rm_valid;
  logic [AW-1:0]      rm_id;
  logic [W-1:0]       rm_q;
  logic [HSW-1:0]     h_stage;
  logic [SLICE_W-1:0] h_index;
  logic [TSW-1:0]     t_stage;
  logic [SLICE_W-1:0] t_index;
  always_ff @(posedge clk) begin
    if (!rst_n) rm_valid <= 1'b0;
    else        rm_valid <= align_ok;
    rm_id   <= cand_id;
    rm_q    <= rm_d;
    h_stage <= entry[CW +: HSW];
    h_index <= entry[CW + HSW +: SLICE_W];
    t_stage <= entry[CW + HSW + SLICE_W +: TSW];
    t_index <= entry[CW + HSW + SLICE_W + TSW +: SLICE_W];
  end

  // 5. matching logic
  matching_logic #(.W_HEAD(W_HEAD), .W_TAIL(W_TAIL), .IDW(AW)) u_ml (
    .clk, .rst_n, .in_valid(rm_valid), .in_id(rm_id), .rm(rm_q),
    .h_stage, .h_index, .t_stage, .t_index, .match, .id_out(sig_id));
endmodule
