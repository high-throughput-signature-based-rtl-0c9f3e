// sma: Signature Memory Array of one u-set.
//
// One entry per signature, addressed by the signature ID. An entry holds the
// re-encoded signature (one code per signature-matrix column, 0..8 bits wide,
// the aligning column as a raw character) followed by the head and tail
// stage/index mask used by the matching logic. In the source architecture
// the entry is spread over several 36-bit-wide embedded memory blocks placed
// side by side, so that a whole signature is read in one clock; here it is a
// single array of ENTRY_W-bit words that a synthesis tool maps onto as many
// blocks as it needs (ceil(ENTRY_W/36) for 36-bit blocks).
// The contents are the memory initialisation computed from the signature set
// (nids_pkg::sma_entry); unused entries are zero. Synchronous read with one
// clock of latency; rd_data holds its value while rd_en is low.
module sma
  import nids_pkg::*;
#(
  parameter int unsigned SMU_ID  = 0,
  parameter int unsigned NSIG    = 1024,
  parameter int unsigned DEPTH   = 1024,
  parameter int unsigned W_HEAD  = 36,
  parameter int unsigned W_TAIL  = 100,
  localparam int unsigned ENTRY_W = entry_w(W_HEAD, W_TAIL),
  localparam int unsigned AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rd_en,
  input  logic [AW-1:0]      rd_addr,
  output logic [ENTRY_W-1:0] rd_data
);
  logic [ENTRY_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      if (i < NSIG) mem[i] = ENTRY_W'(sma_entry(SMU_ID, i, W_HEAD, W_TAIL));
      else          mem[i] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
