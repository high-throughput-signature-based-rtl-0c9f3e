// match_unit: one Matching Unit (MU) of the matching-logic pipeline.
//
// The MU at pipeline step STAGE looks at slice STAGE of its side (head or
// tail) of the rm-vector. The four signals that travel through the pipeline
// are stage, index, continuity and match:
//  * STAGE below stage: the signature covers the whole slice, so continuity
//    stays set only if all six bits are ones;
//  * STAGE equal to stage: this is the outermost slice of the signature; the
//    match is set if continuity holds and every bit allowed by index is one;
//  * STAGE above stage: the signature has ended, signals pass unchanged.
// Combinational; the enclosing matching_logic registers the outputs.
module match_unit
  import nids_pkg::*;
#(
  parameter int unsigned STAGE = 0,
  parameter int unsigned STW   = 3
) (
  input  logic [STW-1:0]     stage,
  input  logic [SLICE_W-1:0] index,
  input  logic               cont_i,
  input  logic               match_i,
  input  logic [SLICE_W-1:0] slice,
  output logic               cont_o,
  output logic               match_o
);
  always_comb begin
    cont_o  = cont_i;
    match_o = match_i;
    if (int'(stage) > int'(STAGE)) begin
      cont_o = cont_i & (&slice);
    end else if (int'(stage) == int'(STAGE)) begin
      match_o = cont_i & ((slice & index) == index);
    end
  end
endmodule
