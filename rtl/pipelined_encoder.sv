// pipelined_encoder: turns the u-substring hit vector into the SMA address of
// the candidate signature (CSig).
//
// Two register stages. Stage 1 splits the N hit bits into groups of GROUP,
// and for each group records whether any bit is set and the position of the
// lowest set bit. Stage 2 picks the lowest non-empty group and concatenates
// its number with the position inside it. The u-set partitioning allows at
// most one hit per clock, so the priority only matters if that rule is
// broken; then the lowest index wins. The source names this block only; the
// two-stage priority tree is this design's choice.
// Latency: 2 clocks from hit to {valid, addr}.
module pipelined_encoder #(
  parameter int unsigned N     = 1024,
  parameter int unsigned GROUP = 32,
  localparam int unsigned AW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NG   = (N + GROUP - 1) / GROUP,
  localparam int unsigned GW   = (GROUP > 1) ? $clog2(GROUP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  hit,
  output logic          valid,
  output logic [AW-1:0] addr
);
  logic [NG-1:0]          g_any_d, g_any_q;
  logic [NG-1:0][GW-1:0]  g_pos_d, g_pos_q;

  always_comb begin
    for (int g = 0; g < NG; g++) begin
      g_any_d[g] = 1'b0;
      g_pos_d[g] = '0;
      for (int b = GROUP - 1; b >= 0; b--) begin
        if (g * GROUP + b < N && hit[g * GROUP + b]) begin
          g_any_d[g] = 1'b1;
          g_pos_d[g] = GW'(b);
        end
      end
    end
  end

  logic          valid_d;
  logic [AW-1:0] addr_d;
  always_comb begin
    valid_d = 1'b0;
    addr_d  = '0;
    for (int g = NG - 1; g >= 0; g--) begin
      if (g_any_q[g]) begin
        valid_d = 1'b1;
        addr_d  = AW'(g * GROUP + int'(g_pos_q[g]));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      g_any_q <= '0;
      g_pos_q <= '0;
      valid   <= 1'b0;
      addr    <= '0;
    end else begin
      g_any_q <= g_any_d;
      g_pos_q <= g_pos_d;
      valid   <= valid_d;
      addr    <= addr_d;
    end
  end
endmodule
