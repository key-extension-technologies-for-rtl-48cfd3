// fcdd_cu_decision: optimal-CU-size register of the FCDD.
//
// Collects the per-CU split flags the boundary calculation produces (64 for
// the 8x8 level, 16 for 16x16, 4 for 32x32, 1 for 64x64) and, when the
// 64x64 result arrives, which is the last of a CTU, publishes them together
// with a CU size map for the encoder: for each 8x8 block (raster order) the
// size of the CU that covers it, walking the quadtree from the top: the
// largest CU on the way down that is not flagged wins, and an 8x8 CU that is
// flagged becomes 4x4. The published algorithm only states that a flagged CU
// of size N gets size N/2 and that the result is stored in a register; the
// top-down quadtree reading is this design's own choice.
//
// Interface: result stream from fcdd_boundary_calc (res_*). out_valid pulses
// for one cycle, one cycle after the 64x64 result, with the CTU's flags and
// map; both are held until the next CTU completes. The collecting register is
// cleared as the CTU is published, so the next CTU starts from all zeros and
// its first results may follow immediately.
module fcdd_cu_decision
  import fcdd_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         res_valid,
  input  logic         res_split,
  input  logic [1:0]   res_level,
  input  logic [5:0]   res_cu_idx,
  output logic         out_valid,
  output split_flags_t out_flags,
  output cu_log2_t     out_cu_log2 [NUM_BLK8]
);

  split_flags_t flags, flags_nxt;

  always_comb begin
    flags_nxt = flags;
    if (res_valid) begin
      unique case (res_level)
        2'd0: flags_nxt.s8[res_cu_idx]        = res_split;
        2'd1: flags_nxt.s16[res_cu_idx[3:0]]  = res_split;
        2'd2: flags_nxt.s32[res_cu_idx[1:0]]  = res_split;
        2'd3: flags_nxt.s64                   = res_split;
      endcase
    end
  end

  // Quadtree walk for every 8x8 block b = by*8 + bx.
  cu_log2_t map_nxt [NUM_BLK8];

  always_comb begin
    for (int b = 0; b < NUM_BLK8; b++) begin
      logic [2:0] bx, by;
      bx = 3'(b % 8);
      by = 3'(b / 8);
      if (!flags_nxt.s64)                         map_nxt[b] = 3'd6;
      else if (!flags_nxt.s32[{by[2], bx[2]}])    map_nxt[b] = 3'd5;
      else if (!flags_nxt.s16[{by[2:1], bx[2:1]}]) map_nxt[b] = 3'd4;
      else if (!flags_nxt.s8[{by, bx}])           map_nxt[b] = 3'd3;
      else                                        map_nxt[b] = 3'd2;
    end
  end

  logic commit;
  assign commit = res_valid && (res_level == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags     <= '0;
      out_valid <= 1'b0;
      out_flags <= '0;
      for (int b = 0; b < NUM_BLK8; b++) out_cu_log2[b] <= 3'd6;
    end else begin
      out_valid <= commit;
      flags     <= commit ? '0 : flags_nxt;
      if (commit) begin
        out_flags <= flags_nxt;
        for (int b = 0; b < NUM_BLK8; b++) out_cu_log2[b] <= map_nxt[b];
      end
    end
  end

endmodule
