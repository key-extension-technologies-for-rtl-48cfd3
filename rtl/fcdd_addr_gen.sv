// fcdd_addr_gen: state machine and read-address generator of the FCDD.
//
// After `start` it walks the CU levels 8x8, 16x16, 32x32 and 64x64 in that
// order, and inside a level the CUs in raster order (row of CUs m outer, CU k
// inner), as in the published algorithm. For a CU of size N at (k, m) it
// spends exactly N cycles and issues, every cycle, two pixel addresses:
//   vertical path   : row N*m + j, columns N*k + N/2 - 1 and N*k + N/2
//                     (the pair either side of the vertical centre line),
//                     walked from top to bottom, j = 0 .. N-1;
//   horizontal path : two neighbouring pixels of centre row N*m + N/2 - 1
//                     from left to right for N/2 cycles, then returning to
//                     the left edge and doing the same on row N*m + N/2.
// Both pairs lie in one memory word, so no transposed copy of the CTU is
// needed. A CTU takes 8*64 + 16*16 + 32*4 + 64*1 = 960 cycles, which is the
// published cycle budget of the vertical path with both paths in parallel.
//
// Outputs are combinational from the counters and valid while `valid` is high;
// `tag` says which CU and level the addresses belong to. `done` pulses in the
// cycle the last address is issued. A `start` while busy is ignored.
module fcdd_addr_gen
  import fcdd_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output logic      valid,
  output logic      done,
  output pix_addr_t v_addr,
  output pix_addr_t h_addr,
  output bc_tag_t   tag
);

  logic       busy;
  logic [1:0] level;
  logic [2:0] cu_m, cu_k;    // CU row and column inside the CTU
  logic [5:0] j;             // read index inside the CU

  logic [6:0] n;             // CU edge, 8 << level
  logic [5:0] half;          // N / 2
  logic [3:0] x_cnt;         // CUs per row/column, 8 >> level
  logic       last_j, last_k, last_m, last_lvl;

  always_comb begin
    n        = 7'd8 << level;
    half     = 6'(n >> 1);
    x_cnt    = 4'd8 >> level;
    last_j   = (7'(j) == n - 7'd1);
    last_k   = (4'(cu_k) == x_cnt - 4'd1);
    last_m   = (4'(cu_m) == x_cnt - 4'd1);
    last_lvl = (level == 2'(NUM_LEVELS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      level <= '0;
      cu_m  <= '0;
      cu_k  <= '0;
      j     <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        level <= '0;
        cu_m  <= '0;
        cu_k  <= '0;
        j     <= '0;
      end
    end else if (!last_j) begin
      j <= j + 6'd1;
    end else begin
      j <= '0;
      if (!last_k) begin
        cu_k <= cu_k + 3'd1;
      end else begin
        cu_k <= '0;
        if (!last_m) begin
          cu_m <= cu_m + 3'd1;
        end else begin
          cu_m <= '0;
          if (last_lvl) busy <= 1'b0;
          else          level <= level + 2'd1;
        end
      end
    end
  end

  // Addresses of the current cycle.
  logic [6:0] base_x, base_y;   // top-left pixel of the CU
  logic       lower;
  logic [5:0] jh;               // index along the centre row

  always_comb begin
    base_x = 7'(cu_k) * n;
    base_y = 7'(cu_m) * n;
    lower  = (j >= half);
    jh     = lower ? j - half : j;

    v_addr.y = 6'(base_y + 7'(j));
    v_addr.x = 6'(base_x + 7'(half) - 7'd1);

    h_addr.y = 6'(base_y + 7'(half) - (lower ? 7'd0 : 7'd1));
    h_addr.x = 6'(base_x + 7'({jh, 1'b0}));

    tag.level   = level;
    tag.cu_idx  = (6'(cu_m) << (3 - level)) | 6'(cu_k);
    tag.first   = (j == '0);
    tag.last    = last_j;
    tag.h_lower = lower;
  end

  assign valid = busy;
  assign done  = busy && last_j && last_k && last_m && last_lvl;

endmodule
