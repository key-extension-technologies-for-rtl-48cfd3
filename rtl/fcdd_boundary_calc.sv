// fcdd_boundary_calc: three-stage boundary correlation datapath of the FCDD.
//
// For a CU of size N = 8 << level it receives, one pair per cycle, the N rows
// of the two columns either side of the vertical centre line (v_d1 left,
// v_d2 right) and, in parallel, the two centre rows two pixels at a time
// (upper row for N/2 cycles, then the lower row for N/2 cycles). It forms
//   bc1, bc2 = mean of the left / right centre column
//   bc3, bc4 = mean of the upper / lower centre row
//   bcV = |bc1 - bc2|, bcH = |bc3 - bc4|, BC = max(bcV, bcH)
// where a mean is the N-pixel sum shifted right by log2 N, and flags the CU
// for a split when BC >= TH.
//
// Stage 1 (N cycles per CU): running sums. The vertical path adds v_d1 and
//   v_d2 into two accumulators. The horizontal path adds both pixels of a
//   word into one accumulator; when it turns back to the lower row the upper
//   sum is parked in a wait register.
// Stage 2 (1 cycle): the four sums are registered together, lining the
//   vertical result up with the horizontal one.
// Stage 3 (1 cycle): shift to means, absolute differences, maximum, compare
//   with TH, register the result.
// A new CU may follow the previous one with no gap; the result of a CU
// appears two cycles after its last input word (tag.last). TH is taken with
// the last word of each CU, so consecutive CTUs with different QPs may follow
// each other without draining the pipeline. The stage split
// and the compare follow the published architecture; the exact register
// placement is this design's own. The published text says both "larger than
// TH" and (in its algorithm listing) "BC >= TH"; the listing is followed.
module fcdd_boundary_calc
  import fcdd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  th_t        th,         // threshold, sampled with each CU's last word
  input  logic       in_valid,
  input  bc_tag_t    in_tag,
  input  pixel_t     v_d1,       // left pixel of the vertical centre pair
  input  pixel_t     v_d2,       // right pixel of the vertical centre pair
  input  pixel_t     h_d1,       // first pixel of a horizontal-row word
  input  pixel_t     h_d2,       // second pixel of a horizontal-row word
  output logic       res_valid,
  output logic       res_split,  // BC >= TH
  output logic [1:0] res_level,
  output logic [5:0] res_cu_idx,
  output th_t        res_bc      // BC = max(bcV, bcH)
);

  // ---------------- stage 1: accumulate ----------------
  sum_t acc_v1, acc_v2, acc_h, hu_wait;
  logic prev_lower;

  sum_t nxt_v1, nxt_v2, nxt_h;
  logic turn;                      // first cycle on the lower centre row

  always_comb begin
    turn   = in_tag.h_lower && !prev_lower;
    nxt_v1 = (in_tag.first ? '0 : acc_v1) + SUM_W'(v_d1);
    nxt_v2 = (in_tag.first ? '0 : acc_v2) + SUM_W'(v_d2);
    nxt_h  = ((in_tag.first || turn) ? '0 : acc_h) + SUM_W'(h_d1) + SUM_W'(h_d2);
  end

  // stage 2 registers
  logic       s2_valid;
  logic [1:0] s2_level;
  logic [5:0] s2_cu;
  th_t        s2_th;
  sum_t       s2_v1, s2_v2, s2_hu, s2_hl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_v1     <= '0;
      acc_v2     <= '0;
      acc_h      <= '0;
      hu_wait    <= '0;
      prev_lower <= 1'b0;
      s2_valid   <= 1'b0;
      s2_level   <= '0;
      s2_cu      <= '0;
      s2_th      <= '0;
      s2_v1      <= '0;
      s2_v2      <= '0;
      s2_hu      <= '0;
      s2_hl      <= '0;
    end else begin
      s2_valid <= in_valid && in_tag.last;
      if (in_valid) begin
        acc_v1     <= nxt_v1;
        acc_v2     <= nxt_v2;
        acc_h      <= nxt_h;
        prev_lower <= in_tag.h_lower;
        if (turn) hu_wait <= acc_h;
        if (in_tag.last) begin
          s2_level <= in_tag.level;
          s2_cu    <= in_tag.cu_idx;
          s2_th    <= th;
          s2_v1    <= nxt_v1;
          s2_v2    <= nxt_v2;
          s2_hu    <= turn ? acc_h : hu_wait;
          s2_hl    <= nxt_h;
        end
      end
    end
  end

  // ---------------- stage 3: mean, difference, compare ----------------
  th_t bc1, bc2, bc3, bc4, bcv, bch, bc;
  logic [3:0] sh;

  always_comb begin
    sh  = 4'(MIN_LOG2) + 4'(s2_level);
    bc1 = TH_W'(s2_v1 >> sh);
    bc2 = TH_W'(s2_v2 >> sh);
    bc3 = TH_W'(s2_hu >> sh);
    bc4 = TH_W'(s2_hl >> sh);
    bcv = (bc1 > bc2) ? bc1 - bc2 : bc2 - bc1;
    bch = (bc3 > bc4) ? bc3 - bc4 : bc4 - bc3;
    bc  = (bcv > bch) ? bcv : bch;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid  <= 1'b0;
      res_split  <= 1'b0;
      res_level  <= '0;
      res_cu_idx <= '0;
      res_bc     <= '0;
    end else begin
      res_valid <= s2_valid;
      if (s2_valid) begin
        res_split  <= (bc >= s2_th);
        res_level  <= s2_level;
        res_cu_idx <= s2_cu;
        res_bc     <= bc;
      end
    end
  end

  // A CU's words arrive back to back: after the last word of a CU the next
  // valid word starts a new CU.
  logic expect_first;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        expect_first <= 1'b1;
    else if (in_valid) expect_first <= in_tag.last;
  end

  a_first_after_last: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (in_tag.first == expect_first))
    else $error("boundary_calc: CU framing broken");

endmodule
