// tb_fcdd_top: end-to-end test of the FCDD pre-processor at its default
// size. Loads a series of 64x64 CTUs (random noise, quadtree-structured
// piecewise-flat pictures, a smooth ramp, and a picture whose 64x64 boundary
// difference equals TH exactly) at QPs covering all four threshold bands,
// with and without stalls on the pixel handshake. For each CTU it recomputes
// every CU's boundary correlation straight from the pixel array (column/row
// means either side of the centre lines, absolute differences, maximum,
// >= TH) and checks the per-CU BC values, the 85 split flags and the per-8x8
// CU size map. Timing: 960 read cycles per CTU, and every `done` exactly at
// max(previous done + 961, last word + 965) cycles (sampled on the clock), so
// loading overlaps the reads of the other CTU memory; the gap between CTUs on
// a continuous stream must stay within the 1792-cycle budget of 4K/60.
module tb_fcdd_top;
  import fcdd_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic [5:0]   qp = 22;
  logic         px_valid = 0, px_ready;
  logic [63:0]  px_data = 0;
  logic         busy, done;
  split_flags_t split_flags;
  cu_log2_t     cu_log2 [NUM_BLK8];
  logic         cu_valid, cu_split;
  logic [1:0]   cu_level;
  logic [5:0]   cu_idx;
  th_t          cu_bc;

  int checks = 0, failures = 0;
  int cyc = 0;

  fcdd_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- pictures and reference model ----------------
  int img [64][64];
  int ref_bc [4][64];
  bit ref_split [4][64];
  int cur_th;

  // mechanism counters
  int n_split_lvl [4], n_keep_lvl [4], n_band [4], n_size [7];
  int n_equal = 0, n_vdom = 0, n_hdom = 0, n_stall = 0, n_overlap = 0;

  function automatic int th_of(int q);
    return q <= 27 ? 10 : q <= 32 ? 20 : q <= 37 ? 30 : 50;
  endfunction

  function automatic int band_of(int q);
    return q <= 27 ? 0 : q <= 32 ? 1 : q <= 37 ? 2 : 3;
  endfunction

  function automatic int clip(int v);
    return v < 0 ? 0 : v > 255 ? 255 : v;
  endfunction

  // Equations (3.1)-(3.6): P(x, y), CU (k, m) 1-based, N = 2^(3+l).
  task automatic compute_ref(int th);
    for (int l = 0; l < 4; l++) begin
      int n = 1 << (3 + l);
      int cnt = 64 / n;
      for (int m = 1; m <= cnt; m++)
        for (int k = 1; k <= cnt; k++) begin
          int s1 = 0, s2 = 0, s3 = 0, s4 = 0, bcv, bch, bc;
          for (int j = 0; j < n; j++) begin
            s1 += img[j + n * (m - 1)][n / 2 - 1 + n * (k - 1)];
            s2 += img[j + n * (m - 1)][n / 2 + n * (k - 1)];
            s3 += img[n / 2 - 1 + n * (m - 1)][j + n * (k - 1)];
            s4 += img[n / 2 + n * (m - 1)][j + n * (k - 1)];
          end
          s1 = s1 >> (3 + l); s2 = s2 >> (3 + l); s3 = s3 >> (3 + l); s4 = s4 >> (3 + l);
          bcv = s1 > s2 ? s1 - s2 : s2 - s1;
          bch = s3 > s4 ? s3 - s4 : s4 - s3;
          bc  = bcv > bch ? bcv : bch;
          ref_bc[l][(m - 1) * cnt + (k - 1)]    = bc;
          ref_split[l][(m - 1) * cnt + (k - 1)] = (bc >= th);
          if (bc >= th) begin
            n_split_lvl[l]++;
            if (bcv > bch) n_vdom++;
            if (bch > bcv) n_hdom++;
          end else n_keep_lvl[l]++;
          if (bc == th) n_equal++;
        end
    end
  endtask

  // picture kinds
  task automatic fill_flat_region(int x0, int y0, int n, int depth, int noise);
    if (depth < 3 && $urandom_range(99) < 60) begin
      for (int q = 0; q < 4; q++)
        fill_flat_region(x0 + (q % 2) * n / 2, y0 + (q / 2) * n / 2, n / 2, depth + 1, noise);
    end else begin
      int v = $urandom_range(255);
      for (int y = y0; y < y0 + n; y++)
        for (int x = x0; x < x0 + n; x++) img[y][x] = clip(v + int'($urandom_range(2 * noise)) - noise);
    end
  endtask

  task automatic make_picture(int kind, int th);
    case (kind)
      0: for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) img[y][x] = $urandom_range(255);
      1: fill_flat_region(0, 0, 64, 0, 4);
      2: begin   // smooth ramp with noise: few splits
        for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++)
          img[y][x] = clip(x + y + 40 + $urandom_range(6));
      end
      default: begin // left half v, right half v + TH: BC of the 64x64 CU equals TH
        for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++)
          img[y][x] = (x < 32) ? 90 : 90 + th;
      end
    endcase
  endtask

  function automatic int ref_size(int px, int py);
    for (int l = 3; l >= 0; l--) begin
      int n = 8 << l;
      if (!ref_split[l][(py / n) * (64 / n) + px / n]) return 3 + l;
    end
    return 2;
  endfunction

  // compare the held outputs with ref_split
  task automatic check_outputs();
    int f = 0;
    checks++;
    if (split_flags.s64 != ref_split[3][0]) f++;
    for (int i = 0; i < 4; i++)  if (split_flags.s32[i] != ref_split[2][i]) f++;
    for (int i = 0; i < 16; i++) if (split_flags.s16[i] != ref_split[1][i]) f++;
    for (int i = 0; i < 64; i++) if (split_flags.s8[i]  != ref_split[0][i]) f++;
    if (f != 0) begin failures++; $display("%0d split flags differ", f); end
    for (int b = 0; b < 64; b++) begin
      int e = ref_size((b % 8) * 8, (b / 8) * 8);
      checks++;
      n_size[e]++;
      if (int'(cu_log2[b]) != e) begin
        failures++;
        if (failures < 10) $display("block %0d size %0d expected %0d", b, cu_log2[b], e);
      end
    end
  endtask

  // ---------------- driving ----------------
  typedef struct {
    int bc [4][64];
    bit split [4][64];
    int load_end;
    bit stalled;
  } ref_t;
  ref_t refs [$];

  int n_full = 0, n_backlog = 0, n_idle_start = 0, n_ctu_done = 0, max_gap = 0;
  int prev_done = -100000;
  int busy_cycles = 0, n_read_phases = 0;

  task automatic load_picture(bit stalls, output int end_cyc);
    int w = 0;
    while (w < 512) begin
      px_valid = stalls ? ($urandom_range(9) != 0) : 1'b1;
      for (int p = 0; p < 8; p++) px_data[8*p +: 8] = 8'(img[w / 8][8 * (w % 8) + p]);
      @(posedge clk);
      if (px_valid && px_ready) begin
        w++;
        if (w == 512) end_cyc = cyc;
        if (busy) n_overlap++;      // loading while the other memory is read
      end else if (!px_valid) n_stall++;
      else n_full++;                // both CTU memories occupied: held off
      #1;
    end
    px_valid = 0;
  endtask

  task automatic run_ctu(int kind, int q, bit stalls);
    int th = th_of(q);
    int end_cyc;
    ref_t r;
    qp = 6'(q);
    make_picture(kind, th);
    load_picture(stalls, end_cyc);
    compute_ref(th);
    r.bc = ref_bc;
    r.split = ref_split;
    r.load_end = end_cyc;
    r.stalled = stalls;
    refs.push_back(r);
    n_band[band_of(q)]++;
  endtask

  // per-CU results and per-CTU outputs, against the oldest loaded CTU
  always @(posedge clk) begin
    // length of each read phase: busy is low for at least one cycle between CTUs
    if (rst_n && busy) busy_cycles++;
    else if (busy_cycles != 0) begin
      checks++;
      n_read_phases++;
      if (busy_cycles != 960) begin
        failures++;
        $display("busy for %0d cycles, expected 960", busy_cycles);
      end
      busy_cycles = 0;
    end
    if (rst_n && cu_valid) begin
      checks++;
      if (refs.size() == 0) begin
        failures++;
        $display("CU result with no CTU loaded");
      end else if (int'(cu_bc) != refs[0].bc[cu_level][cu_idx] ||
                   cu_split != refs[0].split[cu_level][cu_idx]) begin
        failures++;
        if (failures < 10)
          $display("CU lvl %0d idx %0d: bc=%0d split=%0d expected bc=%0d split=%0d",
                   cu_level, cu_idx, cu_bc, cu_split,
                   refs[0].bc[cu_level][cu_idx], refs[0].split[cu_level][cu_idx]);
      end
    end
    if (rst_n && done) begin
      if (refs.size() == 0) begin
        failures++;
        $display("done with no CTU loaded");
      end else begin
        int expd;
        ref_t r;
        r = refs.pop_front();
        ref_split = r.split;
        check_outputs();
        expd = r.load_end + 965;
        if (prev_done + 961 > expd) begin
          expd = prev_done + 961;
          n_backlog++;                 // waited for the other CTU's reads
        end else n_idle_start++;
        checks++;
        if (cyc != expd) begin
          failures++;
          $display("done at %0d, expected %0d", cyc, expd);
        end
        if (!r.stalled && cyc - prev_done > max_gap && prev_done > 0) max_gap = cyc - prev_done;
        prev_done = cyc;
        n_ctu_done++;
      end
    end
  end

  initial begin
    int qps [8] = '{22, 30, 35, 45, 27, 28, 37, 38};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      if (i == 10) wait (refs.size() == 0);   // let the design go idle once
      run_ctu(i % 4, qps[i % 8], (i >= 4 && i < 8));
    end
    wait (refs.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (n_ctu_done != 16 || n_read_phases != 16) begin failures++; $display("%0d CTUs done, %0d read phases", n_ctu_done, n_read_phases); end
    checks++;
    if (max_gap > 1792) begin failures++; $display("CTU gap %0d cycles", max_gap); end
    // mechanism coverage
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (n_split_lvl[l] == 0 || n_keep_lvl[l] == 0) begin
        failures++; $display("level %0d: split %0d keep %0d", l, n_split_lvl[l], n_keep_lvl[l]);
      end
      checks++;
      if (n_band[l] == 0) begin failures++; $display("TH band %0d unused", l); end
    end
    for (int s = 2; s <= 6; s++) begin
      checks++;
      if (n_size[s] == 0) begin failures++; $display("CU size 2^%0d never chosen", s); end
    end
    checks++;
    if (n_full == 0 || n_backlog == 0 || n_idle_start < 2 || n_equal == 0 || n_vdom == 0 || n_hdom == 0 || n_stall == 0 || n_overlap == 0) begin
      failures++;
      $display("coverage: held=%0d backlog=%0d idle=%0d equal=%0d vdom=%0d hdom=%0d stall=%0d overlap=%0d",
               n_full, n_backlog, n_idle_start, n_equal, n_vdom, n_hdom, n_stall, n_overlap);
    end
    $display("CTUs waiting for the other memory %0d, started at once %0d, longest CTU gap %0d, load held off %0d cycles",
             n_backlog, n_idle_start, max_gap, n_full);
    $display("splits per level 8/16/32/64: %0d/%0d/%0d/%0d, BC==TH %0d, stalls %0d, overlaps %0d",
             n_split_lvl[0], n_split_lvl[1], n_split_lvl[2], n_split_lvl[3], n_equal, n_stall, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
