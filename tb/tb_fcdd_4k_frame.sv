// tb_fcdd_4k_frame: streams one whole 3840x2160 frame through the FCDD
// pre-processor at its default size, CTU by CTU in raster order (60 x 34
// CTUs; the last CTU row is padded by repeating picture row 2159, as an
// encoder pads a picture to whole CTUs). The picture is generated from the
// pixel coordinates: flat regions of random size and level, a few ramps and
// some noise, so that every CU size occurs. QP changes per CTU row over
// 22, 27, 32 and 37. Every CTU's 85 split flags and 64 CU sizes are
// compared with the boundary-correlation equations evaluated on the picture
// here, and every CTU must finish 961 cycles after the previous one. The
// frame must complete within 2,000,000 cycles: one frame period at 60 fps
// with a 120 MHz clock.
module tb_fcdd_4k_frame;
  import fcdd_pkg::*;

  localparam int W = 3840, H = 2160;
  localparam int CX = W / 64, CY = (H + 63) / 64;
  localparam int NCTU = CX * CY;

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
    repeat (2200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- synthetic picture ----------------
  function automatic int hash(int a, int b, int c);
    int unsigned h;
    h = int'(a) * 32'd73856093 ^ int'(b) * 32'd19349663 ^ int'(c) * 32'd83492791;
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    return int'(h ^ (h >> 16)) & 32'h7fffffff;
  endfunction

  // Luma at (x, y): the picture is tiled by 48x40 and 20x12 rectangles whose
  // levels come from a hash, with a horizontal ramp in some tiles and small
  // noise everywhere.
  function automatic int pix(int x, int y);
    int v, t1, t2;
    if (y >= H) y = H - 1;
    t1 = hash(x / 48, y / 40, 1);
    t2 = hash(x / 20, y / 12, 2);
    v  = t1 % 200;
    if (t1 % 5 == 0) v = v / 2 + (x % 48);          // ramp
    if (t2 % 7 == 0) v = v + (t2 % 60) - 30;        // small detail
    v += hash(x, y, 3) % 5;
    return v < 0 ? 0 : v > 255 ? 255 : v;
  endfunction

  function automatic int th_of(int q);
    return q <= 27 ? 10 : q <= 32 ? 20 : q <= 37 ? 30 : 50;
  endfunction

  // ---------------- reference ----------------
  typedef struct {
    bit split [4][64];
    int load_end;
  } ref_t;
  ref_t refs [$];
  int n_size [7];

  task automatic reference(int x0, int y0, int th, inout ref_t r);
    for (int l = 0; l < 4; l++) begin
      int n = 8 << l;
      int cnt = 64 / n;
      for (int m = 0; m < cnt; m++)
        for (int k = 0; k < cnt; k++) begin
          int s1 = 0, s2 = 0, s3 = 0, s4 = 0, bcv, bch;
          int xb = x0 + n * k, yb = y0 + n * m;
          for (int j = 0; j < n; j++) begin
            s1 += pix(xb + n / 2 - 1, yb + j);
            s2 += pix(xb + n / 2,     yb + j);
            s3 += pix(xb + j, yb + n / 2 - 1);
            s4 += pix(xb + j, yb + n / 2);
          end
          s1 >>= 3 + l; s2 >>= 3 + l; s3 >>= 3 + l; s4 >>= 3 + l;
          bcv = s1 > s2 ? s1 - s2 : s2 - s1;
          bch = s3 > s4 ? s3 - s4 : s4 - s3;
          r.split[l][m * cnt + k] = ((bcv > bch ? bcv : bch) >= th);
        end
    end
  endtask

  function automatic int size_of(ref_t r, int b);
    int px = (b % 8) * 8, py = (b / 8) * 8;
    for (int l = 3; l >= 0; l--) begin
      int n = 8 << l;
      if (!r.split[l][(py / n) * (64 / n) + px / n]) return 3 + l;
    end
    return 2;
  endfunction

  // ---------------- checking ----------------
  int prev_done = -1, n_done = 0, first_word = -1, last_done = 0;

  always @(posedge clk) begin
    if (rst_n && done) begin
      if (refs.size() == 0) begin
        failures++;
        $display("done with no CTU loaded");
      end else begin
        ref_t r;
        int f, expd;
        f = 0;
        r = refs.pop_front();
        if (split_flags.s64 != r.split[3][0]) f++;
        for (int i = 0; i < 4; i++)  if (split_flags.s32[i] != r.split[2][i]) f++;
        for (int i = 0; i < 16; i++) if (split_flags.s16[i] != r.split[1][i]) f++;
        for (int i = 0; i < 64; i++) if (split_flags.s8[i]  != r.split[0][i]) f++;
        for (int b = 0; b < 64; b++) begin
          int e;
          e = size_of(r, b);
          n_size[e]++;
          if (int'(cu_log2[b]) != e) f++;
        end
        checks++;
        if (f != 0) begin
          failures++;
          if (failures < 10) $display("CTU %0d: %0d flags/sizes differ", n_done, f);
        end
        expd = r.load_end + 965;
        if (prev_done >= 0 && prev_done + 961 > expd) expd = prev_done + 961;
        checks++;
        if (cyc != expd) begin
          failures++;
          if (failures < 10) $display("CTU %0d done at %0d, expected %0d", n_done, cyc, expd);
        end
        prev_done = cyc;
        last_done = cyc;
        n_done++;
      end
    end
  end

  // ---------------- driving ----------------
  initial begin
    int qps [4] = '{22, 27, 32, 37};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cy = 0; cy < CY; cy++)
      for (int cx = 0; cx < CX; cx++) begin
        ref_t r;
        int w;
        w = 0;
        qp = 6'(qps[cy % 4]);
        while (w < 512) begin
          px_valid = 1;
          for (int p = 0; p < 8; p++)
            px_data[8*p +: 8] = 8'(pix(cx * 64 + 8 * (w % 8) + p, cy * 64 + w / 8));
          @(posedge clk);
          if (px_ready) begin
            if (first_word < 0) first_word = cyc;
            w++;
            if (w == 512) r.load_end = cyc;
          end
          #1;
        end
        px_valid = 0;
        reference(cx * 64, cy * 64, th_of(qps[cy % 4]), r);
        refs.push_back(r);
      end
    wait (refs.size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (n_done != NCTU) begin failures++; $display("%0d of %0d CTUs done", n_done, NCTU); end
    checks++;
    if (last_done - first_word > 2000000) begin
      failures++;
      $display("frame took %0d cycles, more than 2,000,000", last_done - first_word);
    end
    for (int s = 2; s <= 6; s++) begin
      checks++;
      if (n_size[s] == 0) begin failures++; $display("CU size 2^%0d never chosen", s); end
    end
    $display("%0d CTUs in %0d cycles (%0.1f MHz needed for 60 fps); CU sizes 4/8/16/32/64 per 8x8 block: %0d/%0d/%0d/%0d/%0d",
             n_done, last_done - first_word, (last_done - first_word) * 60.0 / 1.0e6,
             n_size[2], n_size[3], n_size[4], n_size[5], n_size[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
