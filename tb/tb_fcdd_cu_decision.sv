// tb_fcdd_cu_decision: feeds the per-CU split flags of whole CTUs (8x8 level
// first, 64x64 last) into the decision register and checks the published
// flags and the CU size of every 8x8 block, found here by descending the
// quadtree from the pixel position of the block. Also checks that publishing
// a CTU clears the collected flags and that out_valid pulses once, one cycle
// after the 64x64 result.
module tb_fcdd_cu_decision;
  import fcdd_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         res_valid = 0, res_split = 0;
  logic [1:0]   res_level = 0;
  logic [5:0]   res_cu_idx = 0;
  logic         out_valid;
  split_flags_t out_flags;
  cu_log2_t     out_cu_log2 [NUM_BLK8];
  int checks = 0, failures = 0;
  int seen_size [7];
  int pulses = 0, cyc = 0, pulse_cyc = -1, top_cyc = -1;

  bit f [4][64];   // f[level][cu]

  fcdd_cu_decision dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_size(int px, int py);
    for (int l = 3; l >= 0; l--) begin
      int n = 8 << l;
      int idx = (py / n) * (64 / n) + (px / n);
      if (!f[l][idx]) return 3 + l;
    end
    return 2;
  endfunction

  task automatic send(int l, int idx, bit v);
    res_valid = 1; res_level = 2'(l); res_cu_idx = 6'(idx); res_split = v;
    @(negedge clk);
    res_valid = 0; res_split = $urandom;
    if ($urandom_range(1)) @(negedge clk);
  endtask

  task automatic run_ctu(int pct, bit only_top);
    @(negedge clk);
    for (int l = 0; l < 4; l++) begin
      int cnt = (64 >> (3 + l)) * (64 >> (3 + l));
      for (int i = 0; i < cnt; i++) begin
        f[l][i] = only_top ? 1'b0 : ($urandom_range(99) < pct);
        if (l == 3) f[l][i] = (pct > 0);
        if (!only_top || l == 3) send(l, i, f[l][i]);
      end
    end
    // out_valid must follow the 64x64 result by one cycle
    repeat (3) @(negedge clk);
    checks++;
    if (pulse_cyc != top_cyc + 1) begin
      failures++;
      $display("out_valid at %0d, 64x64 result at %0d", pulse_cyc, top_cyc);
    end
    checks++;
    if (out_flags.s64 != f[3][0]) failures++;
    for (int i = 0; i < 4; i++)  begin checks++; if (out_flags.s32[i] != f[2][i]) failures++; end
    for (int i = 0; i < 16; i++) begin checks++; if (out_flags.s16[i] != f[1][i]) failures++; end
    for (int i = 0; i < 64; i++) begin checks++; if (out_flags.s8[i]  != f[0][i]) failures++; end
    for (int b = 0; b < 64; b++) begin
      int e = exp_size((b % 8) * 8, (b / 8) * 8);
      checks++;
      seen_size[e]++;
      if (int'(out_cu_log2[b]) != e) begin
        failures++;
        if (failures < 10) $display("block %0d size %0d expected %0d", b, out_cu_log2[b], e);
      end
    end
  endtask

  // count out_valid pulses
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin pulses++; pulse_cyc <= cyc; end
    if (res_valid && res_level == 2'd3) top_cyc <= cyc;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_ctu(100, 0);
    run_ctu(100, 1);   // only the 64x64 flag sent: earlier flags must be gone
    for (int i = 0; i < 20; i++) run_ctu($urandom_range(100, 40), 0);
    run_ctu(0, 0);
    checks++;
    if (pulses != 23) begin failures++; $display("pulses %0d", pulses); end
    for (int s = 2; s <= 6; s++) begin
      checks++;
      if (seen_size[s] == 0) begin failures++; $display("size %0d never seen", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
