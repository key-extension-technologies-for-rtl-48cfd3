// tb_fcdd_addr_gen: runs the address generator over two CTUs and compares
// every issued vertical and horizontal address and tag with a sequence built
// here from the CU geometry (levels 8..64, CUs in raster order, N reads per
// CU). Checks the 960-cycle length, the done pulse on the last read, and
// that a start while busy is ignored.
module tb_fcdd_addr_gen;
  import fcdd_pkg::*;

  logic      clk = 0, rst_n = 0, start = 0;
  logic      valid, done;
  pix_addr_t v_addr, h_addr;
  bc_tag_t   tag;
  int checks = 0, failures = 0;

  typedef struct packed {
    pix_addr_t v;
    pix_addr_t h;
    bc_tag_t   t;
  } step_t;
  step_t exp_q [$];

  fcdd_addr_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build_expected();
    exp_q.delete();
    for (int l = 0; l < 4; l++) begin
      int n = 8 * (1 << l);
      int cnt = 64 / n;
      for (int m = 0; m < cnt; m++)
        for (int k = 0; k < cnt; k++)
          for (int j = 0; j < n; j++) begin
            step_t s;
            s.v.y = 6'(n * m + j);
            s.v.x = 6'(n * k + n / 2 - 1);
            if (j < n / 2) begin
              s.h.y = 6'(n * m + n / 2 - 1);
              s.h.x = 6'(n * k + 2 * j);
            end else begin
              s.h.y = 6'(n * m + n / 2);
              s.h.x = 6'(n * k + 2 * (j - n / 2));
            end
            s.t.level   = 2'(l);
            s.t.cu_idx  = 6'(m * cnt + k);
            s.t.first   = (j == 0);
            s.t.last    = (j == n - 1);
            s.t.h_lower = (j >= n / 2);
            exp_q.push_back(s);
          end
    end
  endtask

  task automatic run_ctu();
    int cycles = 0, dones = 0, idx = 0;
    build_expected();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (valid) begin
      step_t s = exp_q[idx];
      checks++;
      if (v_addr !== s.v || h_addr !== s.h || tag !== s.t) begin
        failures++;
        if (failures < 10)
          $display("step %0d: v=%h h=%h tag=%h expected v=%h h=%h tag=%h",
                   idx, v_addr, h_addr, tag, s.v, s.h, s.t);
      end
      if (done) begin
        dones++;
        checks++;
        if (idx != 959) failures++;
      end
      if (cycles == 100) start = 1;       // must be ignored while busy
      if (cycles == 101) start = 0;
      idx++;
      cycles++;
      @(negedge clk);
    end
    checks++;
    if (cycles != 960 || dones != 1) begin
      failures++;
      $display("cycles=%0d dones=%0d", cycles, dones);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (valid) failures++;
    run_ctu();
    repeat (4) @(negedge clk);
    checks++;
    if (valid) failures++;
    run_ctu();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
