// tb_fcdd_boundary_calc: streams CUs of all four sizes into the boundary
// calculation, back to back and with idle gaps, and compares each result
// (BC and split flag) with the means, differences and maximum computed here
// from the same pixels. Each result must appear exactly two cycles after the
// CU's last word. TH changes between CUs, with no pause, every 25 CUs.
// Some CUs are built so that BC equals TH exactly, and so that the vertical
// or the horizontal difference dominates.
module tb_fcdd_boundary_calc;
  import fcdd_pkg::*;

  logic       clk = 0, rst_n = 0;
  th_t        th;
  logic       in_valid;
  bc_tag_t    in_tag;
  pixel_t     v_d1, v_d2, h_d1, h_d2;
  logic       res_valid, res_split;
  logic [1:0] res_level;
  logic [5:0] res_cu_idx;
  th_t        res_bc;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_eq = 0, n_vdom = 0, n_hdom = 0, n_split = 0, n_keep = 0;

  typedef struct {
    int due;
    int level;
    int cu;
    int bc;
    bit split;
  } exp_t;
  exp_t exp_q [$];

  fcdd_boundary_calc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  always @(negedge clk) begin
    if (rst_n && res_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected result");
      end else begin
        e = exp_q.pop_front();
        if (e.due != cyc || int'(res_level) != e.level || int'(res_cu_idx) != e.cu ||
            int'(res_bc) != e.bc || res_split != e.split) begin
          failures++;
          if (failures < 10)
            $display("cyc %0d: got lvl=%0d cu=%0d bc=%0d split=%0d; exp due %0d lvl=%0d cu=%0d bc=%0d split=%0d",
                     cyc, res_level, res_cu_idx, res_bc, res_split, e.due, e.level, e.cu, e.bc, e.split);
        end
      end
    end
  end

  function automatic int absd(int a, int b);
    return a > b ? a - b : b - a;
  endfunction

  // mode 0: random levels; 1: force BC == TH; 2: vertical edge; 3: horizontal edge
  task automatic send_cu(int level, int cu, int mode, bit gap);
    int n = 8 << level;
    int L[64], R[64], U[64], D[64];
    int sl = 0, sr = 0, su = 0, sd = 0;
    int bl, br, bu, bd, bcv, bch, bc;
    exp_t e;
    bl = $urandom_range(200); br = $urandom_range(200);
    bu = $urandom_range(200); bd = $urandom_range(200);
    if (mode == 1) begin
      // flat halves: vertical difference exactly TH, horizontal 0
      br = bl + int'(th); bu = 30; bd = 30;
    end else if (mode == 2) begin
      bu = bl; bd = bl; br = bl + 40 + $urandom_range(10);
    end else if (mode == 3) begin
      bl = bu; br = bu; bd = bu + 40 + $urandom_range(10);
    end
    for (int i = 0; i < n; i++) begin
      int noise = (mode == 1) ? 0 : 50;
      L[i] = bl + $urandom_range(noise); R[i] = br + $urandom_range(noise);
      U[i] = bu + $urandom_range(noise); D[i] = bd + $urandom_range(noise);
      if (L[i] > 255) L[i] = 255;
      if (R[i] > 255) R[i] = 255;
      if (U[i] > 255) U[i] = 255;
      if (D[i] > 255) D[i] = 255;
      sl += L[i]; sr += R[i]; su += U[i]; sd += D[i];
    end
    bcv = absd(sl / n, sr / n);
    bch = absd(su / n, sd / n);
    bc  = bcv > bch ? bcv : bch;
    if (bc == int'(th)) n_eq++;
    if (bcv > bch && bc >= int'(th)) n_vdom++;
    if (bch > bcv && bc >= int'(th)) n_hdom++;
    if (bc >= int'(th)) n_split++; else n_keep++;
    for (int j = 0; j < n; j++) begin
      in_valid       = 1;
      in_tag.level   = 2'(level);
      in_tag.cu_idx  = 6'(cu);
      in_tag.first   = (j == 0);
      in_tag.last    = (j == n - 1);
      in_tag.h_lower = (j >= n / 2);
      v_d1 = pixel_t'(L[j]);
      v_d2 = pixel_t'(R[j]);
      if (j < n / 2) begin
        h_d1 = pixel_t'(U[2 * j]); h_d2 = pixel_t'(U[2 * j + 1]);
      end else begin
        h_d1 = pixel_t'(D[2 * (j - n / 2)]); h_d2 = pixel_t'(D[2 * (j - n / 2) + 1]);
      end
      if (j == n - 1) begin
        e.due = cyc + 2; e.level = level; e.cu = cu; e.bc = bc; e.split = (bc >= int'(th));
        exp_q.push_back(e);
      end
      @(negedge clk);
    end
    if (gap) begin
      in_valid = 0;
      v_d1 = pixel_t'($urandom); h_d1 = pixel_t'($urandom);
      repeat ($urandom_range(3, 1)) @(negedge clk);
    end
  endtask

  initial begin
    in_valid = 0; in_tag = '0; v_d1 = 0; v_d2 = 0; h_d1 = 0; h_d2 = 0; th = 10;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      int mode;
      mode = (i % 10 == 3) ? 1 : (i % 10 == 5) ? 2 : (i % 10 == 7) ? 3 : 0;
      // TH changes between CUs with no drain: it belongs to the CU whose
      // last word it was sampled with
      case ((i / 25) % 4)
        0: th = 10; 1: th = 20; 2: th = 30; default: th = 50;
      endcase
      send_cu($urandom_range(3), $urandom_range(63), mode, (i % 3) == 0);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    checks++;
    if (n_eq == 0 || n_vdom == 0 || n_hdom == 0 || n_split == 0 || n_keep == 0) begin
      failures++;
      $display("coverage: eq=%0d vdom=%0d hdom=%0d split=%0d keep=%0d", n_eq, n_vdom, n_hdom, n_split, n_keep);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
