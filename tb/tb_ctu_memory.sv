// tb_ctu_memory: fills the CTU buffer with random pixels through the 8-pixel
// load port, then reads random (y, x) pairs, even and odd x, on both read
// ports at once and compares the two returned pixels with a plain pixel
// array. Also checks the one-cycle read latency.
module tb_ctu_memory;
  import fcdd_pkg::*;

  logic        clk = 0;
  logic        wr_en;
  logic [8:0]  wr_addr;
  logic [63:0] wr_data;
  logic [5:0]  a_y, a_x, b_y, b_x;
  logic [15:0] a_data, b_data;
  int checks = 0, failures = 0;
  int odd_reads = 0;

  pixel_t img [64][64];

  ctu_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] pair(int y, int x);
    return {img[y][(x + 1) % 64], img[y][x]};
  endfunction

  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0;
    a_y = 0; a_x = 0; b_y = 0; b_x = 0;
    for (int y = 0; y < 64; y++)
      for (int x = 0; x < 64; x++) img[y][x] = pixel_t'($urandom);
    @(negedge clk);
    for (int w = 0; w < 512; w++) begin
      wr_en   = 1;
      wr_addr = 9'(w);
      for (int p = 0; p < 8; p++) wr_data[8*p +: 8] = img[w / 8][8 * (w % 8) + p];
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < 3000; i++) begin
      int ay, ax, by, bx;
      ay = $urandom_range(63); ax = $urandom_range(62);
      by = $urandom_range(63); bx = $urandom_range(62);
      if (i < 64) begin ax = i % 63; bx = 62 - (i % 63); end
      a_y = 6'(ay); a_x = 6'(ax); b_y = 6'(by); b_x = 6'(bx);
      @(posedge clk); #1;
      // address changes after the edge must not disturb the registered data
      a_x = 6'($urandom); b_y = 6'($urandom);
      #1;
      checks++;
      if (a_data !== pair(ay, ax)) begin
        failures++;
        if (failures < 10) $display("A (%0d,%0d) got %h exp %h", ay, ax, a_data, pair(ay, ax));
      end
      checks++;
      if (b_data !== pair(by, bx)) begin
        failures++;
        if (failures < 10) $display("B (%0d,%0d) got %h exp %h", by, bx, b_data, pair(by, bx));
      end
      if (ax % 2 == 1) odd_reads++;
      @(negedge clk);
    end
    checks++;
    if (odd_reads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
