// fcdd_top: fast CU depth decision (FCDD) pre-processor for an intra
// HEVC / SHVC encoder.
//
// Before a 64x64 CTU is encoded, this block predicts which CU sizes are worth
// trying, so the encoder's recursive rate-distortion search can skip the
// others. CTUs arrive from frame memory as LOAD_PIX-pixel words in raster
// order (8 words per row at the default, leftmost pixel in the low byte) over
// a valid/ready handshake. Two CTU memories work as a ping-pong pair: while
// the boundary calculation reads one CTU, the next one is loaded into the
// other. When a CTU is complete its QP-dependent threshold is stored with it;
// the address generator then walks all CUs of 8x8, 16x16, 32x32 and 64x64,
// feeding the vertical-line and horizontal-line pixel pairs to the boundary
// calculation in parallel. Each CU gets a split flag; once the 64x64 CU's flag
// is out, `done` pulses and the flags and a per-8x8 CU size map are held on
// the outputs for the encoder.
//
// Timing: a CTU load takes 512 cycles at the default LOAD_PIX = 8 (one word
// per cycle while px_valid stays high); the boundary reads take 960 cycles
// and start the cycle after the CTU is complete, or one cycle after the
// previous CTU's reads end; `done` follows the last read by 3 cycles. With a
// continuous input stream one CTU finishes every 961 cycles, within the
// 1792-cycle budget of 4K/60 at 220 MHz and within 4K/60 at 120 MHz.
// px_ready is low only while both memories hold CTUs not yet read.
//
// The published architecture fixes the two-byte read word, the parallel
// vertical/horizontal processing, the 960-cycle read schedule and the QP
// table, and has the CTU loaded in parallel with the boundary calculation.
// The ping-pong pair, the load width, the load protocol and the output
// format are this design's own.
module fcdd_top
  import fcdd_pkg::*;
#(
  parameter int LOAD_PIX = 8    // pixels per load word (power of two, 2 .. 64)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [5:0]                qp,          // sampled with a CTU's last word
  input  logic                      px_valid,
  output logic                      px_ready,
  input  logic [LOAD_PIX*PIX_W-1:0] px_data,     // LOAD_PIX pixels of a row
  output logic                      busy,        // boundary reads in progress
  output logic                      done,        // one-cycle pulse per CTU
  output split_flags_t              split_flags, // per-CU split decisions
  output cu_log2_t                  cu_log2 [NUM_BLK8], // CU size per 8x8 block
  // per-CU result stream, for observation or a downstream mode decision
  output logic                      cu_valid,
  output logic [1:0]                cu_level,
  output logic [5:0]                cu_idx,
  output logic                      cu_split,
  output th_t                       cu_bc
);

  localparam int NWORDS = CTU_SIZE * CTU_SIZE / LOAD_PIX;
  localparam int WA     = $clog2(NWORDS);

  // ---------------- ping-pong bookkeeping ----------------
  logic          wr_bank, rd_bank;     // bank being loaded / read
  logic [1:0]    full;                 // bank holds a CTU not yet read
  th_t           bank_th [2];          // threshold stored with each CTU
  logic [WA-1:0] wr_cnt;
  logic          wr_en, load_last;
  logic          ag_start, ag_valid, ag_done;
  th_t           th_sel;

  assign px_ready  = !full[wr_bank];
  assign wr_en     = px_valid && px_ready;
  assign load_last = wr_en && (wr_cnt == WA'(NWORDS - 1));
  assign ag_start  = !ag_valid && full[rd_bank];
  assign busy      = ag_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank <= 1'b0;
      rd_bank <= 1'b0;
      full    <= '0;
      wr_cnt  <= '0;
      bank_th <= '{default: '0};
    end else begin
      if (wr_en) wr_cnt <= wr_cnt + 1'b1;   // wraps to 0 after the last word
      if (load_last) begin
        full[wr_bank]    <= 1'b1;
        bank_th[wr_bank] <= th_sel;
        wr_bank          <= !wr_bank;
      end
      if (ag_done) begin
        full[rd_bank] <= 1'b0;
        rd_bank       <= !rd_bank;
      end
    end
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> !(full[wr_bank]))
    else $error("fcdd_top: load into a CTU memory that has not been read");

  fcdd_th_select u_th (
    .qp (qp),
    .th (th_sel)
  );

  // ---------------- address generation ----------------
  pix_addr_t v_addr, h_addr;
  bc_tag_t   ag_tag;

  fcdd_addr_gen u_ag (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (ag_start),
    .valid  (ag_valid),
    .done   (ag_done),
    .v_addr (v_addr),
    .h_addr (h_addr),
    .tag    (ag_tag)
  );

  // ---------------- CTU memories ----------------
  logic [2*PIX_W-1:0] v_word [2], h_word [2];

  for (genvar g = 0; g < 2; g++) begin : g_bank
    ctu_memory #(
      .SIZE     (CTU_SIZE),
      .LOAD_PIX (LOAD_PIX)
    ) u_mem (
      .clk     (clk),
      .wr_en   (wr_en && (wr_bank == 1'(g))),
      .wr_addr (wr_cnt),
      .wr_data (px_data),
      .a_y     (v_addr.y),
      .a_x     (v_addr.x),
      .a_data  (v_word[g]),
      .b_y     (h_addr.y),
      .b_x     (h_addr.x),
      .b_data  (h_word[g])
    );
  end

  // The memories answer one cycle after the address: delay tag, bank and TH.
  logic    rd_valid, rd_sel;
  bc_tag_t rd_tag;
  th_t     rd_th;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_tag   <= '0;
      rd_sel   <= 1'b0;
      rd_th    <= '0;
    end else begin
      rd_valid <= ag_valid;
      rd_tag   <= ag_tag;
      rd_sel   <= rd_bank;
      rd_th    <= bank_th[rd_bank];
    end
  end

  logic [2*PIX_W-1:0] v_rd, h_rd;
  assign v_rd = v_word[rd_sel];
  assign h_rd = h_word[rd_sel];

  // ---------------- boundary calculation and decision ----------------
  fcdd_boundary_calc u_bc (
    .clk        (clk),
    .rst_n      (rst_n),
    .th         (rd_th),
    .in_valid   (rd_valid),
    .in_tag     (rd_tag),
    .v_d1       (v_rd[PIX_W-1:0]),
    .v_d2       (v_rd[2*PIX_W-1:PIX_W]),
    .h_d1       (h_rd[PIX_W-1:0]),
    .h_d2       (h_rd[2*PIX_W-1:PIX_W]),
    .res_valid  (cu_valid),
    .res_split  (cu_split),
    .res_level  (cu_level),
    .res_cu_idx (cu_idx),
    .res_bc     (cu_bc)
  );

  fcdd_cu_decision u_dec (
    .clk         (clk),
    .rst_n       (rst_n),
    .res_valid   (cu_valid),
    .res_split   (cu_split),
    .res_level   (cu_level),
    .res_cu_idx  (cu_idx),
    .out_valid   (done),
    .out_flags   (split_flags),
    .out_cu_log2 (cu_log2)
  );

endmodule
