// ctu_memory: 64x64-pixel CTU buffer with a wide write port and two
// two-pixel read ports.
//
// The boundary calculation needs, every cycle, two horizontally neighbouring
// pixels for the vertical-line path and two more for the horizontal-line
// path. The buffer hands each path one two-byte word per address, so the
// vertical centre columns can be read row by row without a transposed copy of
// the CTU. A vertical centre pair (x = N/2-1, N/2) starts at an odd column,
// so a word may begin at any column: the pixels are kept in an even-column
// bank and an odd-column bank, and a read at (y, x) takes pixel x from one bank
// and pixel x+1 from the other. Each bank entry holds LOAD_PIX/2 pixels of a
// row, so a load word of LOAD_PIX pixels fills one entry of each bank.
// (The two-byte read word and the two parallel reads follow the published
// architecture; the bank split and the load width are this design's own. A
// load of 8 pixels per cycle keeps loading plus boundary reads of a CTU
// within the 1792-cycle budget of 4K/60 real-time coding.)
//
// Write port: one aligned load word per cycle, pixels LOAD_PIX*i ..
// LOAD_PIX*i + LOAD_PIX-1 of a row, word index y * SIZE/LOAD_PIX + i, lowest
// byte = leftmost pixel. Read ports A and B: a pixel address, data one cycle
// later, rd_d[7:0] = pixel x, rd_d[15:8] = pixel x+1 (x+1 wraps to column 0
// at the right edge; the FCDD reads never ask for it).
module ctu_memory
  import fcdd_pkg::*;
#(
  parameter int SIZE     = CTU_SIZE,   // CTU edge in pixels, a power of two
  parameter int LOAD_PIX = 8           // pixels per write word, 2 .. SIZE, power of two
) (
  input  logic                                  clk,
  input  logic                                  wr_en,
  input  logic [$clog2(SIZE*SIZE/LOAD_PIX)-1:0] wr_addr,
  input  logic [LOAD_PIX*PIX_W-1:0]             wr_data,
  input  logic [$clog2(SIZE)-1:0]               a_y,
  input  logic [$clog2(SIZE)-1:0]               a_x,
  output logic [2*PIX_W-1:0]                    a_data,
  input  logic [$clog2(SIZE)-1:0]               b_y,
  input  logic [$clog2(SIZE)-1:0]               b_x,
  output logic [2*PIX_W-1:0]                    b_data
);

  localparam int AW    = $clog2(SIZE);
  localparam int LANES = LOAD_PIX / 2;                 // pixels per bank entry
  localparam int LW    = (LANES > 1) ? $clog2(LANES) : 1;
  localparam int DEPTH = SIZE * SIZE / LOAD_PIX;       // entries per bank
  localparam int EW    = $clog2(DEPTH);

  typedef logic [LANES*PIX_W-1:0] entry_t;

  entry_t even_bank [DEPTH];
  entry_t odd_bank  [DEPTH];

  // Pixel x of a row lives in bank x[0], at bank column x/2; bank column c is
  // lane c % LANES of entry c / LANES.
  entry_t even_lo, even_hi;   // unpacked load word, per bank
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      even_lo[i*PIX_W +: PIX_W] = wr_data[(2*i)*PIX_W +: PIX_W];
      even_hi[i*PIX_W +: PIX_W] = wr_data[(2*i+1)*PIX_W +: PIX_W];
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      even_bank[wr_addr] <= even_lo;
      odd_bank[wr_addr]  <= even_hi;
    end
  end

  // One read port: bank columns of the two pixels, entry reads, lane select.
  typedef struct packed {
    logic [EW-1:0] even_e;
    logic [LW-1:0] even_l;
    logic [EW-1:0] odd_e;
    logic [LW-1:0] odd_l;
  } rd_loc_t;

  function automatic rd_loc_t locate(logic [AW-1:0] y, logic [AW-1:0] x);
    logic [AW-2:0] ce, co;        // bank columns
    logic [AW+AW-2:0] fe, fo;     // flat bank positions y * SIZE/2 + column
    rd_loc_t r;
    co = x[AW-1:1];
    ce = x[AW-1:1] + (AW-1)'(x[0]);   // odd x: the right pixel is in the next even column
    fe = {y, ce};
    fo = {y, co};
    r.even_e = EW'(fe / (AW+AW-1)'(LANES));
    r.even_l = LW'(fe % (AW+AW-1)'(LANES));
    r.odd_e  = EW'(fo / (AW+AW-1)'(LANES));
    r.odd_l  = LW'(fo % (AW+AW-1)'(LANES));
    return r;
  endfunction

  function automatic pixel_t lane(entry_t e, logic [LW-1:0] l);
    return e[l*PIX_W +: PIX_W];
  endfunction

  rd_loc_t       a_loc, b_loc;
  logic [LW-1:0] a_el_q, a_ol_q, b_el_q, b_ol_q;   // lanes, registered
  entry_t  a_even, a_odd, b_even, b_odd;
  logic    a_swap, b_swap;

  assign a_loc = locate(a_y, a_x);
  assign b_loc = locate(b_y, b_x);

  always_ff @(posedge clk) begin
    a_even  <= even_bank[a_loc.even_e];
    a_odd   <= odd_bank[a_loc.odd_e];
    a_el_q  <= a_loc.even_l;
    a_ol_q  <= a_loc.odd_l;
    a_swap  <= a_x[0];
    b_even  <= even_bank[b_loc.even_e];
    b_odd   <= odd_bank[b_loc.odd_e];
    b_el_q  <= b_loc.even_l;
    b_ol_q  <= b_loc.odd_l;
    b_swap  <= b_x[0];
  end

  pixel_t a_ep, a_op, b_ep, b_op;
  assign a_ep = lane(a_even, a_el_q);
  assign a_op = lane(a_odd,  a_ol_q);
  assign b_ep = lane(b_even, b_el_q);
  assign b_op = lane(b_odd,  b_ol_q);

  assign a_data = a_swap ? {a_ep, a_op} : {a_op, a_ep};
  assign b_data = b_swap ? {b_ep, b_op} : {b_op, b_ep};

endmodule
