// fcdd_th_select: QP-adaptive boundary threshold.
//
// The rate-distortion trade-off moves with the quantisation parameter, so the
// threshold the boundary correlation is compared with grows with QP. The four
// thresholds and the three QP break points are the published table
// (QP <= 27: 10, <= 32: 20, <= 37: 30, above: 50); they are parameters so
// that another table can be loaded. Purely combinational; the caller
// registers the result once per CTU. TH has the width of BC (8 bits); with
// the default table its two top bits are always zero.
module fcdd_th_select
  import fcdd_pkg::*;
#(
  parameter int unsigned QP_B0 = 27,
  parameter int unsigned QP_B1 = 32,
  parameter int unsigned QP_B2 = 37,
  parameter int unsigned TH_0  = 10,
  parameter int unsigned TH_1  = 20,
  parameter int unsigned TH_2  = 30,
  parameter int unsigned TH_3  = 50
) (
  input  logic [5:0] qp,   // 0 .. 51
  output th_t        th
);

  always_comb begin
    if (32'(qp) <= QP_B0)      th = TH_W'(TH_0);
    else if (32'(qp) <= QP_B1) th = TH_W'(TH_1);
    else if (32'(qp) <= QP_B2) th = TH_W'(TH_2);
    else                       th = TH_W'(TH_3);
  end

endmodule
