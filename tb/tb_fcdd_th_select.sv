// tb_fcdd_th_select: checks the QP-to-threshold table for every QP 0..63
// against the band edges written out independently below.
module tb_fcdd_th_select;
  import fcdd_pkg::*;

  logic [5:0] qp;
  th_t        th;
  int checks = 0, failures = 0;

  fcdd_th_select dut (.qp(qp), .th(th));

  function automatic int expected_th(int q);
    if (q < 28) return 10;
    if (q < 33) return 20;
    if (q < 38) return 30;
    return 50;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 64; q++) begin
      qp = 6'(q);
      #1;
      checks++;
      if (int'(th) != expected_th(q)) begin
        failures++;
        $display("qp=%0d th=%0d expected %0d", q, th, expected_th(q));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
