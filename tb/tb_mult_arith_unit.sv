// tb_mult_arith_unit: the multiplier-based arithmetic unit with 1, 3, 9 and 4
// multipliers per 3x3 template (9, 3, 1 and 3 clocks per cell; with 4 the last
// clock uses one multiplier), each run by tb_au_run.
module tb_mult_arith_unit;
  import falcon_pkg::*;
  localparam int NR = 4;
  int ck [NR], fl [NR];
  bit dn [NR];
  int checks, failures;

  tb_au_run #(.ARITH(ARITH_MULT), .MULTS(1), .SEED(41)) u_run0 (.checks(ck[0]), .failures(fl[0]), .finished(dn[0]));
  tb_au_run #(.ARITH(ARITH_MULT), .MULTS(3), .SEED(42)) u_run1 (.checks(ck[1]), .failures(fl[1]), .finished(dn[1]));
  tb_au_run #(.ARITH(ARITH_MULT), .MULTS(9), .SEED(43)) u_run2 (.checks(ck[2]), .failures(fl[2]), .finished(dn[2]));
  tb_au_run #(.ARITH(ARITH_MULT), .MULTS(4), .SEED(44)) u_run3 (.checks(ck[3]), .failures(fl[3]), .finished(dn[3]));

  task automatic report(int extra);
    checks = 0; failures = extra;
    for (int i = 0; i < NR; i++) begin checks += ck[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    wait (dn[0] && dn[1] && dn[2] && dn[3]);
    report(0);
  end

  initial begin
    #500000;   // 50000 clocks of 10 time units
    $display("watchdog expired");
    report(1);
  end
endmodule
