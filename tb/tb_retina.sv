// tb_retina: the 3-layer configuration used for the retina model: 28-bit
// states, 19-bit templates, distributed arithmetic two bit planes at a time,
// i.e. 14 clocks per cell update, all nine single-layer templates in use. The
// template radix point is placed separately for each layer (15, 10 and 5
// fraction bits, so the three layers' templates span different ranges). The
// retina templates themselves are not available, so random templates are
// used; a random 180 x 135 image, the retina input size, runs through the
// input pass and one iteration, each result compared with the reference model
// and the clocks per pass checked against 14 clocks per cell: 14 * 136 * 181
// = 344624 clocks per iteration, about 290 iterations per second at 100 MHz.
module tb_retina;
  int ck0, fl0;
  bit dn0;
  int checks, failures;

  tb_core_run #(.N(1), .LAYERS(3), .SW(28), .SFRAC(26), .CW(28), .CFRAC(24),
                .TW(19), .TFRAC(15), .TFRAC_L({8'd5, 8'd10, 8'd15}), .BPC(2), .W(256),
                .HIMG(135), .WIMG(180), .ITERS(1), .STALLS(1'b0), .TKIND(0), .SEED(31))
    u_retina (.checks(ck0), .failures(fl0), .finished(dn0));

  initial begin
    wait (dn0);
    checks = ck0; failures = fl0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;   // 1000000 clocks of 10 time units
    checks = ck0; failures = fl0 + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
