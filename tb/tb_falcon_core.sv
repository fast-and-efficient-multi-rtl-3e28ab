// tb_falcon_core: self-checking test of one Falcon-ML core (3 layers, 3x3
// templates, 12-bit states, 3 bit planes per clock = 4 clocks per cell) with
// random images and templates, once with a steady stream (rate checked) and
// once with random input gaps and output back-pressure. A third run uses the
// multiplier unit (3 multipliers, 3 clocks per cell) with gaps and
// back-pressure, and places the template radix point differently for each
// layer (7, 5 and 3 fraction bits).
module tb_falcon_core;
  int ck0, fl0, ck1, fl1, ck2, fl2;
  bit dn0, dn1, dn2;
  int checks, failures;

  tb_core_run #(.N(1), .LAYERS(3), .SW(12), .SFRAC(10), .CW(12), .CFRAC(8),
                .TW(10), .TFRAC(7), .BPC(3), .W(16), .HIMG(6), .WIMG(11),
                .ITERS(2), .STALLS(1'b0), .SEED(11))
    u_steady (.checks(ck0), .failures(fl0), .finished(dn0));
  tb_core_run #(.N(1), .LAYERS(3), .SW(12), .SFRAC(10), .CW(12), .CFRAC(8),
                .TW(10), .TFRAC(7), .BPC(3), .W(16), .HIMG(5), .WIMG(16),
                .ITERS(2), .STALLS(1'b1), .SEED(12))
    u_stall (.checks(ck1), .failures(fl1), .finished(dn1));
  tb_core_run #(.N(1), .LAYERS(3), .SW(12), .SFRAC(10), .CW(12), .CFRAC(8),
                .TW(10), .TFRAC(7), .TFRAC_L({8'd3, 8'd5, 8'd7}),
                .ARITH(falcon_pkg::ARITH_MULT), .W(16), .HIMG(7), .WIMG(9),
                .ITERS(2), .STALLS(1'b1), .SEED(13))
    u_mult (.checks(ck2), .failures(fl2), .finished(dn2));

  initial begin
    wait (dn0 && dn1 && dn2);
    checks = ck0 + ck1 + ck2; failures = fl0 + fl1 + fl2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    checks = ck0 + ck1 + ck2; failures = fl0 + fl1 + fl2 + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
