// tb_halftone: the 5x5 halftoning example on single cores with the
// multiplier-based arithmetic unit with 3 multipliers (ceil(25/3) = 9 clocks
// per cell, checked), in the two configurations of the example: 16-bit
// states with 8-bit templates, and 8-bit states with 8-bit templates.
// Time step h = 25/128, so A' = (1-h)*I + h*A and B' = h*B in 8-bit templates
// with 7 fraction bits. A random grey-level 14 x 12 image is used as input and
// initial state; after the input pass, 100 Euler iterations run and every
// result is compared with the reference model.
// The 8-bit configuration also runs on four cores, a 2 x 2 array
// (tb_array_run): a 12 x 56 image in two 32-wide stripes, 50 passes of two
// Euler steps each, every cell compared with the reference model.
module tb_halftone;
  int ck0, fl0, ck1, fl1, ck2, fl2, clk2;
  bit dn0, dn1, dn2;
  int checks, failures;

  tb_core_run #(.N(2), .LAYERS(1), .SW(16), .SFRAC(14), .CW(16), .CFRAC(13),
                .TW(8), .TFRAC(7), .ARITH(falcon_pkg::ARITH_MULT), .MULTS(3), .W(32),
                .HIMG(12), .WIMG(14), .ITERS(100), .STALLS(1'b0), .TKIND(1), .SEED(21))
    u_16bit (.checks(ck0), .failures(fl0), .finished(dn0));
  tb_core_run #(.N(2), .LAYERS(1), .SW(8), .SFRAC(6), .CW(8), .CFRAC(5),
                .TW(8), .TFRAC(7), .ARITH(falcon_pkg::ARITH_MULT), .MULTS(3), .W(32),
                .HIMG(12), .WIMG(14), .ITERS(100), .STALLS(1'b0), .TKIND(1), .SEED(22))
    u_8bit (.checks(ck1), .failures(fl1), .finished(dn1));
  tb_array_run #(.N(2), .SW(8), .SFRAC(6), .CW(8), .CFRAC(5), .TW(8), .TFRAC(7),
                 .ARITH(falcon_pkg::ARITH_MULT), .MULTS(3), .W(32), .H(12),
                 .PASSES(50), .TKIND(1), .SEED(23))
    u_8bit_array (.checks(ck2), .failures(fl2), .finished(dn2), .clocks(clk2));

  initial begin
    wait (dn0 && dn1 && dn2);
    checks = ck0 + ck1 + ck2; failures = fl0 + fl1 + fl2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;   // 1000000 clocks of 10 time units
    checks = ck0 + ck1 + ck2; failures = fl0 + fl1 + fl2 + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
