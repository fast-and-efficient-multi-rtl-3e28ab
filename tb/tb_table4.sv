// tb_table4: the image sizes of the single-core performance comparison,
// 180 x 135, 320 x 200 and 640 x 480, with one and with three layers, each on
// one core with 24-bit states, constants and templates and a fully parallel
// DA unit (one cell, all layers, per clock). The belt is widened to W = 640
// so that every size fits one core. Each run computes g and one iteration
// with random templates; every cell is checked against the reference model
// and the clocks of the iteration pass are checked against one cell per clock
// plus the (H+1)*(W+1) boundary steps. At 200 MHz, 180 x 135 then takes
// 136*181 = 24616 steps plus 3 clocks of pipeline, about 8120 iterations per second.
module tb_table4;
  localparam int NR = 6;
  int ck [NR], fl [NR];
  bit dn [NR];
  int checks, failures;

  tb_core_run #(.LAYERS(1), .SW(24), .SFRAC(22), .CW(24), .CFRAC(20), .TW(24), .TFRAC(20),
                .BPC(24), .W(640), .HIMG(135), .WIMG(180), .ITERS(1), .SEED(51))
    u_s1 (.checks(ck[0]), .failures(fl[0]), .finished(dn[0]));
  tb_core_run #(.LAYERS(1), .SW(24), .SFRAC(22), .CW(24), .CFRAC(20), .TW(24), .TFRAC(20),
                .BPC(24), .W(640), .HIMG(200), .WIMG(320), .ITERS(1), .SEED(52))
    u_m1 (.checks(ck[1]), .failures(fl[1]), .finished(dn[1]));
  tb_core_run #(.LAYERS(1), .SW(24), .SFRAC(22), .CW(24), .CFRAC(20), .TW(24), .TFRAC(20),
                .BPC(24), .W(640), .HIMG(480), .WIMG(640), .ITERS(1), .SEED(53))
    u_l1 (.checks(ck[2]), .failures(fl[2]), .finished(dn[2]));
  tb_core_run #(.LAYERS(3), .SW(24), .SFRAC(22), .CW(24), .CFRAC(20), .TW(24), .TFRAC(20),
                .BPC(24), .W(640), .HIMG(135), .WIMG(180), .ITERS(1), .SEED(54))
    u_s3 (.checks(ck[3]), .failures(fl[3]), .finished(dn[3]));
  tb_core_run #(.LAYERS(3), .SW(24), .SFRAC(22), .CW(24), .CFRAC(20), .TW(24), .TFRAC(20),
                .BPC(24), .W(640), .HIMG(200), .WIMG(320), .ITERS(1), .SEED(55))
    u_m3 (.checks(ck[4]), .failures(fl[4]), .finished(dn[4]));
  tb_core_run #(.LAYERS(3), .SW(24), .SFRAC(22), .CW(24), .CFRAC(20), .TW(24), .TFRAC(20),
                .BPC(24), .W(640), .HIMG(480), .WIMG(640), .ITERS(1), .SEED(56))
    u_l3 (.checks(ck[5]), .failures(fl[5]), .finished(dn[5]));

  task automatic report(int extra);
    checks = 0; failures = extra;
    for (int i = 0; i < NR; i++) begin checks += ck[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4] && dn[5]);
    report(0);
  end

  initial begin
    #20000000;   // 2000000 clocks of 10 time units
    $display("watchdog expired");
    report(1);
  end
endmodule
