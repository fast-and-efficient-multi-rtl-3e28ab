// tb_falcon_array: end-to-end test of the processor array at its default
// parameters (2 x 2 cores, 3x3 templates, 24-bit values, one cell per clock,
// 256-cell stripes), run by tb_array_run.
//
// A random 16 x 508 image is cut into two overlapping 256-wide stripes, one
// per processor column (overlap ROWS*N = 2 columns on each inner side). An
// input pass computes g, then two iteration passes each perform ROWS = 2
// Euler iterations; every cell is compared with the reference model applied to
// the whole image. Column 0 streams without gaps and its clocks per pass are
// checked against one cell per clock; column 1 has random input gaps and
// output back-pressure.
module tb_falcon_array;
  int checks, failures, clocks;
  bit done;

  tb_array_run #(.SEED(7)) u_run (.checks, .failures, .finished(done), .clocks);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;   // 200000 clocks of 10 time units
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
