// tb_mpsoc_top: end-to-end test of the MPSoC fabric (4x4 mesh, default
// parameters) running the data-flow graph of the art-authentication algorithm
// on four regions of 16 wavelengths with an 8x8 window.
//
// All the work is in system_bench: fifteen behavioural task processors placed
// as in the design's task mapping, the testbench acting as master processor,
// distance results checked against a reference model, and counters showing
// that pipelining over regions, task parallelism between the original and
// compared image paths, network back-pressure and receive back-pressure all
// occurred. This wrapper adds the watchdog and prints the verdict.
module tb_mpsoc_top;
  bit done;
  int checks, failures;

  system_bench #(.NL(16), .NP(64), .NR(4)) u_bench (.done(done), .checks(checks),
                                                     .failures(failures));

  initial begin
    #5_000_000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
