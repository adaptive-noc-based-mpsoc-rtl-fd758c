// tb_noc_mesh: self-checking test of the 4x4 mesh of routing nodes.
//
// Runs mesh_bench at the default size: the corner-to-corner latency of a lone
// packet (14 cycles), then random traffic from all 16 nodes (20 packets each)
// with checks of delivery, integrity, per-source order and back-pressure.
// This wrapper adds the watchdog and prints the verdict.
module tb_noc_mesh;
  bit done;
  int checks, failures;

  mesh_bench #(.MX(4), .MY(4), .NPKT(20)) u_bench (.done(done), .checks(checks),
                                                   .failures(failures));

  initial begin
    #2_000_000;
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
