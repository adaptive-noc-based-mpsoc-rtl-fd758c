// tb_mesh_sizes: the mesh at the sizes of the design-space exploration,
// 1x2, 1x3, 2x2, 2x3 and 3x3 (the 4x4 default is covered by tb_noc_mesh).
//
// One mesh_bench per size runs side by side: a corner-to-corner latency
// check (2 cycles per router on the XY path), then random traffic from every
// node with checks of delivery, integrity, per-source order and injection
// back-pressure. The processors would carry more than one task each on the
// smaller meshes; that only changes which packets are sent, not how the
// network carries them.
module tb_mesh_sizes;
  localparam int unsigned NS = 5;
  bit done [NS];
  int checks [NS], failures [NS];

  mesh_bench #(.MX(1), .MY(2), .NPKT(20)) u_1x2 (.done(done[0]), .checks(checks[0]), .failures(failures[0]));
  mesh_bench #(.MX(1), .MY(3), .NPKT(20)) u_1x3 (.done(done[1]), .checks(checks[1]), .failures(failures[1]));
  mesh_bench #(.MX(2), .MY(2), .NPKT(20)) u_2x2 (.done(done[2]), .checks(checks[2]), .failures(failures[2]));
  mesh_bench #(.MX(2), .MY(3), .NPKT(20)) u_2x3 (.done(done[3]), .checks(checks[3]), .failures(failures[3]));
  mesh_bench #(.MX(3), .MY(3), .NPKT(20)) u_3x3 (.done(done[4]), .checks(checks[4]), .failures(failures[4]));

  function automatic int total(input int v [NS]);
    int t = 0;
    for (int i = 0; i < NS; i++) t += v[i];
    return t;
  endfunction

  initial begin
    #2_000_000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule
