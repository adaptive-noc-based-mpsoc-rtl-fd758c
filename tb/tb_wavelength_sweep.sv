// tb_wavelength_sweep: the authentication data flow on the 4x4 MPSoC fabric
// with one region of an 8x8 window, at 64 and at 992 wavelengths, the two
// larger spectral sizes evaluated for the design.
//
// Two complete systems (each a default mpsoc_top with its behavioural task
// processors, see system_bench) run side by side, one per size. Each pixel
// is sent as one packet of NL 32-bit samples, so at 992 wavelengths a packet
// carries 1987 flits; the whole window (63488 words) would not fit in one
// packet and is never sent as one. Every distance result is checked against
// the reference model.
module tb_wavelength_sweep;
  bit done64, done992;
  int checks64, failures64, checks992, failures992;

  system_bench #(.NL(64),  .NP(64), .NR(1)) u_wl64  (.done(done64),  .checks(checks64),
                                                     .failures(failures64));
  system_bench #(.NL(992), .NP(64), .NR(1)) u_wl992 (.done(done992), .checks(checks992),
                                                     .failures(failures992));

  initial begin
    #10_000_000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks64 + checks992,
             failures64 + failures992 + 1);
    $finish;
  end

  initial begin
    wait (done64 && done992);
    $display("TB_RESULT checks=%0d failures=%0d", checks64 + checks992,
             failures64 + failures992);
    $finish;
  end
endmodule
