// tb_fdas_top_n1024: end-to-end test of the FDAS engine with the design's
// 1024-point FFT, 421-tap filters, 85 filters and 8 lane pairs (six template
// iterations per segment), on a 1208-bin spectrum: two full overlap-save
// segments, the second one zero padded. The harmonic summer searches
// fundamental bins 100..104 with up to eight harmonics. Inputs are near full
// scale and the power is not shifted, so the FOP keeps full precision. See fdas_top_e2e.
module tb_fdas_top_n1024;
  fdas_top_e2e #(.N(1024), .TAPS(421), .NF(85), .LP(8), .NP(1208), .PSH(0), .B0(100), .B1(104),
                 .XAMP(4000), .WD(3000000)) e2e (.finished, .checks, .failures);

  bit finished;
  int checks, failures;
  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
