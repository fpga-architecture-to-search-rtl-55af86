// tb_fdas_top: end-to-end test of the FDAS engine at a small size (16-point
// FFT, 5-tap filters, 9 filters, 2 lane pairs, 64-bin spectrum), so that every
// mechanism is reached in a fraction of a second. See fdas_top_e2e.
module tb_fdas_top;
  fdas_top_e2e #(.N(16), .TAPS(5), .NF(9), .LP(2), .NP(64), .PSH(16), .XAMP(500), .B0(2), .B1(7),
                 .WD(400000)) e2e (.finished, .checks, .failures);

  bit finished;
  int checks, failures;
  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
