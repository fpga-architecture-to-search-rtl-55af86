// tb_power_detect: checks re^2+im^2 >> PSHIFT with saturation against a
// reference computed in 64/128-bit integer arithmetic.
module tb_power_detect;
  localparam int unsigned W = 32, PW = 32, PSHIFT = 16;
  logic signed [W-1:0] re, im;
  logic [PW-1:0]       power;
  int checks = 0, failures = 0;
  int sat_seen = 0;

  power_detect #(.W(W), .PW(PW), .PSHIFT(PSHIFT)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] e;
    logic [PW-1:0] exp_p;
    for (int n = 0; n < 3000; n++) begin
      re = $signed($urandom) >>> $urandom_range(31, 0);
      im = $signed($urandom) >>> $urandom_range(31, 0);
      if (n == 0) begin re = 32'sh8000_0000; im = 32'sh8000_0000; end
      #1;
      e = 128'(longint'(re) * longint'(re)) + 128'(longint'(im) * longint'(im));
      e = e >> PSHIFT;
      if (e >= 128'(1) << PW) begin exp_p = '1; sat_seen++; end
      else exp_p = PW'(e);
      checks++;
      if (power !== exp_p) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d): got %0d exp %0d", re, im, power, exp_p);
      end
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
