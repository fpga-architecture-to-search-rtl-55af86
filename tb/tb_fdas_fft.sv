// tb_fdas_fft: self-checking test of the radix-2 FFT core.
// Loads random complex vectors, runs forward (scaled) and inverse transforms,
// and compares every output bin with a double-precision DFT computed here.
// Also checks that a transform takes exactly N/2*log2(N) clocks.
module tb_fdas_fft;
  localparam int unsigned N = 64;
  localparam int unsigned W = 32;
  localparam int unsigned LOGN = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic                ld_we = 1'b0;
  logic [LOGN-1:0]     ld_addr = '0, rd_addr = '0;
  logic signed [W-1:0] ld_re = '0, ld_im = '0, rd_re, rd_im;
  logic                start = 1'b0, inverse = 1'b0, busy, done;

  fdas_fft #(.N(N), .W(W), .TWW(18), .SCALE(1'b1)) dut_fwd (
    .clk, .rst_n, .ld_we, .ld_addr, .ld_re, .ld_im, .start, .inverse,
    .busy, .done, .rd_addr, .rd_re, .rd_im);

  // unscaled instance for the inverse test
  logic                busy_u, done_u;
  logic signed [W-1:0] rdu_re, rdu_im;
  fdas_fft #(.N(N), .W(W), .TWW(18), .SCALE(1'b0)) dut_inv (
    .clk, .rst_n, .ld_we, .ld_addr, .ld_re, .ld_im, .start, .inverse,
    .busy(busy_u), .done(done_u), .rd_addr, .rd_re(rdu_re), .rd_im(rdu_im));

  int checks = 0, failures = 0;
  real xr [N], xi [N];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit inv, input int amp);
    int cyc;
    real er, ei, ang, tol;
    for (int i = 0; i < N; i++) begin
      xr[i] = real'($signed($urandom_range(2*amp, 0)) - amp);
      xi[i] = real'($signed($urandom_range(2*amp, 0)) - amp);
    end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      ld_we = 1'b1; ld_addr = LOGN'(i);
      ld_re = W'($rtoi(xr[i])); ld_im = W'($rtoi(xi[i]));
    end
    @(negedge clk); ld_we = 1'b0; start = 1'b1; inverse = inv;
    @(negedge clk); start = 1'b0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != N / 2 * LOGN) begin
      failures++;
      $display("FAIL: transform took %0d clocks, expected %0d", cyc, N / 2 * LOGN);
    end
    tol = 4.0 + (inv ? 0.0 : 0.0);
    for (int k = 0; k < N; k++) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < N; n++) begin
        ang = (inv ? 1.0 : -1.0) * 6.283185307179586 * real'(k * n % N) / real'(N);
        er += xr[n] * $cos(ang) - xi[n] * $sin(ang);
        ei += xr[n] * $sin(ang) + xi[n] * $cos(ang);
      end
      rd_addr = LOGN'(k);
      #1;
      if (!inv) begin
        er = er / real'(N); ei = ei / real'(N);
        checks++;
        if ((real'(rd_re) - er > tol) || (er - real'(rd_re) > tol) ||
            (real'(rd_im) - ei > tol) || (ei - real'(rd_im) > tol)) begin
          failures++;
          $display("FAIL fwd bin %0d: got (%0d,%0d) expected (%f,%f)", k, rd_re, rd_im, er, ei);
        end
      end else begin
        tol = 2.0 + 1e-4 * real'(amp) * real'(N);
        checks++;
        if ((real'(rdu_re) - er > tol) || (er - real'(rdu_re) > tol) ||
            (real'(rdu_im) - ei > tol) || (ei - real'(rdu_im) > tol)) begin
          failures++;
          $display("FAIL inv bin %0d: got (%0d,%0d) expected (%f,%f)", k, rdu_re, rdu_im, er, ei);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1'b0, 30000);
    run(1'b0, 1000000);
    run(1'b1, 20000);
    run(1'b1, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
