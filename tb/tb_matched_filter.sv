// tb_matched_filter: runs the overlap-save matched filter on a short random
// spectrum with random centred templates and checks every FOP word against a
// direct (time-domain) convolution computed here in double precision:
//   y_+p[c] = sum_j h_p[j] x[c-j],  y_-p[c] = sum_j conj(h_p[-j]) x[c-j],
// j = -D..D, scaled by 2**PRE/N, detected and shifted like the hardware.
// Also checks that every FOP address is written exactly once, that the
// engine halts between segments in single-step mode, and that the FOP port
// stalls and the input stream gaps were exercised.
module tb_matched_filter;
  import fdas_pkg::*;
  localparam int unsigned N = 16, TAPS = 5, NF = 5, LP = 2, NP = 40;
  localparam int unsigned IW = 16, W = 32, TW = 16, PSH = 16;
  localparam int unsigned D = (TAPS - 1) / 2, HALF = (NF - 1) / 2, V = N - TAPS + 1;
  localparam int unsigned NBLK = (NP + V - 1) / V, NSTORE = HALF + 1;
  localparam int unsigned PRE = W - IW - 2;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic start = 0, step_mode = 0, step = 0, busy, done, waiting;
  logic [31:0] blk_count;
  logic in_valid = 0, in_ready;
  logic signed [IW-1:0] in_re = 0, in_im = 0;
  logic tpl_rd_en;
  logic [7:0] tpl_rd_iter;
  logic [$clog2(N)-1:0] tpl_rd_k;
  logic [LP-1:0][2*TW-1:0] tpl_rd_data;
  logic mem_req, mem_gnt, mem_rvalid;
  logic [ADDR_W-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;

  matched_filter #(.N(N), .TAPS(TAPS), .NF(NF), .LP(LP), .NP(NP), .IW(IW), .W(W),
                   .TW(TW), .PSHIFT(PSH)) dut (.*);
  fop_mem_model #(.LAT(2), .STALL_PCT(30)) mem (
    .clk, .mem_req, .mem_we(1'b1), .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata);

  // templates: taps h[p][j+D], spectra (quantised) tq
  real hr [NSTORE][TAPS], hi [NSTORE][TAPS];
  logic [2*TW-1:0] tq [NSTORE][N];
  real xr [NP], xi [NP];
  int checks = 0, failures = 0;

  // template read model, one clock latency
  always @(posedge clk)
    if (tpl_rd_en)
      for (int l = 0; l < int'(LP); l++)
        tpl_rd_data[l] <= (int'(tpl_rd_iter) * LP + l < NSTORE) ? tq[int'(tpl_rd_iter) * LP + l][tpl_rd_k] : '0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input stream with random gaps
  int gaps = 0;
  initial begin
    int i;
    i = 0;
    @(posedge rst_n);
    while (i < int'(NP)) begin
      @(negedge clk);
      if (in_valid && in_ready_q) i++;
      if (i < int'(NP) && $urandom_range(3, 0) != 0) begin
        in_valid = 1; in_re = IW'($rtoi(xr[i])); in_im = IW'($rtoi(xi[i]));
      end else begin
        in_valid = 0; gaps++;
      end
    end
    in_valid = 0;
  end
  logic in_ready_q;
  always @(posedge clk) in_ready_q <= in_ready;  // handshake seen at the edge

  task automatic expected_power(input int c, input int f, output real pw);
    real yr, yi, tr, ti, g;
    yr = 0; yi = 0;
    for (int j = -int'(D); j <= int'(D); j++) begin
      int p;
      p = (f >= 0) ? f : -f;
      if (f >= 0) begin tr = hr[p][j + D]; ti = hi[p][j + D]; end
      else begin tr = hr[p][-j + D]; ti = -hi[p][-j + D]; end
      if (c - j >= 0 && c - j < int'(NP)) begin
        yr += tr * xr[c - j] - ti * xi[c - j];
        yi += tr * xi[c - j] + ti * xr[c - j];
      end
    end
    g  = real'(1 << PRE) / real'(N);
    pw = (yr * yr + yi * yi) * g * g / real'(1 << PSH);
  endtask

  initial begin
    int steps;
    steps = 0;
    for (int i = 0; i < int'(NP); i++) begin
      xr[i] = real'($urandom_range(1200, 0)) - 600.0;
      xi[i] = real'($urandom_range(1200, 0)) - 600.0;
    end
    for (int p = 0; p < int'(NSTORE); p++) begin
      for (int j = 0; j < int'(TAPS); j++) begin
        hr[p][j] = (real'($urandom_range(2000, 0)) - 1000.0) / 9000.0;
        hi[p][j] = (real'($urandom_range(2000, 0)) - 1000.0) / 9000.0;
      end
      for (int k = 0; k < int'(N); k++) begin
        real sr, si, a;
        sr = 0; si = 0;
        for (int j = -int'(D); j <= int'(D); j++) begin
          a = -6.283185307179586 * real'(k * j) / real'(N);
          sr += hr[p][j + D] * $cos(a) - hi[p][j + D] * $sin(a);
          si += hr[p][j + D] * $sin(a) + hi[p][j + D] * $cos(a);
        end
        tq[p][k] = {TW'($rtoi(sr * 32768.0 + (sr >= 0.0 ? 0.5 : -0.5))),
                    TW'($rtoi(si * 32768.0 + (si >= 0.0 ? 0.5 : -0.5)))};
      end
    end
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; step_mode = 1;
    @(negedge clk); start = 0;
    while (!done) begin
      @(negedge clk);
      if (waiting) begin
        repeat (4) @(negedge clk);
        checks++;
        if (!waiting) begin failures++; $display("FAIL: step wait left without step"); end
        step = 1; @(negedge clk); step = 0; steps++;
      end
    end
    checks++;
    if (steps != int'(NBLK) - 1) begin failures++; $display("FAIL: %0d steps, expected %0d", steps, NBLK - 1); end
    checks++;
    if (blk_count != NBLK) begin failures++; $display("FAIL: blk_count %0d", blk_count); end
    checks++;
    if (mem.writes != int'(NP * NF)) begin failures++; $display("FAIL: %0d FOP writes, expected %0d", mem.writes, NP * NF); end
    checks++;
    if (mem.stalls == 0 || gaps == 0) begin failures++; $display("FAIL: stalls %0d gaps %0d", mem.stalls, gaps); end
    for (int c = 0; c < int'(NP); c++)
      for (int f = -int'(HALF); f <= int'(HALF); f++) begin
        real pe, ph, e;
        logic [ADDR_W-1:0] a;
        a = ADDR_W'(c * int'(NF) + f + int'(HALF));
        expected_power(c, f, pe);
        checks++;
        if (!mem.words.exists(a)) begin
          failures++; $display("FAIL: bin %0d filter %0d never written", c, f);
        end else begin
          ph = real'(mem.words[a]);
          e  = $sqrt(ph) - $sqrt(pe);
          if (e > 1.0 + 0.002 * $sqrt(pe) || -e > 1.0 + 0.002 * $sqrt(pe)) begin
            failures++;
            if (failures < 12) $display("FAIL: bin %0d filter %0d power %0d expected %f", c, f, mem.words[a], pe);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
