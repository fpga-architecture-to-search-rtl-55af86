// fdas_top_e2e: end-to-end test harness of the FDAS engine, instantiated by
// tb_fdas_top (small sizes) and tb_fdas_top_n1024 (the design's FFT length,
// filter count, filter length and lane count over two segments).
//
// The host (this harness) loads the templates over the register bus and
// reads them back, starts the matched filter in single-step mode, streams a
// random spectrum with gaps, and checks every filter-output-plane (FOP) word
// against a direct convolution computed here. The harmonic summer is then run
// over a range of fundamental bins while the host keeps reading the FOP
// through the diagnostic path, so both compete for the memory port; its
// detections are compared with a reference harmonic search over the FOP
// contents. Each mechanism of the design is counted and must occur at least
// once. The instantiating testbench prints the result and ends the run when
// `finished` rises.
module fdas_top_e2e
  import fdas_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned TAPS = 5,
  parameter int unsigned NF   = 9,
  parameter int unsigned LP   = 2,
  parameter int unsigned NP   = 64,
  parameter int unsigned PSH  = 16,
  parameter int unsigned B0   = 2,
  parameter int unsigned B1   = 7,
  parameter int unsigned XAMP = 500,    // input amplitude, per component
  parameter int unsigned WD   = 400000  // watchdog, clocks
) (
  output bit finished,   // set when the run (or the watchdog) ends
  output int checks,
  output int failures
);
  localparam int unsigned D = (TAPS - 1) / 2, HALF = (NF - 1) / 2, V = N - TAPS + 1;
  localparam int unsigned NBLK = (NP + V - 1) / V, NSTORE = HALF + 1;
  localparam int unsigned PRE = FFT_W - IN_W - 2;
  localparam real TOL = 1.0 + 0.5 * real'($clog2(N)) / real'(1 << (PSH / 2));

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic host_wr = 0, host_rd = 0, host_rvalid;
  logic [7:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic in_valid = 0, in_ready;
  logic signed [IN_W-1:0] in_re = 0, in_im = 0;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [ADDR_W-1:0] mem_addr;
  logic [POW_W-1:0] mem_wdata, mem_rdata;
  logic det_valid, det_ready;
  det_t det;

  fdas_top #(.N(N), .TAPS(TAPS), .NF(NF), .LP(LP), .NP(NP), .PSHIFT(PSH)) dut (.*);
  fop_mem_model #(.LAT(5), .STALL_PCT(20)) mem (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata);

  initial begin checks = 0; failures = 0; finished = 1'b0; end
  real hr [NSTORE][TAPS], hi [NSTORE][TAPS];
  logic [31:0] tq [NSTORE][N];
  real xr [NP], xi [NP];

  // mechanism counters
  int n_gap = 0, n_wstall = 0, n_step = 0, n_pad = 0, n_neg = 0, n_conflict = 0;
  int n_backpressure = 0, n_multi = 0, n_hostfop = 0, n_tplrb = 0, n_iter = 0;

  initial begin : watchdog
    repeat (WD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finished = 1'b1;
  end

  always @(posedge clk) begin
    if (mem_req && mem_we && !mem_gnt) n_wstall++;
    if (dut.u_arb.m_req[1] && dut.u_arb.m_req[2]) n_conflict++;
    if (dut.u_mf.ring_we && dut.u_mf.fill_left != 0 && dut.u_mf.in_cnt >= NP) n_pad++;
    if (dut.u_mf.l_start && dut.u_mf.iter != 0) n_iter++;
    if (mem_req && mem_we && mem_gnt && (mem_addr % NF) < HALF) n_neg++;
  end

  // ---------------------------------------------------------------- host bus
  semaphore bus = new(1);
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    bus.get();
    @(negedge clk); host_wr = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_wr = 0;
    bus.put();
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    bus.get();
    @(negedge clk); host_rd = 1; host_addr = a;
    @(negedge clk); host_rd = 0;
    while (!host_rvalid) @(negedge clk);
    d = host_rdata;
    bus.put();
  endtask

  // ------------------------------------------------------------- references
  function automatic real fop_ref(input int c, input int f);
    real yr, yi, tr, ti, g;
    int p;
    yr = 0; yi = 0;
    p = (f >= 0) ? f : -f;
    for (int j = -int'(D); j <= int'(D); j++) begin
      if (f >= 0) begin tr = hr[p][j + D]; ti = hi[p][j + D]; end
      else begin tr = hr[p][-j + D]; ti = -hi[p][-j + D]; end
      if (c - j >= 0 && c - j < int'(NP)) begin
        yr += tr * xr[c - j] - ti * xi[c - j];
        yi += tr * xi[c - j] + ti * xr[c - j];
      end
    end
    g = real'(1 << PRE) / real'(N);
    return (yr * yr + yi * yi) * g * g / real'(1 << PSH);
  endfunction

  function automatic logic [31:0] fopw(input int c, input int row);
    return mem.words.exists(ADDR_W'(c * int'(NF) + row)) ? mem.words[ADDR_W'(c * int'(NF) + row)] : 0;
  endfunction

  det_t expq [$];
  task automatic hs_reference(input logic [NHARM-1:0][31:0] th);
    for (int b = B0; b <= B1; b++)
      for (int f = -int'(HALF); f <= int'(HALF); f++) begin
        longint s; bit ok; det_t dd; int top;
        s = 0; ok = 1; dd = '0; top = 0;
        for (int k = 1; k <= int'(NHARM); k++) begin
          int row; logic [31:0] m;
          row = int'(HALF) + k * f;
          if (row < 0 || row >= int'(NF)) ok = 0;
          if (ok) begin
            m = 0;
            for (int c = k * b - k / 2; c <= k * b + k / 2; c++) if (fopw(c, row) > m) m = fopw(c, row);
            s += m;
            if (s > th[k-1]) begin dd.mask[k-1] = 1; top = k; dd.power = SUM_W'(s); end
          end
        end
        if (top > 0) begin dd.bin = 32'(b); dd.filt = 8'(f); expq.push_back(dd); end
      end
  endtask

  // detections with backpressure
  int got = 0;
  always @(posedge clk) begin
    det_ready <= ($urandom_range(2, 0) != 0);
    if (det_valid && !det_ready) n_backpressure++;
    if (det_valid && det_ready) begin
      got++;
      checks++;
      if ($countones(det.mask) > 1) n_multi++;
      if (expq.size() == 0) begin failures++; $display("FAIL: unexpected detection"); end
      else begin
        det_t e;
        e = expq.pop_front();
        if (e !== det) begin
          failures++;
          $display("FAIL det: got b%0d f%0d m%b p%0d exp b%0d f%0d m%b p%0d", det.bin, $signed(det.filt),
                   det.mask, det.power, e.bin, $signed(e.filt), e.mask, e.power);
        end
      end
    end
  end

  // input stream
  initial begin
    int i;
    i = 0;
    @(posedge rst_n);
    while (i < int'(NP)) begin
      @(posedge clk);
      if (in_valid && in_ready) i++;
      #1;
      if (i < int'(NP) && $urandom_range(4, 0) != 0) begin
        in_valid = 1; in_re = IN_W'($rtoi(xr[i])); in_im = IN_W'($rtoi(xi[i]));
      end else begin
        in_valid = 0; n_gap++;
      end
    end
    in_valid = 0;
  end

  initial begin
    logic [31:0] d;
    logic [NHARM-1:0][31:0] th;
    longint total;
    for (int i = 0; i < int'(NP); i++) begin
      xr[i] = real'($urandom_range(2 * XAMP, 0)) - real'(XAMP);
      xi[i] = real'($urandom_range(2 * XAMP, 0)) - real'(XAMP);
    end
    for (int p = 0; p < int'(NSTORE); p++) begin
      for (int j = 0; j < int'(TAPS); j++) begin
        // |tap| <= 0.22/sqrt(TAPS) per component keeps template bins below 1.0
        hr[p][j] = (real'($urandom_range(2000, 0)) - 1000.0) / 1000.0 * 0.22 / $sqrt(real'(TAPS));
        hi[p][j] = (real'($urandom_range(2000, 0)) - 1000.0) / 1000.0 * 0.22 / $sqrt(real'(TAPS));
      end
      for (int k = 0; k < int'(N); k++) begin
        real sr, si, a;
        sr = 0; si = 0;
        for (int j = -int'(D); j <= int'(D); j++) begin
          a = -6.283185307179586 * real'(k * j) / real'(N);
          sr += hr[p][j + D] * $cos(a) - hi[p][j + D] * $sin(a);
          si += hr[p][j + D] * $sin(a) + hi[p][j + D] * $cos(a);
        end
        tq[p][k] = {16'($rtoi(sr * 32768.0 + (sr >= 0.0 ? 0.5 : -0.5))),
                    16'($rtoi(si * 32768.0 + (si >= 0.0 ? 0.5 : -0.5)))};
      end
    end
    repeat (3) @(negedge clk); rst_n = 1;

    // load and verify templates
    wr(REG_TPL_ADDR, 32'h0);
    for (int p = 0; p < int'(NSTORE); p++) for (int k = 0; k < int'(N); k++) wr(REG_TPL_DATA, tq[p][k]);
    wr(REG_TPL_ADDR, 32'h0);
    for (int p = 0; p < int'(NSTORE); p++)
      for (int k = 0; k < int'(N); k++) begin
        rd(REG_TPL_DATA, d); checks++; n_tplrb++;
        if (d !== tq[p][k]) begin failures++; $display("FAIL: template %0d bin %0d read back %h", p, k, d); end
      end

    // matched filtering in single-step mode
    wr(REG_MODE, 32'h1);
    wr(REG_CTRL, 32'h1);
    forever begin
      rd(REG_STATUS, d);
      if (d[3]) break;
      if (d[2]) begin wr(REG_CTRL, 32'h4); n_step++; end
    end
    wr(REG_MODE, 32'h0);
    rd(REG_BLKCNT, d); checks++;
    if (d != NBLK) begin failures++; $display("FAIL: %0d blocks, expected %0d", d, NBLK); end
    checks++;
    if (mem.writes != int'(NP * NF)) begin failures++; $display("FAIL: %0d FOP writes", mem.writes); end

    // whole FOP against the direct convolution
    total = 0;
    for (int c = 0; c < int'(NP); c++)
      for (int f = -int'(HALF); f <= int'(HALF); f++) begin
        real pe, e;
        pe = fop_ref(c, f);
        if (pe > 4294967295.0) pe = 4294967295.0;   // FOP word saturates
        e = $sqrt(real'(fopw(c, f + int'(HALF)))) - $sqrt(pe);
        total += longint'(fopw(c, f + int'(HALF)));
        checks++;
        // fixed-point noise: about half an output LSB per FFT stage
        if (e > TOL + 0.002 * $sqrt(pe) || -e > TOL + 0.002 * $sqrt(pe)) begin
          failures++;
          if (failures < 10) $display("FAIL: FOP bin %0d filter %0d = %0d, expected %f", c, f, fopw(c, f + int'(HALF)), pe);
        end
      end

    // harmonic summing, thresholds from the mean FOP power
    for (int k = 1; k <= int'(NHARM); k++) begin
      th[k-1] = 32'((total / (NP * NF)) * k * 16 / 10);
      wr(8'(REG_THRESH0) + 8'(k - 1), th[k-1]);
    end
    wr(REG_HS_BSTART, B0); wr(REG_HS_BEND, B1);
    hs_reference(th);
    $display("reference expects %0d detections", expq.size());
    wr(REG_CTRL, 32'h2);
    // host FOP readout while the summer runs
    wr(REG_FOP_ADDR, 32'd30);
    forever begin
      rd(REG_FOP_DATA, d);
      checks++; n_hostfop++;
      if (d !== fopw((30 + n_hostfop - 1) / NF, (30 + n_hostfop - 1) % NF)) begin
        failures++; $display("FAIL: host FOP read %0d = %h", 30 + n_hostfop - 1, d);
      end
      rd(REG_STATUS, d);
      if (d[4]) break;
    end
    rd(REG_DETCNT, d); checks++;
    if (d != 32'(got)) begin failures++; $display("FAIL: det count %0d vs %0d", d, got); end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d detections missing", expq.size()); end

    $display("gaps %0d wstalls %0d steps %0d pad %0d negrows %0d iter>0 %0d conflict %0d backpressure %0d multi-harm %0d hostfop %0d tplrb %0d dets %0d",
             n_gap, n_wstall, n_step, n_pad, n_neg, n_iter, n_conflict, n_backpressure, n_multi, n_hostfop, n_tplrb, got);
    checks++;
    if (n_gap == 0 || n_wstall == 0 || n_step != int'(NBLK) - 1 || n_pad == 0 || n_neg == 0 ||
        n_iter == 0 || n_conflict == 0 || n_backpressure == 0 || n_multi == 0 || n_hostfop == 0 ||
        n_tplrb == 0 || got == 0) begin
      failures++; $display("FAIL: a mechanism was not exercised");
    end
    finished = 1'b1;
  end
endmodule
