// tb_harmonic_summer: fills a small filter-output plane with random noise and
// one planted accelerated harmonic series, runs the summer over a range of
// fundamental bins and compares every detection with a reference search done
// here (same 40-bin neighbourhoods, rows k*f, per-k thresholds). Also runs
// once in single-step mode and checks that the summer halts between bins.
module tb_harmonic_summer;
  import fdas_pkg::*;
  localparam int unsigned NF = 9, HALF = 4, NH = 8;
  localparam int unsigned B0 = 3, B1 = 7;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic start = 0, step_mode = 0, step = 0;
  logic [31:0] b_first = B0, b_last = B1;
  logic [NH-1:0][31:0] thresh;
  logic busy, done, waiting;
  logic [31:0] det_count;
  logic mem_req, mem_gnt, mem_rvalid;
  logic [ADDR_W-1:0] mem_addr;
  logic [31:0] mem_rdata;
  logic det_valid, det_ready;
  det_t det;

  harmonic_summer #(.NF(NF), .NH(NH)) dut (.*);
  fop_mem_model #(.LAT(3), .STALL_PCT(25)) mem (
    .clk, .mem_req, .mem_we(1'b0), .mem_addr, .mem_wdata('0), .mem_gnt,
    .mem_rvalid, .mem_rdata);

  int checks = 0, failures = 0;
  det_t expq [$];
  int unsigned fop [int];

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned rd(int col, int row);
    return fop.exists(col * NF + row) ? fop[col * NF + row] : 0;
  endfunction

  task automatic build_reference();
    expq.delete();
    for (int b = B0; b <= B1; b++)
      for (int f = -int'(HALF); f <= int'(HALF); f++) begin
        longint s; bit ok; det_t d; int top;
        s = 0; ok = 1; d = '0; top = -1;
        for (int k = 1; k <= NH; k++) begin
          int row, m;
          row = int'(HALF) + k * f;
          if (row < 0 || row >= int'(NF)) ok = 0;
          if (ok) begin
            m = 0;
            for (int c = k * b - k / 2; c <= k * b + k / 2; c++)
              if (rd(c, row) > m) m = rd(c, row);
            s += m;
            if (s > thresh[k-1]) begin d.mask[k-1] = 1'b1; top = k; d.power = SUM_W'(s); end
          end
        end
        if (top > 0) begin
          d.bin = 32'(b); d.filt = 8'(f);
          expq.push_back(d);
        end
      end
  endtask

  // accept detections with random backpressure and compare
  int got = 0;
  always @(posedge clk) begin
    det_ready <= ($urandom_range(3, 0) != 0);
    if (det_valid && det_ready) begin
      checks++;
      got++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected detection bin %0d filt %0d", det.bin, $signed(det.filt));
      end else begin
        det_t e;
        e = expq.pop_front();
        if (e !== det) begin
          failures++;
          $display("FAIL: got bin %0d filt %0d mask %b pow %0d, expected bin %0d filt %0d mask %b pow %0d",
                   det.bin, $signed(det.filt), det.mask, det.power, e.bin, $signed(e.filt), e.mask, e.power);
        end
      end
    end
  end

  task automatic run_search(input bit stepped);
    int steps;
    steps = 0;
    build_reference();
    $display("reference expects %0d detections", expq.size());
    @(negedge clk); start = 1; step_mode = stepped;
    @(negedge clk); start = 0;
    while (!done) begin
      @(negedge clk);
      if (waiting) begin
        // must stay halted until stepped
        repeat (5) @(negedge clk);
        checks++;
        if (!waiting) begin failures++; $display("FAIL: left step wait without a step"); end
        step = 1; @(negedge clk); step = 0; steps++;
      end
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d detections missing", expq.size()); end
    checks++;
    if (stepped && steps != int'(B1 - B0)) begin failures++; $display("FAIL: %0d steps, expected %0d", steps, B1 - B0); end
    checks++;
    if (det_count != 32'(got)) begin failures++; $display("FAIL: det_count %0d vs %0d", det_count, got); end
  endtask

  initial begin
    for (int c = 0; c < 8 * int'(B1) + 5; c++)
      for (int r = 0; r < int'(NF); r++) begin
        fop[c * NF + r] = $urandom_range(20, 0);
        mem.words[32'(c * NF + r)] = fop[c * NF + r];
      end
    // accelerated series: fundamental bin 5, filter +1, harmonic k at row HALF+k
    for (int k = 1; k <= 4; k++) begin
      int c;
      c = 5 * k + ((k % 2 == 0) ? k / 2 : 0);  // drift to the edge of the neighbourhood
      fop[c * NF + HALF + k] = 400;
      mem.words[32'(c * NF + HALF + k)] = 400;
    end
    for (int k = 1; k <= NH; k++) thresh[k-1] = 32'(15 * k + 250);
    repeat (3) @(negedge clk); rst_n = 1;
    got = 0;
    run_search(1'b0);
    checks++;
    if (got < 2) begin failures++; $display("FAIL: planted series not found (%0d detections)", got); end
    // lower thresholds, stepped run
    for (int k = 1; k <= NH; k++) thresh[k-1] = 32'(14 * k);
    got = 0;
    run_search(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
