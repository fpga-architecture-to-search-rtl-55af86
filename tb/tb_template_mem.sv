// tb_template_mem: writes every coefficient through the host port, then reads
// them back through the host port and through the banked lane port (all lanes
// in parallel, one clock of latency) and compares with a copy kept here.
module tb_template_mem;
  localparam int unsigned N = 32, NSTORE = 11, LANES = 4, TW = 16;
  localparam int unsigned ITERS = (NSTORE + LANES - 1) / LANES;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rd_en = 0, hw_en = 0, hr_en = 0;
  logic [7:0] rd_iter = 0, hw_p = 0, hr_p = 0;
  logic [$clog2(N)-1:0] rd_k = 0, hw_k = 0, hr_k = 0;
  logic [LANES-1:0][2*TW-1:0] rd_data;
  logic [2*TW-1:0] hw_data = 0, hr_data;
  logic [2*TW-1:0] ref_mem [NSTORE][N];
  int checks = 0, failures = 0;

  template_mem #(.N(N), .NSTORE(NSTORE), .LANES(LANES), .TW(TW)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NSTORE; p++)
      for (int k = 0; k < N; k++) begin
        ref_mem[p][k] = $urandom;
        @(negedge clk);
        hw_en = 1; hw_p = 8'(p); hw_k = 5'(k); hw_data = ref_mem[p][k];
      end
    @(negedge clk); hw_en = 0;
    // host read-back
    for (int p = 0; p < NSTORE; p++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk); hr_en = 1; hr_p = 8'(p); hr_k = 5'(k);
        @(negedge clk); hr_en = 0;
        checks++;
        if (hr_data !== ref_mem[p][k]) begin
          failures++;
          if (failures < 10) $display("FAIL host read p=%0d k=%0d got %h exp %h", p, k, hr_data, ref_mem[p][k]);
        end
      end
    // lane reads
    for (int i = 0; i < ITERS; i++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk); rd_en = 1; rd_iter = 8'(i); rd_k = 5'(k);
        @(negedge clk); rd_en = 0;
        for (int l = 0; l < LANES; l++)
          if (i * LANES + l < NSTORE) begin
            checks++;
            if (rd_data[l] !== ref_mem[i*LANES+l][k]) begin
              failures++;
              if (failures < 10) $display("FAIL lane read i=%0d l=%0d k=%0d got %h exp %h", i, l, k, rd_data[l], ref_mem[i*LANES+l][k]);
            end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
