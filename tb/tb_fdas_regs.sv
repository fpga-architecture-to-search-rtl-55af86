// tb_fdas_regs: drives the host bus of the register block. Checks register
// write/read-back, the control pulses, sticky done flags in the status word,
// template write and read-back through the auto-incrementing data register
// (against a template_mem instance), and FOP readout through the memory
// model with address auto-increment.
module tb_fdas_regs;
  import fdas_pkg::*;
  localparam int unsigned N = 16, NH = 8, TW = 16;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic host_wr = 0, host_rd = 0, host_rvalid;
  logic [7:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic mf_start, hs_start, step, step_mode;
  logic [31:0] b_first, b_last;
  logic [NH-1:0][31:0] thresh;
  logic mf_busy = 0, mf_done = 0, hs_busy = 0, hs_done = 0, waiting = 0;
  logic [31:0] det_count = 32'd7, blk_count = 32'd9;
  logic tpl_we, tpl_re;
  logic [7:0] tpl_wp, tpl_rp;
  logic [$clog2(N)-1:0] tpl_wk, tpl_rk;
  logic [2*TW-1:0] tpl_wdata, tpl_rdata;
  logic fop_req, fop_gnt, fop_rvalid;
  logic [ADDR_W-1:0] fop_addr;
  logic [31:0] fop_rdata;

  fdas_regs #(.N(N), .NH(NH), .TW(TW)) dut (.*);
  template_mem #(.N(N), .NSTORE(3), .LANES(2), .TW(TW)) tmem (
    .clk, .rd_en(1'b0), .rd_iter('0), .rd_k('0), .rd_data(),
    .hw_en(tpl_we), .hw_p(tpl_wp), .hw_k(tpl_wk), .hw_data(tpl_wdata),
    .hr_en(tpl_re), .hr_p(tpl_rp), .hr_k(tpl_rk), .hr_data(tpl_rdata));
  fop_mem_model #(.LAT(5), .STALL_PCT(40)) mem (
    .clk, .mem_req(fop_req), .mem_we(1'b0), .mem_addr(fop_addr), .mem_wdata('0),
    .mem_gnt(fop_gnt), .mem_rvalid(fop_rvalid), .mem_rdata(fop_rdata));

  int checks = 0, failures = 0;
  int pulses_mf = 0, pulses_hs = 0, pulses_step = 0;
  always @(posedge clk) if (rst_n) begin
    pulses_mf   += int'(mf_start);
    pulses_hs   += int'(hs_start);
    pulses_step += int'(step);
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); host_wr = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_wr = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    int n;
    @(negedge clk); host_rd = 1; host_addr = a;
    @(negedge clk); host_rd = 0;
    n = 0;
    while (!host_rvalid && n < 100) begin @(negedge clk); n++; end
    d = host_rdata;
  endtask
  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    logic [31:0] tv [48];
    repeat (3) @(negedge clk); rst_n = 1;
    // configuration registers
    wr(REG_HS_BSTART, 32'd11); wr(REG_HS_BEND, 32'd99); wr(REG_MODE, 32'd1);
    for (int k = 0; k < int'(NH); k++) wr(8'(REG_THRESH0) + 8'(k), 32'(1000 + k));
    rd(REG_HS_BSTART, d); expect_eq("bstart", d, 11);
    rd(REG_HS_BEND, d);   expect_eq("bend", d, 99);
    rd(REG_MODE, d);      expect_eq("mode", d, 1);
    expect_eq("b_first out", b_first, 11);
    expect_eq("step_mode out", 32'(step_mode), 1);
    for (int k = 0; k < int'(NH); k++) begin
      rd(8'(REG_THRESH0) + 8'(k), d); expect_eq("thresh", d, 32'(1000 + k));
      expect_eq("thresh out", thresh[k], 32'(1000 + k));
    end
    rd(REG_DETCNT, d); expect_eq("detcnt", d, 7);
    rd(REG_BLKCNT, d); expect_eq("blkcnt", d, 9);
    // control pulses and status
    wr(REG_CTRL, 32'h1); wr(REG_CTRL, 32'h2); wr(REG_CTRL, 32'h4);
    @(negedge clk);
    expect_eq("pulses", {pulses_mf[7:0], pulses_hs[7:0], pulses_step[7:0]}, 24'h010101);
    mf_busy = 1; waiting = 1;
    rd(REG_STATUS, d); expect_eq("status busy", d, 32'h05);
    mf_busy = 0; waiting = 0; mf_done = 1; @(negedge clk); mf_done = 0;
    rd(REG_STATUS, d); expect_eq("status mf done", d, 32'h08);
    hs_done = 1; @(negedge clk); hs_done = 0;
    rd(REG_STATUS, d); expect_eq("status both done", d, 32'h18);
    wr(REG_CTRL, 32'h1);
    rd(REG_STATUS, d); expect_eq("status after restart", d, 32'h10);
    // templates: write 48 words from template 0 bin 0 (3 templates x 16 bins)
    wr(REG_TPL_ADDR, 32'h0);
    foreach (tv[i]) begin tv[i] = $urandom; wr(REG_TPL_DATA, tv[i]); end
    rd(REG_TPL_ADDR, d); expect_eq("tpl addr advanced", d, 32'h0003_0000);
    wr(REG_TPL_ADDR, 32'h0000_0005);
    for (int i = 5; i < 48; i++) begin rd(REG_TPL_DATA, d); expect_eq("tpl readback", d, tv[i]); end
    // FOP readout
    for (int a = 0; a < 40; a++) mem.words[ADDR_W'(a)] = 32'(a * 3 + 1);
    wr(REG_FOP_ADDR, 32'd17);
    for (int a = 17; a < 40; a++) begin rd(REG_FOP_DATA, d); expect_eq("fop read", d, 32'(a * 3 + 1)); end
    rd(REG_FOP_ADDR, d); expect_eq("fop addr advanced", d, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
