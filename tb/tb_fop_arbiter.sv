// tb_fop_arbiter: three random users (one writer, two readers) share the
// memory model through the arbiter. Checks that the priority order holds,
// that every read returns the right word to the port that asked for it, in
// order, and that writes land.
module tb_fop_arbiter;
  import fdas_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic [2:0] m_req = '0, m_gnt, m_rvalid;
  fop_req_t   m_bus [3];
  logic [POW_W-1:0] m_rdata;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [ADDR_W-1:0] mem_addr;
  logic [POW_W-1:0] mem_wdata, mem_rdata;

  fop_arbiter #(.NPORT(3), .DEPTH(4)) dut (.*);
  fop_mem_model #(.LAT(6), .STALL_PCT(20)) mem (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata);

  int checks = 0, failures = 0;
  int granted [3] = '{0, 0, 0};
  int contested = 0;
  logic [POW_W-1:0] expq [3][$];
  logic [POW_W-1:0] model [logic [ADDR_W-1:0]];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // preload memory: word a holds a ^ 32'h5a5a0000
  initial for (int a = 0; a < 256; a++) begin
    mem.words[ADDR_W'(a)] = 32'(a) ^ 32'h5a5a0000;
    model[ADDR_W'(a)] = 32'(a) ^ 32'h5a5a0000;
  end

  // drivers: requests stay up until granted, then a new random one
  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < 3; i++) begin
        if (m_req[i] && m_gnt[i]) begin
          granted[i]++;
          if (!m_bus[i].we) expq[i].push_back(model[m_bus[i].addr]);
          else model[m_bus[i].addr] = m_bus[i].wdata;
          // priority: a lower-numbered request must not be waiting
          for (int j = 0; j < i; j++) begin
            checks++;
            if (m_req[j]) begin failures++; $display("FAIL: port %0d granted over %0d", i, j); end
          end
        end
        if (m_req[i] && m_gnt[i] || !m_req[i]) begin
          m_req[i]       <= ($urandom_range(99, 0) < 40);
          m_bus[i].we    <= (i == 0);
          m_bus[i].addr  <= ADDR_W'($urandom_range(255, 0));
          m_bus[i].wdata <= $urandom;
        end
      end
      if (m_req[0] && (m_req[1] || m_req[2])) contested++;
      for (int i = 0; i < 3; i++)
        if (m_rvalid[i]) begin
          checks++;
          if (expq[i].size() == 0) begin failures++; $display("FAIL: unexpected data on port %0d", i); end
          else begin
            logic [POW_W-1:0] e;
            e = expq[i].pop_front();
            if (e !== m_rdata) begin failures++; $display("FAIL: port %0d got %h exp %h", i, m_rdata, e); end
          end
        end
    end
  end

  initial begin
    foreach (m_bus[i]) m_bus[i] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5000) @(negedge clk);
    m_req = '0;
    force m_req = '0;
    repeat (20) @(negedge clk);
    checks++;
    if (granted[0] == 0 || granted[1] == 0 || granted[2] == 0 || contested == 0) begin
      failures++; $display("FAIL: coverage %0d %0d %0d contested %0d", granted[0], granted[1], granted[2], contested);
    end
    for (int i = 1; i < 3; i++) begin
      checks++;
      if (expq[i].size() != 0) begin failures++; $display("FAIL: port %0d lost %0d reads", i, expq[i].size()); end
    end
    $display("grants %0d %0d %0d", granted[0], granted[1], granted[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
