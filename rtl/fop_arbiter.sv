// fop_arbiter: shares the one external FOP memory port between its users.
//
// The filter-output plane lives in external memory. Three agents use it: the
// matched filter writes it, the harmonic summer reads it back, and the host can
// read it directly in the diagnostic FOP-readout mode. Requests are granted by
// fixed priority (port 0 highest). Reads return in order from the memory, so
// the arbiter remembers, in a small FIFO, which port issued each read that is
// still in flight and steers every returning word to that port. Sharing one
// memory between filtering, summing and host readout follows the design; the
// priority scheme and the in-order response routing are this design's own.
//
// Interface and timing: per port, a request (`m_req`, `m_bus`) is accepted in
// a clock where `m_gnt` is high; the grant is combinational from the memory's
// `mem_gnt`. A read's data arrives on that port's `m_rvalid` with the shared
// `m_rdata`, as many clocks later as the memory takes. At most DEPTH reads may
// be in flight; further reads wait.
module fop_arbiter
  import fdas_pkg::*;
#(
  parameter int unsigned NPORT = 3,
  parameter int unsigned DEPTH = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // users
  input  logic [NPORT-1:0]      m_req,
  input  fop_req_t              m_bus    [NPORT],
  output logic [NPORT-1:0]      m_gnt,
  output logic [NPORT-1:0]      m_rvalid,
  output logic [POW_W-1:0]      m_rdata,
  // memory
  output logic                  mem_req,
  output logic                  mem_we,
  output logic [ADDR_W-1:0]     mem_addr,
  output logic [POW_W-1:0]      mem_wdata,
  input  logic                  mem_gnt,
  input  logic                  mem_rvalid,
  input  logic [POW_W-1:0]      mem_rdata
);
  localparam int unsigned IW = (NPORT > 1) ? $clog2(NPORT) : 1;
  localparam int unsigned DW = $clog2(DEPTH);

  logic [IW-1:0] id_fifo [DEPTH];
  logic [DW-1:0] wr_ptr, rd_ptr;
  logic [DW:0]   level;
  logic          full;

  logic [IW-1:0] sel;
  logic          any;
  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int i = NPORT - 1; i >= 0; i--)
      if (m_req[i]) begin
        sel = IW'(i);
        any = 1'b1;
      end
  end

  assign full      = (level == (DW+1)'(DEPTH));
  assign mem_req   = any && (m_bus[sel].we || !full);
  assign mem_we    = m_bus[sel].we;
  assign mem_addr  = m_bus[sel].addr;
  assign mem_wdata = m_bus[sel].wdata;

  always_comb begin
    m_gnt = '0;
    if (mem_req) m_gnt[sel] = mem_gnt;
  end

  logic push, pop;
  assign push = mem_req && mem_gnt && !mem_we;
  assign pop  = mem_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
      level <= level + (DW+1)'(push) - (DW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) id_fifo[wr_ptr] <= sel;
  end

  always_comb begin
    m_rvalid = '0;
    if (mem_rvalid) m_rvalid[id_fifo[rd_ptr]] = 1'b1;
  end
  assign m_rdata = mem_rdata;

  a_no_orphan_data: assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> level != 0)
    else $error("fop_arbiter: read data with no read in flight");
endmodule
