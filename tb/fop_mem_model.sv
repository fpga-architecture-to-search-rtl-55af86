// fop_mem_model: behavioural model of the external memory that holds the
// filter-output plane (a DDR device behind its controller in the real
// system). It is not synthesizable logic.
//
// One word per request: a request is accepted when mem_req and mem_gnt are
// both high; mem_gnt is withdrawn at random (STALL_PCT percent of clocks) to
// model a busy controller. Reads return in order LAT clocks after acceptance.
// Words never written read as zero. The testbench may also poke and peek
// words directly through the `words` array.
module fop_mem_model #(
  parameter int unsigned AW        = 32,
  parameter int unsigned DW        = 32,
  parameter int unsigned LAT       = 4,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic          clk,
  input  logic          mem_req,
  input  logic          mem_we,
  input  logic [AW-1:0] mem_addr,
  input  logic [DW-1:0] mem_wdata,
  output logic          mem_gnt,
  output logic          mem_rvalid,
  output logic [DW-1:0] mem_rdata
);
  logic [DW-1:0] words [logic [AW-1:0]];
  logic [LAT-1:0]         pipe_v = '0;
  logic [LAT-1:0][DW-1:0] pipe_d = '0;
  int writes = 0, reads = 0, stalls = 0;

  initial mem_gnt = 1'b1;

  always @(posedge clk) begin
    logic [DW-1:0] rd;
    rd = '0;
    if (mem_req && mem_gnt) begin
      if (mem_we) begin
        words[mem_addr] = mem_wdata;
        writes++;
      end else begin
        if (words.exists(mem_addr)) rd = words[mem_addr];
        reads++;
      end
    end
    pipe_v <= {pipe_v[LAT-2:0], mem_req && mem_gnt && !mem_we};
    pipe_d <= {pipe_d[LAT-2:0], rd};
    if (mem_req && !mem_gnt) stalls++;
    mem_gnt <= ($urandom_range(99, 0) >= STALL_PCT);
  end

  assign mem_rvalid = pipe_v[LAT-1];
  assign mem_rdata  = pipe_d[LAT-1];
endmodule
