// template_mem: storage for the matched-filter templates.
//
// Each template is the FFT (length N) of one filter's coefficients. Only the
// templates of filters 0..NSTORE-1 are stored; the filter -p uses the complex
// conjugate of template p, applied by conj_pair_mult. Templates are spread over
// LANES banks, template p in bank p % LANES at row p / LANES, so that in one
// clock every lane reads bin k of its own template: iteration i feeds lane l
// with template i*LANES + l. Holding the templates so the host can write and
// read them back follows the design; the banking is this design's own choice.
//
// Interface and timing: the lane read port returns all LANES coefficients one
// clock after `rd_en` (rd_iter, rd_k). The host port writes one coefficient
// per clock (`hw_en`) and returns the coefficient at (`hr_p`, `hr_k`) one clock
// after `hr_en`. A coefficient is {re, im}, each TW bits signed.
module template_mem #(
  parameter int unsigned N      = 1024, // FFT length
  parameter int unsigned NSTORE = 43,   // stored templates (filters 0..42)
  parameter int unsigned LANES  = 8,    // lane pairs read in parallel
  parameter int unsigned TW     = 16    // width per component
) (
  input  logic                       clk,
  // lane read port
  input  logic                       rd_en,
  input  logic [7:0]                 rd_iter,
  input  logic [$clog2(N)-1:0]       rd_k,
  output logic [LANES-1:0][2*TW-1:0] rd_data,
  // host port
  input  logic                       hw_en,
  input  logic [7:0]                 hw_p,
  input  logic [$clog2(N)-1:0]       hw_k,
  input  logic [2*TW-1:0]            hw_data,
  input  logic                       hr_en,
  input  logic [7:0]                 hr_p,
  input  logic [$clog2(N)-1:0]       hr_k,
  output logic [2*TW-1:0]            hr_data
);
  localparam int unsigned ROWS  = (NSTORE + LANES - 1) / LANES;
  localparam int unsigned LOGN  = $clog2(N);
  localparam int unsigned DEPTH = ROWS * N;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [LANES-1:0][2*TW-1:0] hr_bank;
  logic [7:0] hr_sel;

  function automatic logic [AW-1:0] row_addr(input logic [7:0] row, input logic [LOGN-1:0] k);
    return AW'((32'(row) << LOGN) | 32'(k));
  endfunction

  for (genvar l = 0; l < LANES; l++) begin : g_bank
    logic [2*TW-1:0] bank [DEPTH];
    logic            wr_here;
    assign wr_here = hw_en && (32'(hw_p) % LANES == l) && (32'(hw_p) < NSTORE);
    always_ff @(posedge clk) begin
      if (wr_here)
        bank[row_addr(8'(32'(hw_p) / LANES), hw_k)] <= hw_data;
      if (rd_en)
        rd_data[l] <= bank[row_addr(rd_iter, rd_k)];
      if (hr_en)
        hr_bank[l] <= bank[row_addr(8'(32'(hr_p) / LANES), hr_k)];
    end
  end

  always_ff @(posedge clk) begin
    if (hr_en) hr_sel <= 8'(32'(hr_p) % LANES);
  end
  assign hr_data = hr_bank[hr_sel[$clog2(LANES > 1 ? LANES : 2)-1:0]];
endmodule
