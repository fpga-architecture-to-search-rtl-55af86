// fdas_top: Fourier-domain acceleration search (FDAS) engine for binary-pulsar
// searches.
//
// A pulsar in a binary orbit drifts in frequency during an observation, which
// smears its harmonics over many Fourier bins. The engine takes the complex
// spectrum of one dedispersed time series and
//   1. matched-filters it with NFILT acceleration templates (filters
//      -HALF..+HALF; filter 0 is zero acceleration, the conjugate template
//      serves each negative filter), by FFT-based convolution, and writes the
//      detected power as the filter-output plane (FOP), column ordered, to
//      external memory;
//   2. searches the FOP by harmonic summing: for each fundamental bin and
//      filter it adds the power of up to eight harmonics taken from the
//      neighbouring bins and proportionally scaled filters, and reports sums
//      that exceed the programmed thresholds.
// The host drives both steps through registers and can read the FOP and the
// templates back, or single-step the engine.
//
// Blocks: fdas_regs (host registers), template_mem (templates),
// matched_filter (FFT convolution, detection, FOP writes), harmonic_summer
// (FOP search), fop_arbiter (sharing of the FOP memory port).
//
// Interface: the host register bus; the input spectrum as a valid/ready stream
// of IN_W-bit complex bins; a one-word-per-request FOP memory port (request /
// grant, in-order read data); detections as a valid/ready stream of det_t.
// The structure and default sizes follow the design; the bus protocols,
// widths, lane count and filter length are this design's own.
module fdas_top
  import fdas_pkg::*;
#(
  parameter int unsigned N      = NFFT,
  parameter int unsigned TAPS   = NTAPS,
  parameter int unsigned NF     = NFILT,
  parameter int unsigned LP     = LANE_PAIRS,
  parameter int unsigned NP     = NPTS,
  parameter int unsigned PSHIFT = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host register bus
  input  logic                  host_wr,
  input  logic                  host_rd,
  input  logic [7:0]            host_addr,
  input  logic [REG_W-1:0]      host_wdata,
  output logic                  host_rvalid,
  output logic [REG_W-1:0]      host_rdata,
  // input spectrum
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  // FOP memory
  output logic                  mem_req,
  output logic                  mem_we,
  output logic [ADDR_W-1:0]     mem_addr,
  output logic [POW_W-1:0]      mem_wdata,
  input  logic                  mem_gnt,
  input  logic                  mem_rvalid,
  input  logic [POW_W-1:0]      mem_rdata,
  // detections
  output logic                  det_valid,
  output det_t                  det,
  input  logic                  det_ready
);
  localparam int unsigned LOGN   = $clog2(N);
  localparam int unsigned NSTORE = (NF - 1) / 2 + 1;

  // control
  logic mf_start, hs_start, step, step_mode;
  logic mf_busy, mf_done, mf_wait, hs_busy, hs_done, hs_wait;
  logic [31:0] b_first, b_last, det_count, blk_count;
  logic [NHARM-1:0][31:0] thresh;

  // template memory
  logic tpl_we, tpl_re, tpl_rd_en;
  logic [7:0] tpl_wp, tpl_rp, tpl_rd_iter;
  logic [LOGN-1:0] tpl_wk, tpl_rk, tpl_rd_k;
  logic [2*TPL_W-1:0] tpl_wdata, tpl_rdata;
  logic [LP-1:0][2*TPL_W-1:0] tpl_rd_data;

  // FOP port users: 0 matched filter, 1 harmonic summer, 2 host
  logic [2:0]       m_req, m_gnt, m_rvalid;
  fop_req_t         m_bus [3];
  logic [POW_W-1:0] m_rdata;
  logic [ADDR_W-1:0] mf_addr, hs_addr, host_fop_addr;
  logic [POW_W-1:0]  mf_wdata;

  fdas_regs #(.N(N), .NH(NHARM), .TW(TPL_W)) u_regs (
    .clk, .rst_n,
    .host_wr, .host_rd, .host_addr, .host_wdata, .host_rvalid, .host_rdata,
    .mf_start, .hs_start, .step, .step_mode, .b_first, .b_last, .thresh,
    .mf_busy, .mf_done, .hs_busy, .hs_done, .waiting(mf_wait || hs_wait),
    .det_count, .blk_count,
    .tpl_we, .tpl_wp, .tpl_wk, .tpl_wdata, .tpl_re, .tpl_rp, .tpl_rk, .tpl_rdata,
    .fop_req(m_req[2]), .fop_addr(host_fop_addr), .fop_gnt(m_gnt[2]),
    .fop_rvalid(m_rvalid[2]), .fop_rdata(m_rdata));

  template_mem #(.N(N), .NSTORE(NSTORE), .LANES(LP), .TW(TPL_W)) u_tpl (
    .clk,
    .rd_en(tpl_rd_en), .rd_iter(tpl_rd_iter), .rd_k(tpl_rd_k), .rd_data(tpl_rd_data),
    .hw_en(tpl_we), .hw_p(tpl_wp), .hw_k(tpl_wk), .hw_data(tpl_wdata),
    .hr_en(tpl_re), .hr_p(tpl_rp), .hr_k(tpl_rk), .hr_data(tpl_rdata));

  matched_filter #(.N(N), .TAPS(TAPS), .NF(NF), .LP(LP), .NP(NP), .PSHIFT(PSHIFT)) u_mf (
    .clk, .rst_n, .start(mf_start), .step_mode, .step,
    .busy(mf_busy), .done(mf_done), .waiting(mf_wait), .blk_count,
    .in_valid, .in_ready, .in_re, .in_im,
    .tpl_rd_en, .tpl_rd_iter, .tpl_rd_k, .tpl_rd_data,
    .mem_req(m_req[0]), .mem_addr(mf_addr), .mem_wdata(mf_wdata), .mem_gnt(m_gnt[0]));

  harmonic_summer #(.NF(NF), .NH(NHARM)) u_hs (
    .clk, .rst_n, .start(hs_start), .b_first, .b_last, .thresh, .step_mode, .step,
    .busy(hs_busy), .done(hs_done), .waiting(hs_wait), .det_count,
    .mem_req(m_req[1]), .mem_addr(hs_addr), .mem_gnt(m_gnt[1]),
    .mem_rvalid(m_rvalid[1]), .mem_rdata(m_rdata),
    .det_valid, .det, .det_ready);

  always_comb begin
    m_bus[0] = '{we: 1'b1, addr: mf_addr,       wdata: mf_wdata};
    m_bus[1] = '{we: 1'b0, addr: hs_addr,       wdata: '0};
    m_bus[2] = '{we: 1'b0, addr: host_fop_addr, wdata: '0};
  end

  fop_arbiter #(.NPORT(3), .DEPTH(32)) u_arb (
    .clk, .rst_n, .m_req, .m_bus, .m_gnt, .m_rvalid, .m_rdata,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata);
endmodule
