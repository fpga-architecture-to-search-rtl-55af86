// fdas_regs: host register block of the FDAS engine.
//
// The host controls the engine over a simple register bus (in the system it
// sits behind the PCIe interface). The block holds the configuration
// (harmonic-sum range and thresholds, single-step mode), starts the matched
// filter and the harmonic summer, reports status, and gives the host the
// diagnostic paths: templates can be written and read back for verification,
// the filter-output plane can be read word by word straight from FOP memory,
// and in single-step mode each segment or fundamental bin waits for a step
// command. Those functions follow the design; the register map (fdas_pkg
// reg_addr_e) and the bus protocol are this design's own.
//
// Interface and timing: a write (`host_wr`) takes effect at the clock edge.
// A read (`host_rd`) is answered by `host_rvalid`/`host_rdata`: one clock later
// for plain registers, two for template read-back, and after the memory's
// latency for FOP reads. The host issues no new access while a read is
// pending. Template and FOP data ports advance their address after each
// access, so blocks are transferred by repeated accesses to one register.
module fdas_regs
  import fdas_pkg::*;
#(
  parameter int unsigned N  = NFFT,
  parameter int unsigned NH = NHARM,
  parameter int unsigned TW = TPL_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host bus
  input  logic                     host_wr,
  input  logic                     host_rd,
  input  logic [7:0]               host_addr,
  input  logic [REG_W-1:0]         host_wdata,
  output logic                     host_rvalid,
  output logic [REG_W-1:0]         host_rdata,
  // control
  output logic                     mf_start,
  output logic                     hs_start,
  output logic                     step,
  output logic                     step_mode,
  output logic [31:0]              b_first,
  output logic [31:0]              b_last,
  output logic [NH-1:0][31:0]      thresh,
  // status
  input  logic                     mf_busy,
  input  logic                     mf_done,
  input  logic                     hs_busy,
  input  logic                     hs_done,
  input  logic                     waiting,
  input  logic [31:0]              det_count,
  input  logic [31:0]              blk_count,
  // template memory host port
  output logic                     tpl_we,
  output logic [7:0]               tpl_wp,
  output logic [$clog2(N)-1:0]     tpl_wk,
  output logic [2*TW-1:0]          tpl_wdata,
  output logic                     tpl_re,
  output logic [7:0]               tpl_rp,
  output logic [$clog2(N)-1:0]     tpl_rk,
  input  logic [2*TW-1:0]          tpl_rdata,
  // FOP read port
  output logic                     fop_req,
  output logic [ADDR_W-1:0]        fop_addr,
  input  logic                     fop_gnt,
  input  logic                     fop_rvalid,
  input  logic [POW_W-1:0]         fop_rdata
);
  localparam int unsigned LOGN = $clog2(N);

  typedef enum logic [2:0] {R_IDLE, R_TPL1, R_TPL2, R_FOP_REQ, R_FOP_WAIT} rstate_e;
  rstate_e rstate;

  logic [7:0]      tpl_p;
  logic [LOGN-1:0] tpl_k;
  logic            mf_done_f, hs_done_f;

  // template address advances bin by bin, then template by template
  function automatic logic [8+LOGN-1:0] tpl_next(input logic [7:0] p, input logic [LOGN-1:0] k);
    if (k == LOGN'(N - 1)) return {p + 8'd1, LOGN'(0)};
    return {p, k + 1'b1};
  endfunction

  logic is_reg_rd;
  assign is_reg_rd = host_rd && (host_addr != REG_TPL_DATA) && (host_addr != REG_FOP_DATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mf_start    <= 1'b0;
      hs_start    <= 1'b0;
      step        <= 1'b0;
      step_mode   <= 1'b0;
      b_first     <= 32'd1;
      b_last      <= 32'd1;
      thresh      <= '1;
      tpl_p       <= '0;
      tpl_k       <= '0;
      fop_addr    <= '0;
      mf_done_f   <= 1'b0;
      hs_done_f   <= 1'b0;
      host_rvalid <= 1'b0;
      host_rdata  <= '0;
      rstate      <= R_IDLE;
    end else begin
      mf_start    <= 1'b0;
      hs_start    <= 1'b0;
      step        <= 1'b0;
      host_rvalid <= 1'b0;
      if (mf_done) mf_done_f <= 1'b1;
      if (hs_done) hs_done_f <= 1'b1;

      if (host_wr) begin
        unique casez (host_addr)
          REG_CTRL: begin
            mf_start <= host_wdata[0];
            hs_start <= host_wdata[1];
            step     <= host_wdata[2];
            if (host_wdata[0]) mf_done_f <= 1'b0;
            if (host_wdata[1]) hs_done_f <= 1'b0;
          end
          REG_MODE:      step_mode <= host_wdata[0];
          REG_HS_BSTART: b_first   <= host_wdata;
          REG_HS_BEND:   b_last    <= host_wdata;
          REG_TPL_ADDR: begin
            tpl_p <= host_wdata[23:16];
            tpl_k <= LOGN'(host_wdata[15:0]);
          end
          REG_TPL_DATA:  {tpl_p, tpl_k} <= tpl_next(tpl_p, tpl_k);
          REG_FOP_ADDR:  fop_addr  <= ADDR_W'(host_wdata);
          8'b0010_0???:  if (32'(host_addr[2:0]) < NH) thresh[host_addr[2:0]] <= host_wdata;
          default: ;
        endcase
      end

      if (is_reg_rd) begin
        host_rvalid <= 1'b1;
        unique casez (host_addr)
          REG_MODE:      host_rdata <= REG_W'(step_mode);
          REG_STATUS:    host_rdata <= REG_W'({hs_done_f, mf_done_f, waiting, hs_busy, mf_busy});
          REG_HS_BSTART: host_rdata <= b_first;
          REG_HS_BEND:   host_rdata <= b_last;
          REG_DETCNT:    host_rdata <= det_count;
          REG_BLKCNT:    host_rdata <= blk_count;
          REG_TPL_ADDR:  host_rdata <= REG_W'({tpl_p, 16'(tpl_k)});
          REG_FOP_ADDR:  host_rdata <= REG_W'(fop_addr);
          8'b0010_0???:  host_rdata <= (32'(host_addr[2:0]) < NH) ? thresh[host_addr[2:0]] : '0;
          default:       host_rdata <= '0;
        endcase
      end

      unique case (rstate)
        R_IDLE: begin
          if (host_rd && host_addr == REG_TPL_DATA) rstate <= R_TPL1;
          if (host_rd && host_addr == REG_FOP_DATA) rstate <= R_FOP_REQ;
        end
        R_TPL1: rstate <= R_TPL2;
        R_TPL2: begin
          host_rvalid    <= 1'b1;
          host_rdata     <= REG_W'(tpl_rdata);
          {tpl_p, tpl_k} <= tpl_next(tpl_p, tpl_k);
          rstate         <= R_IDLE;
        end
        R_FOP_REQ: if (fop_gnt) rstate <= R_FOP_WAIT;
        R_FOP_WAIT: if (fop_rvalid) begin
          host_rvalid <= 1'b1;
          host_rdata  <= REG_W'(fop_rdata);
          fop_addr    <= fop_addr + 1'b1;
          rstate      <= R_IDLE;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  assign tpl_we    = host_wr && (host_addr == REG_TPL_DATA);
  assign tpl_wp    = tpl_p;
  assign tpl_wk    = tpl_k;
  assign tpl_wdata = host_wdata[2*TW-1:0];
  assign tpl_re    = (rstate == R_TPL1);
  assign tpl_rp    = tpl_p;
  assign tpl_rk    = tpl_k;
  assign fop_req   = (rstate == R_FOP_REQ);

  a_one_read_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
    rstate != R_IDLE |-> !(host_rd || host_wr))
    else $error("fdas_regs: host access while a read is pending");
endmodule
