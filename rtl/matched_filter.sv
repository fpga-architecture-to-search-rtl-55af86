// matched_filter: convolves the input spectrum with every acceleration
// template and writes the detected power to the filter-output plane (FOP).
//
// The complex spectrum (NPTS Fourier bins) arrives as a stream. Each filter is
// an FIR of up to NTAPS taps running along the frequency bins; all NFILT
// filters (numbered -HALF..+HALF) are applied with FFT-based convolution by
// overlap-save:
//   * The input is cut into segments of N bins that overlap by NTAPS-1; each
//     segment yields V = N-NTAPS+1 new output bins. A ring buffer of N words
//     holds the current segment, and each segment needs only V new inputs.
//   * The segment is transformed once (forward FFT, kept for the whole segment).
//   * The templates (FFTs of the filters) are applied in NITER iterations of
//     LP lane pairs. Lane pair l multiplies by template p = iter*LP + l and by
//     its conjugate, giving filters +p and -p from one stored template; each
//     lane then runs an inverse FFT.
//   * Filters are centred: template p is the FFT of taps h_p[-D..D]
//     (D = (NTAPS-1)/2) placed at circular positions j mod N. The conjugate
//     of that template is the FFT of conj(h_p[-j]), which has the same
//     support, so filters +p and -p share one valid output window: segment
//     positions D..N-1-D, and output bin c lines up with input bin c.
//   * Those V outputs of every lane are detected (|.|^2) and written to the
//     FOP in column order: the word for bin c and filter f is at address
//     c*NFILT + f + HALF, so all filters of one bin are adjacent.
// The FFT convolution, 1024-point transforms, 85 filters in groups handled in
// iterations, the conjugate filters for negative accelerations and the
// column-ordered FOP follow the design. The overlap-save scheme, the filter
// length, the lane count, the centred template layout and all widths
// are this design's own choices. NTAPS must be odd.
//
// Scaling: inputs are shifted left by PRE = W-IN_W-2 bits and both FFTs halve
// every stage, so the complex output equals the true convolution times
// 2**PRE/N. The FOP word is then (|y|^2 >> PSHIFT), saturated.
//
// Interface and timing: `start` begins one spectrum; the stream
// (`in_valid`/`in_ready`) is read at up to one bin per clock while a segment
// fills. Templates are read from template_mem (one clock latency). FOP words go
// out on a `mem_req`/`mem_gnt` write port, one per clock when granted. `done`
// pulses after the last FOP word. With `step_mode` set the engine halts after
// each segment (`waiting`) until `step` is pulsed.
module matched_filter
  import fdas_pkg::*;
#(
  parameter int unsigned N      = NFFT,
  parameter int unsigned TAPS   = NTAPS,
  parameter int unsigned NF     = NFILT,
  parameter int unsigned LP     = LANE_PAIRS,
  parameter int unsigned NP     = NPTS,
  parameter int unsigned IW     = IN_W,
  parameter int unsigned W      = FFT_W,
  parameter int unsigned TW     = TPL_W,
  parameter int unsigned PWID   = POW_W,
  parameter int unsigned PSHIFT = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      step_mode,
  input  logic                      step,
  output logic                      busy,
  output logic                      done,
  output logic                      waiting,
  output logic [31:0]               blk_count,
  // input spectrum
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic signed [IW-1:0]      in_re,
  input  logic signed [IW-1:0]      in_im,
  // template read port (template_mem)
  output logic                      tpl_rd_en,
  output logic [7:0]                tpl_rd_iter,
  output logic [$clog2(N)-1:0]      tpl_rd_k,
  input  logic [LP-1:0][2*TW-1:0]   tpl_rd_data,
  // FOP write port
  output logic                      mem_req,
  output logic [ADDR_W-1:0]         mem_addr,
  output logic [PWID-1:0]           mem_wdata,
  input  logic                      mem_gnt
);
  localparam int unsigned LOGN   = $clog2(N);
  localparam int unsigned OVL    = TAPS - 1;
  localparam int unsigned V      = N - OVL;
  localparam int unsigned D      = OVL / 2;             // filter half-length
  localparam int unsigned LEAD   = D;                   // zero bins ahead of bin 0
  localparam int unsigned HALF   = (NF - 1) / 2;
  localparam int unsigned NSTORE = HALF + 1;
  localparam int unsigned NITER  = (NSTORE + LP - 1) / LP;
  localparam int unsigned NBLK   = (NP + V - 1) / V;
  localparam int unsigned NL     = 2 * LP;
  localparam int unsigned PRE    = W - IW - 2;
  localparam int unsigned LW     = $clog2(NL);

  typedef enum logic [3:0] {
    S_IDLE, S_CLEAR, S_FILL, S_LOAD, S_FWD, S_FWD_WAIT, S_MUL, S_INV, S_INV_WAIT,
    S_OUT, S_BLKEND, S_STEP
  } state_e;
  state_e state;

  // ---------------------------------------------------------------- ring buffer
  logic signed [IW-1:0] ring_re [N];
  logic signed [IW-1:0] ring_im [N];
  logic [LOGN-1:0]      wp, base;
  logic [31:0]          in_cnt;     // input bins consumed
  logic [LOGN:0]        fill_left;
  logic [LOGN:0]        cnt;        // general counter (load, multiply, clear)
  logic [7:0]           iter;
  logic [31:0]          blk;

  logic ring_we;
  logic signed [IW-1:0] ring_wre, ring_wim;
  always_comb begin
    in_ready = (state == S_FILL) && (fill_left != 0) && (in_cnt < NP);
    ring_we  = 1'b0;
    ring_wre = '0;
    ring_wim = '0;
    if (state == S_CLEAR) ring_we = 1'b1;
    else if (state == S_FILL && fill_left != 0) begin
      if (in_cnt < NP) begin
        ring_we  = in_valid;
        ring_wre = in_re;
        ring_wim = in_im;
      end else ring_we = 1'b1;           // past the last bin: zero padding
    end
  end

  always_ff @(posedge clk) begin
    if (ring_we) begin
      ring_re[wp] <= ring_wre;
      ring_im[wp] <= ring_wim;
    end
  end

  // ---------------------------------------------------------------- forward FFT
  logic                 f_ld_we, f_start, f_busy, f_done;
  logic [LOGN-1:0]      f_ld_addr, f_rd_addr;
  logic signed [W-1:0]  f_ld_re, f_ld_im, f_rd_re, f_rd_im;
  logic [LOGN-1:0]      ring_ra;

  assign ring_ra   = base + LOGN'(cnt);
  assign f_ld_we   = (state == S_LOAD);
  assign f_ld_addr = LOGN'(cnt);
  assign f_ld_re   = W'(ring_re[ring_ra]) <<< PRE;
  assign f_ld_im   = W'(ring_im[ring_ra]) <<< PRE;
  assign f_start   = (state == S_FWD);
  assign f_rd_addr = LOGN'(cnt);

  fdas_fft #(.N(N), .W(W), .SCALE(1'b1)) u_fwd (
    .clk, .rst_n, .ld_we(f_ld_we), .ld_addr(f_ld_addr), .ld_re(f_ld_re), .ld_im(f_ld_im),
    .start(f_start), .inverse(1'b0), .busy(f_busy), .done(f_done),
    .rd_addr(f_rd_addr), .rd_re(f_rd_re), .rd_im(f_rd_im));

  // ------------------------------------------------- template multiply (1 clock)
  logic                 mul_v;
  logic [LOGN-1:0]      mul_k;
  logic signed [W-1:0]  x_re_q, x_im_q;

  assign tpl_rd_en   = (state == S_MUL) && (cnt < N);
  assign tpl_rd_iter = iter;
  assign tpl_rd_k    = LOGN'(cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mul_v <= 1'b0;
      mul_k <= '0;
      x_re_q <= '0;
      x_im_q <= '0;
    end else begin
      mul_v  <= tpl_rd_en;
      mul_k  <= LOGN'(cnt);
      x_re_q <= f_rd_re;
      x_im_q <= f_rd_im;
    end
  end

  // ----------------------------------------------------------------- IFFT lanes
  // lane 2l: filter +p, lane 2l+1: filter -p, p = iter*LP + l
  logic                     l_start;
  logic [NL-1:0]            l_busy, l_done;
  logic [LOGN-1:0]          l_rd_addr;
  logic signed [W-1:0]      l_rd_re [NL];
  logic signed [W-1:0]      l_rd_im [NL];

  assign l_start = (state == S_INV);

  for (genvar l = 0; l < LP; l++) begin : g_pair
    logic signed [W-1:0] pr, pi, nr, ni;
    conj_pair_mult #(.W(W), .TW(TW)) u_mul (
      .x_re(x_re_q), .x_im(x_im_q),
      .t_re(tpl_rd_data[l][2*TW-1:TW]), .t_im(tpl_rd_data[l][TW-1:0]),
      .pos_re(pr), .pos_im(pi), .neg_re(nr), .neg_im(ni));

    fdas_fft #(.N(N), .W(W), .SCALE(1'b1)) u_pos (
      .clk, .rst_n, .ld_we(mul_v), .ld_addr(mul_k), .ld_re(pr), .ld_im(pi),
      .start(l_start), .inverse(1'b1), .busy(l_busy[2*l]), .done(l_done[2*l]),
      .rd_addr(l_rd_addr), .rd_re(l_rd_re[2*l]), .rd_im(l_rd_im[2*l]));

    fdas_fft #(.N(N), .W(W), .SCALE(1'b1)) u_neg (
      .clk, .rst_n, .ld_we(mul_v), .ld_addr(mul_k), .ld_re(nr), .ld_im(ni),
      .start(l_start), .inverse(1'b1), .busy(l_busy[2*l+1]), .done(l_done[2*l+1]),
      .rd_addr(l_rd_addr), .rd_re(l_rd_re[2*l+1]), .rd_im(l_rd_im[2*l+1]));
  end

  // -------------------------------------------------- detection and FOP writes
  logic [LOGN-1:0] out_n;     // segment position D..N-1-D
  logic [LW:0]     out_l;     // lane
  logic [31:0]     out_col;   // FOP column of out_n
  logic [31:0]     out_p;     // template of lane out_l
  logic            out_neg, out_ok;
  logic [PWID-1:0] out_pow;

  assign l_rd_addr = out_n;
  always_comb begin
    out_p   = 32'(iter) * LP + 32'(out_l) / 2;
    out_neg = out_l[0];
    out_col = blk * V + 32'(out_n) - D;
    out_ok  = (out_p <= HALF) && !(out_neg && out_p == 0) && (out_col < NP);
  end

  power_detect #(.W(W), .PW(PWID), .PSHIFT(PSHIFT)) u_pow (
    .re(l_rd_re[out_l[LW-1:0]]), .im(l_rd_im[out_l[LW-1:0]]), .power(out_pow));

  assign mem_req   = (state == S_OUT) && out_ok;
  assign mem_addr  = ADDR_W'(out_col * NF + (out_neg ? HALF - out_p : HALF + out_p));
  assign mem_wdata = out_pow;

  // ------------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      busy      <= 1'b0;
      done      <= 1'b0;
      wp        <= '0;
      base      <= '0;
      in_cnt    <= '0;
      fill_left <= '0;
      cnt       <= '0;
      iter      <= '0;
      blk       <= '0;
      blk_count <= '0;
      out_n     <= '0;
      out_l     <= '0;
    end else begin
      done <= 1'b0;
      if (ring_we) wp <= wp + 1'b1;
      if (in_ready && in_valid) in_cnt <= in_cnt + 1'b1;
      if (ring_we && state == S_FILL) fill_left <= fill_left - 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          busy      <= 1'b1;
          wp        <= '0;
          base      <= '0;
          in_cnt    <= '0;
          blk       <= '0;
          blk_count <= '0;
          cnt       <= '0;
          state     <= S_CLEAR;
        end
        S_CLEAR: begin                     // zero bins ahead of bin 0
          if (cnt == LEAD - 1) begin
            fill_left <= (LOGN+1)'(N - LEAD);
            state     <= S_FILL;
          end
          cnt <= cnt + 1'b1;
        end
        S_FILL: if (fill_left == 0) begin
          cnt   <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (cnt == N - 1) state <= S_FWD;
          cnt <= cnt + 1'b1;
        end
        S_FWD: state <= S_FWD_WAIT;
        S_FWD_WAIT: if (f_done) begin
          iter  <= '0;
          cnt   <= '0;
          state <= S_MUL;
        end
        S_MUL: begin                       // N reads, products land one clock later
          if (cnt == N) state <= S_INV;
          cnt <= cnt + 1'b1;
        end
        S_INV: state <= S_INV_WAIT;
        S_INV_WAIT: if (l_done[0]) begin
          out_n <= LOGN'(D);
          out_l <= '0;
          state <= S_OUT;
        end
        S_OUT: if (!out_ok || mem_gnt) begin
          if (out_l == (LW+1)'(NL - 1)) begin
            out_l <= '0;
            if (out_n == LOGN'(N - 1 - D)) begin
              if (32'(iter) == NITER - 1) state <= S_BLKEND;
              else begin
                iter  <= iter + 1'b1;
                cnt   <= '0;
                state <= S_MUL;
              end
            end else out_n <= out_n + 1'b1;
          end else out_l <= out_l + 1'b1;
        end
        S_BLKEND: begin
          blk       <= blk + 1'b1;
          blk_count <= blk_count + 1'b1;
          base      <= base + LOGN'(V);
          fill_left <= (LOGN+1)'(V);
          if (blk == NBLK - 1) begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else state <= step_mode ? S_STEP : S_FILL;
        end
        S_STEP: if (step) state <= S_FILL;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign waiting = (state == S_STEP);

  a_write_stable: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req && !mem_gnt |=> mem_req && $stable(mem_addr) && $stable(mem_wdata))
    else $error("matched_filter: FOP write changed while stalled");
endmodule
