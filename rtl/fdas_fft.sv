// fdas_fft: in-place radix-2 decimation-in-time complex FFT, forward or inverse.
//
// This is the transform engine of the FFT-based FIR convolution: one instance
// transforms each input segment to the frequency domain, and one instance per
// filter lane takes the filtered segment back. The transform length N (1024)
// follows the design; the radix-2 in-place structure, widths and scaling are
// this design's own choices.
//
// How it works: samples are written through the load port in natural order
// and stored at the bit-reversed address. After `start`, the core runs
// log2(N) stages of N/2 butterflies, one butterfly per clock, reading and
// writing the two operands of the butterfly in the same clock. The twiddle
// table is computed at elaboration. With SCALE=1 every stage divides by two,
// so the forward transform returns X[k]/N and cannot overflow; with SCALE=0
// the sums are unscaled and the caller must leave headroom.
//
// Interface and timing: `ld_we/ld_addr/ld_re/ld_im` write one sample per
// clock while idle. `start` (one clock, sampled with `inverse`) begins a
// transform; `busy` is high for exactly N/2*log2(N) clocks and `done` pulses
// on the clock after the last butterfly. The result is read in natural order
// through `rd_addr`, combinationally, until the next load.
module fdas_fft #(
  parameter int unsigned N     = 1024,
  parameter int unsigned W     = 32,   // data width per component
  parameter int unsigned TWW   = 18,   // twiddle width, 1.0 = 2**(TWW-2)
  parameter bit          SCALE = 1'b1  // divide by 2 in every stage
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // load port (natural order)
  input  logic                 ld_we,
  input  logic [$clog2(N)-1:0] ld_addr,
  input  logic signed [W-1:0]  ld_re,
  input  logic signed [W-1:0]  ld_im,
  // control
  input  logic                 start,
  input  logic                 inverse,
  output logic                 busy,
  output logic                 done,
  // result port (natural order)
  input  logic [$clog2(N)-1:0] rd_addr,
  output logic signed [W-1:0]  rd_re,
  output logic signed [W-1:0]  rd_im
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned TSH  = TWW - 2;

  typedef logic signed [TWW-1:0] tw_t;
  typedef logic [N/2*TWW-1:0]    tw_tab_t;

  // cos(2*pi*k/N) or sin(2*pi*k/N), k = 0..N/2-1, in units of 2**-TSH
  function automatic tw_tab_t gen_tab(input bit want_sin);
    tw_tab_t t;
    real     ang, v;
    t = '0;
    for (int k = 0; k < N / 2; k++) begin
      ang = 6.283185307179586 * real'(k) / real'(N);
      v   = want_sin ? $sin(ang) : $cos(ang);
      t[k*TWW +: TWW] = tw_t'($rtoi(v * real'(1 << TSH) + (v >= 0.0 ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam tw_tab_t COS_TAB = gen_tab(1'b0);
  localparam tw_tab_t SIN_TAB = gen_tab(1'b1);

  function automatic logic [LOGN-1:0] bitrev(input logic [LOGN-1:0] a);
    for (int i = 0; i < LOGN; i++) bitrev[i] = a[LOGN-1-i];
  endfunction

  logic signed [W-1:0] mem_re [N];
  logic signed [W-1:0] mem_im [N];

  logic [$clog2(LOGN+1)-1:0] stage;
  logic [LOGN-2:0]           bfly;
  logic                      inv_q;

  // butterfly addressing
  logic [LOGN-1:0] a_idx, b_idx, tw_idx, low_mask;
  always_comb begin
    low_mask = LOGN'((1 << stage) - 1);
    a_idx  = ((LOGN'(bfly) & ~low_mask) << 1) | (LOGN'(bfly) & low_mask);
    b_idx  = a_idx | LOGN'(1 << stage);
    tw_idx = LOGN'((LOGN'(bfly) & low_mask) << (LOGN - 1 - stage));
  end

  // butterfly arithmetic
  localparam int unsigned PW = W + TWW + 1;
  tw_t                  w_re, w_im;
  logic signed [W-1:0]  a_re, a_im, b_re, b_im;
  logic signed [PW-1:0] p_re, p_im;
  logic signed [W:0]    t_re, t_im;
  logic signed [W+1:0]  s0_re, s0_im, s1_re, s1_im;
  logic signed [W-1:0]  y0_re, y0_im, y1_re, y1_im;

  function automatic logic signed [W-1:0] fit(input logic signed [W+1:0] v);
    // optional halving with round-half-up, then wrap to W bits
    logic signed [W+1:0] r;
    r = SCALE ? ((v + 1) >>> 1) : v;
    return r[W-1:0];
  endfunction

  always_comb begin
    w_re = COS_TAB[tw_idx[LOGN-2:0]*TWW +: TWW];
    // forward: exp(-j*theta), inverse: exp(+j*theta)
    w_im = inv_q ? SIN_TAB[tw_idx[LOGN-2:0]*TWW +: TWW] : -SIN_TAB[tw_idx[LOGN-2:0]*TWW +: TWW];
    a_re = mem_re[a_idx];
    a_im = mem_im[a_idx];
    b_re = mem_re[b_idx];
    b_im = mem_im[b_idx];
    p_re = PW'(b_re) * PW'(w_re) - PW'(b_im) * PW'(w_im) + PW'(1 << (TSH - 1));
    p_im = PW'(b_re) * PW'(w_im) + PW'(b_im) * PW'(w_re) + PW'(1 << (TSH - 1));
    t_re = (W+1)'(p_re >>> TSH);
    t_im = (W+1)'(p_im >>> TSH);
    s0_re = (W+2)'(a_re) + (W+2)'(t_re);
    s0_im = (W+2)'(a_im) + (W+2)'(t_im);
    s1_re = (W+2)'(a_re) - (W+2)'(t_re);
    s1_im = (W+2)'(a_im) - (W+2)'(t_im);
    y0_re = fit(s0_re);
    y0_im = fit(s0_im);
    y1_re = fit(s1_re);
    y1_im = fit(s1_im);
  end

  // sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      stage <= '0;
      bfly  <= '0;
      inv_q <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          stage <= '0;
          bfly  <= '0;
          inv_q <= inverse;
        end
      end else begin
        bfly <= bfly + 1'b1;
        if (&bfly) begin
          if (stage == LOGN - 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
          stage <= stage + 1'b1;
        end
      end
    end
  end

  // sample memory: load port while idle, butterflies while busy
  always_ff @(posedge clk) begin
    if (busy) begin
      mem_re[a_idx] <= y0_re;
      mem_im[a_idx] <= y0_im;
      mem_re[b_idx] <= y1_re;
      mem_im[b_idx] <= y1_im;
    end else if (ld_we) begin
      mem_re[bitrev(ld_addr)] <= ld_re;
      mem_im[bitrev(ld_addr)] <= ld_im;
    end
  end

  assign rd_re = mem_re[rd_addr];
  assign rd_im = mem_im[rd_addr];

  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(busy && ld_we))
    else $error("fdas_fft: load while a transform runs");
endmodule
