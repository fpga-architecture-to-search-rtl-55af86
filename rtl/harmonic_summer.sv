// harmonic_summer: searches the filter-output plane (FOP) for periodic
// signals by summing the power of up to NHARM harmonics.
//
// For a fundamental at bin b and filter f, harmonic h lies near bin h*b and
// filter h*f: the frequency drift caused by an acceleration grows in
// proportion to the harmonic number, so harmonic h is recovered by the filter
// h times further from the zero-acceleration row. Because the fundamental need
// not be bin-centred, harmonic h may fall in any of the bins
// h*b - floor(h/2) .. h*b + floor(h/2) (1,3,3,5,5,7,7,9 bins, 40 in all for
// eight harmonics). The summer therefore works one fundamental bin at a time:
//   1. Read phase: for h = 1..NHARM it reads, as one linear burst, the columns
//      h*b-floor(h/2) .. h*b+floor(h/2) of the column-ordered FOP (all NFILT
//      filters of each column are adjacent in memory) and keeps, per filter,
//      the largest power over those neighbouring bins.
//   2. Sum phase: for every filter f it runs the chain of adders
//      S_k = S_(k-1) + H_k[k*f], k = 1..NHARM, compares each S_k with its
//      threshold T_k and reports (b, f) when any sum exceeds its threshold.
//      Sums whose harmonic filter k*f lies outside -NHALF..NHALF are invalid.
//      The chain is registered after every adder (NHARM stages), so one
//      filter row enters per clock and its result leaves NHARM clocks later.
// The harmonic positions, the 40-bin neighbourhoods, the row scaling with the
// harmonic number and the staged adder chain follow the design. Taking the maximum
// over neighbouring bins, the per-k thresholds and the detection record are
// this design's own choices.
//
// Interface and timing: `start` (with b_first, b_last and thresh stable)
// begins a search over b_first..b_last; `busy` stays high until the last
// detection is accepted, then `done` pulses. Reads go out on the FOP port
// (`mem_req`/`mem_gnt` handshake, one word address per request); data returns
// in order on `mem_rvalid`/`mem_rdata` with any latency. Detections leave on a
// valid/ready stream. With `step_mode` set the summer halts after each
// fundamental bin (`waiting` high) until `step` is pulsed.
module harmonic_summer
  import fdas_pkg::*;
#(
  parameter int unsigned NF     = NFILT, // filters in the FOP (odd)
  parameter int unsigned NH     = NHARM, // harmonics summed
  parameter int unsigned PWID   = POW_W,
  parameter int unsigned SW     = SUM_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [31:0]           b_first,
  input  logic [31:0]           b_last,
  input  logic [NH-1:0][31:0]   thresh,    // thresh[k-1]: threshold of S_k
  input  logic                  step_mode,
  input  logic                  step,
  output logic                  busy,
  output logic                  done,
  output logic                  waiting,
  output logic [31:0]           det_count,
  // FOP read port
  output logic                  mem_req,
  output logic [ADDR_W-1:0]     mem_addr,
  input  logic                  mem_gnt,
  input  logic                  mem_rvalid,
  input  logic [PWID-1:0]       mem_rdata,
  // detections
  output logic                  det_valid,
  output det_t                  det,
  input  logic                  det_ready
);
  localparam int unsigned HALF = (NF - 1) / 2;
  localparam int unsigned RW   = $clog2(NF);
  localparam int unsigned HW   = $clog2(NH + 1);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_SUM, S_DRAIN, S_NEXT, S_STEP} state_e;
  state_e state;

  logic [31:0] b;

  // request and response sequence counters: harmonic, column offset, row
  logic [HW-1:0] q_h, r_h;
  logic [7:0]    q_j, r_j;
  logic [RW-1:0] q_r, r_r;
  logic          q_done;

  function automatic logic [7:0] span(input logic [HW-1:0] h); // 2*floor(h/2)
    return 8'((32'(h) / 2) * 2);
  endfunction

  // per-harmonic maxima over the neighbouring bins, one word per filter
  logic [PWID-1:0] hmax [NH][NF];

  always_comb begin
    logic [31:0] col;
    col      = 32'(q_h) * b - 32'(q_h) / 2 + 32'(q_j);
    mem_addr = ADDR_W'(col * NF + 32'(q_r));
    mem_req  = (state == S_READ) && !q_done;
  end

  // sum phase: the adder chain is staged, one harmonic per stage, so a new
  // fundamental filter row enters every clock and leaves NH clocks later.
  // Stage k adds H_(k+1)[(k+1)*f] to the running sum and marks whether that
  // sum passed its threshold. The whole chain holds while a detection waits.
  logic [RW-1:0] s_r;                      // next fundamental row to issue
  logic          s_issue;
  logic          adv;
  logic          st_v [NH], nx_v [NH];
  logic [RW-1:0] st_r [NH], nx_r [NH];
  logic          st_ok[NH], nx_ok[NH];
  logic [SW-1:0] st_run[NH], nx_run[NH];
  logic [NH-1:0] st_mask[NH], nx_mask[NH];
  logic [SW-1:0] st_pow[NH], nx_pow[NH];

  assign adv     = !det_valid || det_ready;
  assign s_issue = (state == S_SUM) && adv;

  always_comb begin
    for (int k = 0; k < NH; k++) begin
      logic          iok, over;
      logic [SW-1:0] irun, ipow;
      logic [NH-1:0] imask;
      int            f, row;
      if (k == 0) begin
        nx_v[k] = s_issue;
        nx_r[k] = s_r;
        iok     = 1'b1;
        irun    = '0;
        imask   = '0;
        ipow    = '0;
      end else begin
        nx_v[k] = st_v[k-1];
        nx_r[k] = st_r[k-1];
        iok     = st_ok[k-1];
        irun    = st_run[k-1];
        imask   = st_mask[k-1];
        ipow    = st_pow[k-1];
      end
      f          = int'(nx_r[k]) - int'(HALF);
      row        = int'(HALF) + (k + 1) * f;
      nx_ok[k]   = iok && (row >= 0) && (row < int'(NF));
      nx_run[k]  = irun + (nx_ok[k] ? SW'(hmax[k][nx_ok[k] ? row : 0]) : '0);
      over       = nx_ok[k] && (nx_run[k] > SW'(thresh[k]));
      nx_mask[k] = imask | (NH'(over) << k);
      nx_pow[k]  = over ? nx_run[k] : ipow;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NH; k++) begin
        st_v[k]    <= 1'b0;
        st_r[k]    <= '0;
        st_ok[k]   <= 1'b0;
        st_run[k]  <= '0;
        st_mask[k] <= '0;
        st_pow[k]  <= '0;
      end
    end else if (adv) begin
      for (int k = 0; k < NH; k++) begin
        st_v[k]    <= nx_v[k];
        st_r[k]    <= nx_r[k];
        st_ok[k]   <= nx_ok[k];
        st_run[k]  <= nx_run[k];
        st_mask[k] <= nx_mask[k];
        st_pow[k]  <= nx_pow[k];
      end
    end
  end

  logic chain_busy;
  always_comb begin
    chain_busy = 1'b0;
    for (int k = 0; k < NH; k++) chain_busy = chain_busy || st_v[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      busy      <= 1'b0;
      done      <= 1'b0;
      b         <= '0;
      q_h <= '0; q_j <= '0; q_r <= '0; q_done <= 1'b0;
      r_h <= '0; r_j <= '0; r_r <= '0;
      s_r       <= '0;
      det_valid <= 1'b0;
      det       <= '0;
      det_count <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          busy      <= 1'b1;
          b         <= b_first;
          det_count <= '0;
          q_h <= HW'(1); q_j <= '0; q_r <= '0; q_done <= 1'b0;
          r_h <= HW'(1); r_j <= '0; r_r <= '0;
          state     <= S_READ;
        end
        S_READ: begin
          if (mem_req && mem_gnt) begin
            if (q_r == RW'(NF - 1)) begin
              q_r <= '0;
              if (q_j == span(q_h)) begin
                q_j <= '0;
                if (q_h == HW'(NH)) q_done <= 1'b1;
                else q_h <= q_h + 1'b1;
              end else q_j <= q_j + 1'b1;
            end else q_r <= q_r + 1'b1;
          end
          if (mem_rvalid) begin
            if (r_r == RW'(NF - 1)) begin
              r_r <= '0;
              if (r_j == span(r_h)) begin
                r_j <= '0;
                if (r_h == HW'(NH)) begin
                  state <= S_SUM;
                  s_r   <= '0;
                end else r_h <= r_h + 1'b1;
              end else r_j <= r_j + 1'b1;
            end else r_r <= r_r + 1'b1;
          end
        end
        S_SUM: if (s_issue) begin
          if (s_r == RW'(NF - 1)) state <= S_DRAIN;
          else s_r <= s_r + 1'b1;
        end
        S_DRAIN: if (!chain_busy && !det_valid) state <= S_NEXT;
        S_NEXT: begin
          if (b == b_last) begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            b <= b + 1'b1;
            q_h <= HW'(1); q_j <= '0; q_r <= '0; q_done <= 1'b0;
            r_h <= HW'(1); r_j <= '0; r_r <= '0;
            state <= step_mode ? S_STEP : S_READ;
          end
        end
        S_STEP: if (step) state <= S_READ;
        default: state <= S_IDLE;
      endcase
      if (det_valid && det_ready) begin
        det_valid <= 1'b0;
        det_count <= det_count + 1'b1;
      end
      if (adv && st_v[NH-1] && |st_mask[NH-1]) begin
        det_valid <= 1'b1;
        det.bin   <= b;
        det.filt  <= 8'(int'(st_r[NH-1]) - int'(HALF));
        det.mask  <= NHARM'(st_mask[NH-1]);
        det.power <= st_pow[NH-1];
      end
    end
  end

  // neighbouring-bin maximum, kept per harmonic and filter (no reset needed:
  // the first bin of every harmonic overwrites it)
  always_ff @(posedge clk) begin
    if (state == S_READ && mem_rvalid && (r_j == 0 || mem_rdata > hmax[r_h-1][r_r]))
      hmax[r_h-1][r_r] <= mem_rdata;
  end

  assign waiting = (state == S_STEP);

  a_det_stable: assert property (@(posedge clk) disable iff (!rst_n)
    det_valid && !det_ready |=> det_valid && $stable(det))
    else $error("harmonic_summer: detection changed while stalled");
endmodule
