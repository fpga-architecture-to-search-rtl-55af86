// fdas_pkg: constants and types shared by the Fourier-domain acceleration
// search (FDAS) blocks.
//
// The defaults describe the main configuration: a spectrum of 2^22 complex
// Fourier bins, 85 matched filters numbered -42..42, a 1024-point FFT for the
// FFT-based convolution and harmonic sums of up to eight harmonics. The filter
// length (421 taps), the word widths and the number of lanes that run in
// parallel are this design's own choices.
package fdas_pkg;

  // Spectrum and filter-output-plane (FOP) geometry
  localparam int unsigned NPTS      = 4194304; // bins per spectrum, 2^22
  localparam int unsigned NFFT      = 1024;    // convolution FFT length
  localparam int unsigned NTAPS     = 421;     // longest template, in bins
  localparam int unsigned NHALF     = 42;      // filters -NHALF..+NHALF
  localparam int unsigned NFILT     = 2 * NHALF + 1; // 85 filter rows
  localparam int unsigned LANE_PAIRS = 8;      // +p/-p IFFT lane pairs
  localparam int unsigned NHARM     = 8;       // harmonics summed

  // Word widths
  localparam int unsigned IN_W   = 16;  // input spectrum, per component
  localparam int unsigned FFT_W  = 32;  // FFT datapath, per component
  localparam int unsigned TPL_W  = 16;  // template coefficient, per component
  localparam int unsigned POW_W  = 32;  // FOP word (detected power)
  localparam int unsigned ADDR_W = 32;  // FOP memory word address
  localparam int unsigned SUM_W  = 36;  // harmonic sum
  localparam int unsigned REG_W  = 32;  // host register data

  // One request on the FOP memory port (a word address, one word per beat)
  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [POW_W-1:0]  wdata;
  } fop_req_t;

  // One harmonic-sum detection
  typedef struct packed {
    logic [31:0]        bin;    // fundamental frequency bin
    logic signed [7:0]  filt;   // fundamental filter number (-42..42)
    logic [NHARM-1:0]   mask;   // bit k-1 set: sum of k harmonics over threshold
    logic [SUM_W-1:0]   power;  // sum for the highest k set in mask
  } det_t;

  // Host register map (word addresses)
  typedef enum logic [7:0] {
    REG_CTRL      = 8'h00, // W: bit0 start matched filter, bit1 start harmonic sum, bit2 step
    REG_MODE      = 8'h01, // RW: bit0 single-step mode
    REG_STATUS    = 8'h02, // R: bit0 mf busy, bit1 hs busy, bit2 waiting for step, bit3 mf done, bit4 hs done
    REG_HS_BSTART = 8'h03, // RW: first fundamental bin
    REG_HS_BEND   = 8'h04, // RW: last fundamental bin
    REG_DETCNT    = 8'h05, // R: detections reported since last hs start
    REG_BLKCNT    = 8'h06, // R: convolution blocks finished
    REG_TPL_ADDR  = 8'h10, // RW: template index p [26:16], bin k [15:0]
    REG_TPL_DATA  = 8'h11, // W: write coefficient {re,im} and advance k; R: read it back
    REG_FOP_ADDR  = 8'h12, // RW: FOP word address
    REG_FOP_DATA  = 8'h13, // R: read FOP word and advance the address
    REG_THRESH0   = 8'h20  // RW: 8'h20 + k-1, threshold for a sum of k harmonics
  } reg_addr_e;

endpackage
