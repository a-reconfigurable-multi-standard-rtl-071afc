// qmf_pkg: shared constants and types of the reconfigurable QMF-tree channelizer.
//
// The channelizer splits a wideband IF signal sampled at FS_HZ into subbands with a
// tree of two-channel QMF analysis banks. Every bank uses the same fixed-coefficient
// "parent" low-pass filter H0; the high band uses h1(n) = (-1)^n h0(n). A mode selects
// (a) the tree stage whose subband width equals the mode's channel spacing and
// (b) how many taps of the parent filter are used (symmetric truncation).
//
// Parent filter: the 9-tap example filter with 16 fractional bits, written in
// canonic signed digits (CSD) and factored with the two common subexpressions
//   x2 = x + (x >> 2)   (digit pattern 1 0 1)
//   x3 = x - (x >> 2)   (digit pattern 1 0 -1)
// Each coefficient is a short list of shifted x, x2 or x3 terms (CSE_TERMS below).
// Because the filter is symmetric only taps 0..4 are listed; tap k and tap 8-k share
// one product. Integer values of the coefficients scaled by 2^16:
//   h0 = h8 =   652   h1 = h7 =  3909   h2 = h6 = -2994   h3 = h5 = 20864   h4 = 32768
//
// Mode table (the dual-mode GSM/PDC example): sample rate 25.6 MHz; GSM channel spacing
// 200 kHz -> stage 6, PDC spacing 25 kHz -> stage 9, from 2^s = (FS/2)/spacing.
// PDC needs the most stop-band attenuation, so it uses the whole parent filter (9 taps,
// "mode A"); GSM uses the truncated 5-tap filter ("mode B").
// Data widths (12-bit ADC samples, 18-bit tree words) are this design's own choice.
package qmf_pkg;

  // ---------------- system frequencies and tree depth -----------------------------
  localparam longint unsigned FS_HZ          = 64'd25_600_000;
  localparam longint unsigned GSM_SPACING_HZ = 64'd200_000;
  localparam longint unsigned PDC_SPACING_HZ = 64'd25_000;

  // Stage whose subband width equals the channel spacing: 2^s = (FS/2)/spacing.
  function automatic int stage_for_spacing(longint unsigned fs_hz, longint unsigned spacing_hz);
    longint unsigned ratio;
    int s;
    ratio = (fs_hz / 2) / spacing_hz;
    s = 0;
    while ((64'd1 << s) < ratio) s++;
    return s;
  endfunction

  localparam int GSM_STAGE  = stage_for_spacing(FS_HZ, GSM_SPACING_HZ);  // 6
  localparam int PDC_STAGE  = stage_for_spacing(FS_HZ, PDC_SPACING_HZ);  // 9
  localparam int NUM_STAGES = (GSM_STAGE > PDC_STAGE) ? GSM_STAGE : PDC_STAGE;

  // ---------------- word widths ----------------------------------------------------
  localparam int ADC_W  = 12;  // wideband ADC sample width
  localparam int DATA_W = 18;  // sample width inside the tree (6 guard bits over ADC_W)
  localparam int FRAC   = 16;  // fractional bits of the parent-filter coefficients

  // ---------------- parent filter ---------------------------------------------------
  localparam int PARENT_LEN = 9;                 // taps of the parent filter
  localparam int HALF       = (PARENT_LEN - 1) / 2;  // index of the centre tap
  localparam int MAX_TERMS  = 3;                 // most CSD/CSE terms in one coefficient
  localparam int TRIM_W     = $clog2(HALF + 1);  // width of a truncation amount

  typedef enum logic [1:0] {SRC_NONE = 2'd0, SRC_X1 = 2'd1, SRC_X2 = 2'd2, SRC_X3 = 2'd3} cse_src_e;

  typedef struct packed {
    cse_src_e   src;    // which signal the term takes: x, x2 or x3 (NONE: unused slot)
    logic       neg;    // subtract instead of add
    logic [4:0] shift;  // right shift: the term is src * 2^-shift
  } cse_term_t;

  // Terms of h(0)..h(4); h(8-k) = h(k).
  localparam cse_term_t CSE_TERMS [0:HALF][0:MAX_TERMS-1] = '{
    '{'{SRC_X2, 1'b0, 5'd7},  '{SRC_X3, 1'b0, 5'd12}, '{SRC_NONE, 1'b0, 5'd0}},   // h0
    '{'{SRC_X1, 1'b0, 5'd4},  '{SRC_X3, 1'b1, 5'd8},  '{SRC_X2,   1'b0, 5'd14}},  // h1
    '{'{SRC_X3, 1'b1, 5'd4},  '{SRC_X2, 1'b0, 5'd10}, '{SRC_X1,   1'b1, 5'd15}},  // h2
    '{'{SRC_X2, 1'b0, 5'd2},  '{SRC_X3, 1'b0, 5'd7},  '{SRC_NONE, 1'b0, 5'd0}},   // h3
    '{'{SRC_X1, 1'b0, 5'd1},  '{SRC_NONE, 1'b0, 5'd0}, '{SRC_NONE, 1'b0, 5'd0}}   // h4
  };

  // A product x*h scaled by 2^FRAC fits in W + FRAC bits (|h| <= 0.5); a tap sum in
  // W + FRAC + 2 bits (sum of |h| is about 1.37 < 2).

  // ---------------- modes ------------------------------------------------------------
  typedef enum logic {MODE_GSM = 1'b0, MODE_PDC = 1'b1} mode_e;

  localparam int STAGE_W = $clog2(NUM_STAGES + 1);

  // Taps removed from each end of the parent filter in each mode.
  localparam int GSM_TRIM = 2;  // 5-tap filter
  localparam int PDC_TRIM = 0;  // full 9-tap parent filter

endpackage
