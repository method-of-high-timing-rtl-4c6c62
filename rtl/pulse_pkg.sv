// pulse_pkg: types and constants shared by the virtual-sampling pulse synthesiser.
//
// Time base. One clock of the sample path is one virtual sample period t = 1/(N*fs)
// (100 ps at the 10 GSa/s virtual rate). Pulse times (width Tw, rise Tr, fall Tf) are
// given in quarter ticks (TIME_FRAC = 2 fractional bits), so a 4.25 ns width is
// representable; the pulse period is a whole number of ticks, which keeps the number of
// samples per period fixed. The region thresholds of the pulse equations contain the
// factors 1/0.8 = 10/8 and 1/1.6 = 5/8, so they are exact with three more fractional
// bits (THR_FRAC = TIME_FRAC + 3).
//
// The sample width (16 bits, two's complement) matches a 16-bit DAC. The filter
// coefficient defaults are a 7th-order Butterworth low-pass, 3 dB at 550 MHz for a
// 10 GSa/s input (about 1 dB down at 500 MHz), made by the bilinear transform and split
// into second-order sections, each scaled to unity DC gain, quantised to Q2.26. The
// order and corner are this design's choice, fitted to a 500 MHz passband.
package pulse_pkg;

  localparam int SAMPLE_W   = 16;
  localparam int TIME_FRAC  = 2;
  localparam int THR_FRAC   = TIME_FRAC + 3;
  localparam int K_W        = 24;                 // phase accumulator (ticks per period)
  localparam int TIME_W     = K_W + TIME_FRAC;    // Tw, Tr, Tf in quarter ticks
  localparam int THR_W      = K_W + THR_FRAC + 2; // thresholds, 1/32 tick, with headroom
  localparam int SLOPE_FRAC = 16;
  localparam int SLOPE_W    = 40;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Sample source chosen by the pulse control for one virtual sample.
  typedef enum logic [1:0] {
    SRC_RISE = 2'd0,
    SRC_HIGH = 2'd1,
    SRC_FALL = 2'd2,
    SRC_LOW  = 2'd3
  } src_e;

  // One complete, consistent set of pulse parameters as used by the sample generator.
  typedef struct packed {
    logic [K_W-1:0]     period;       // ticks per pulse period (Nfs/f)
    logic [THR_W-1:0]   k_rise_end;   // K1 = 1.25*Tr, 1/32 tick
    logic [THR_W-1:0]   k_fall_start; // K2 = Tw + 0.625*(Tr-Tf)
    logic [THR_W-1:0]   k_fall_end;   // K3 = Tw + 0.625*(Tr+Tf)
    logic [SLOPE_W-1:0] slope_r;      // rise step per tick, SLOPE_FRAC fractional bits
    logic [SLOPE_W-1:0] slope_f;      // fall step per tick
    sample_t            v_high;
    sample_t            v_low;
  } pulse_params_t;

  // Digital filter: cascade of second-order IIR sections.
  localparam int FILT_SECTIONS = 4;
  localparam int COEF_W        = 28;
  localparam int COEF_FRAC     = 26;
  typedef logic signed [COEF_W-1:0] coef_t;

  // y = b0*x + b1*x[-1] + b2*x[-2] - a1*y[-1] - a2*y[-2]
  typedef struct packed {
    coef_t b0;
    coef_t b1;
    coef_t b2;
    coef_t a1;
    coef_t a2;
  } biquad_coef_t;

  typedef biquad_coef_t filt_coef_t [FILT_SECTIONS];

  localparam filt_coef_t BUTTER_DEFAULT = '{
    '{b0: 28'sd4985991, b1: 28'sd9971982, b2: 28'sd4985991, a1: -28'sd47164900,  a2: 28'sd0},
    '{b0: 28'sd1519862, b1: 28'sd3039724, b2: 28'sd1519862, a1: -28'sd96754231,  a2: 28'sd35724815},
    '{b0: 28'sd1637808, b1: 28'sd3275616, b2: 28'sd1637808, a1: -28'sd104262646, a2: 28'sd43705013},
    '{b0: 28'sd3689336, b1: 28'sd3689336, b2: 28'sd0,       a1: -28'sd117431342, a2: 28'sd57701150}
  };

  // Local bus: one register write per cycle.
  localparam int LB_ADDR_W = 16;
  localparam int LB_DATA_W = 32;
  typedef struct packed {
    logic                 we;
    logic [LB_ADDR_W-1:0] addr;
    logic [LB_DATA_W-1:0] data;
  } lbus_wr_t;

  // Local bus register map.
  localparam logic [LB_ADDR_W-1:0] REG_CTRL     = 16'h0000; // bit0 run, bit1 playback mode
  localparam logic [LB_ADDR_W-1:0] REG_PERIOD   = 16'h0001; // ticks per period
  localparam logic [LB_ADDR_W-1:0] REG_TW       = 16'h0002; // quarter ticks
  localparam logic [LB_ADDR_W-1:0] REG_TR       = 16'h0003;
  localparam logic [LB_ADDR_W-1:0] REG_TF       = 16'h0004;
  localparam logic [LB_ADDR_W-1:0] REG_VHIGH    = 16'h0005;
  localparam logic [LB_ADDR_W-1:0] REG_VLOW     = 16'h0006;
  localparam logic [LB_ADDR_W-1:0] REG_DECIM    = 16'h0007;
  localparam logic [LB_ADDR_W-1:0] REG_PLAYLEN  = 16'h0008; // playback words
  localparam logic [LB_ADDR_W-1:0] REG_COMMIT   = 16'h0009;
  localparam logic [LB_ADDR_W-1:0] REG_COEF     = 16'h0010; // 0x10 + 5*section + {b0,b1,b2,a1,a2}
  localparam logic [LB_ADDR_W-1:0] REG_WAVE_BIT = 16'h8000; // set: waveform memory sample index

  localparam int DECIM_W = 8;

endpackage
