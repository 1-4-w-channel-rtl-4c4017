// deep_pkg: sizes, configuration address map and helper functions shared by
// the EEG/ECoG processor (DEEP) blocks.
//
// The channel count (16), the 9-bit sample width, the 32 temporal FIR taps
// a1..a32 and the 10 feature-extraction iterations per second follow the
// processor description.  Data widths, window lengths, the configuration
// address map and the feature layout are this design's own choices.
package deep_pkg;
  localparam int unsigned N_CH       = 16;   // recording channels
  localparam int unsigned SAMPLE_W   = 9;    // SAR ADC resolution
  localparam int unsigned DW         = 16;   // filtered data / feature word
  localparam int unsigned CW         = 16;   // coefficient word
  localparam int unsigned FIR_TAPS   = 32;   // a1..a32
  localparam int unsigned WIN        = 32;   // analysis window per channel (samples)
  localparam int unsigned CI_WIN     = 16;   // samples used by the correlation integral
  localparam int unsigned FEAT_PER_CH = 5;   // energy, variance, xcorr, band ratio, CI count
  localparam int unsigned N_FEAT     = N_CH * FEAT_PER_CH;
  localparam int unsigned N_RED      = 4;    // reduced feature dimensions

  // Feature slot of each kind inside a channel's group of FEAT_PER_CH words.
  typedef enum logic [2:0] {
    F_ENERGY = 3'd0,
    F_VAR    = 3'd1,
    F_XCORR  = 3'd2,
    F_BAND   = 3'd3,
    F_CI     = 3'd4
  } feat_kind_e;

  // Data memory layout seen by the RISC after each iteration.
  localparam int unsigned DMEM_FEAT_BASE = 32'h0000; // N_FEAT words, channel-major
  localparam int unsigned DMEM_RED_BASE  = 32'h0060; // N_RED words

  // Configuration / program write address map (16-bit word address).
  //   0x0000 + t        FIR coefficient a(t+1), t = 0..31
  //   0x0100 + 16*o + i spatial weight, output channel o, input channel i
  //   0x0200 + c        cross-correlation partner channel of channel c
  //   0x0300..0x0309    scalar settings (see config_regs)
  //   0x0400 + 128*d + f dimension-reduction weight, output d, feature f
  //   0x8000 + a        instruction SRAM word a
  localparam logic [15:0] A_IMEM_BIT = 16'h8000;

  typedef logic signed [DW-1:0] word_t;

  // Arithmetic right shift of a wide value followed by saturation to a
  // signed DW-bit word.
  function automatic word_t sat_shift(input logic signed [47:0] v, input logic [5:0] sh);
    logic signed [47:0] s;
    s = v >>> sh;
    if (s > 48'sd32767)       return 16'sh7fff;
    else if (s < -48'sd32768) return 16'sh8000;
    else                      return s[DW-1:0];
  endfunction
endpackage
