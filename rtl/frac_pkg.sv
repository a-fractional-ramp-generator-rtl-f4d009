// Shared types and constants of the fractional ramp synthesiser.
//
// Division factors are carried as signed fixed-point words: FRAC_W fraction
// bits and INT_W integer bits (sign included). The fractional core works on
// wider words (CORE_FRAC_W = FRAC_W + 4) because the input FIR and the
// feedback coefficient K1 = 3/16 need four extra fraction bits to stay exact.
// K1 = 3/16 and K2 = 1/2 are the published loop coefficients; all widths are
// this design's own choice.
package frac_pkg;

  // Division-factor word (input F of the fractional logic)
  localparam int unsigned FRAC_W = 32;          // fraction bits of F
  localparam int unsigned INT_W  = 8;           // integer bits of F, sign included
  localparam int unsigned F_W    = INT_W + FRAC_W;

  // Internal word of FIR and core: 4 more fraction bits, 3 more integer bits (FIR gain)
  localparam int unsigned CORE_FRAC_W = FRAC_W + 4;
  localparam int unsigned CORE_INT_W  = INT_W + 3;
  localparam int unsigned CORE_W      = CORE_INT_W + CORE_FRAC_W;

  // Integer division factor handed to the programmable divider
  localparam int unsigned N_W = 8;

  // Ramp slope word: F_W plus 16 extra fraction bits for fine slopes
  localparam int unsigned SLOPE_EXT = 16;
  localparam int unsigned SLOPE_W   = F_W + SLOPE_EXT;

  // Ramp length counter (50 ms at 50 MHz = 2.5e6 clocks fits in 24 bits)
  localparam int unsigned LEN_W = 24;

  // Flash ramp memory
  localparam int unsigned FLASH_AW = 20;

  // Feedback coefficients as numerators over 16
  localparam int K1_NUM = 3;   // K1 = 3/16
  localparam int K2_NUM = 8;   // K2 = 1/2 = 8/16

  typedef logic signed [F_W-1:0]    fword_t;   // division factor, FRAC_W fraction bits
  typedef logic signed [CORE_W-1:0] cword_t;   // core word, CORE_FRAC_W fraction bits
  typedef logic signed [SLOPE_W-1:0] slope_t;  // slope, FRAC_W+SLOPE_EXT fraction bits
  typedef logic signed [N_W-1:0]    nint_t;    // integer division factor / offset

  // Ramp source of one fractional logic
  typedef enum logic [1:0] {
    MODE_STATIC = 2'd0,   // fixed frequency: F = f_start
    MODE_LINEAR = 2'd1,   // counter-based linear ramp
    MODE_FLASH  = 2'd2    // ramp curve read from flash memory
  } ramp_mode_t;

  // Settings of one channel, as the input unit would write them
  typedef struct packed {
    ramp_mode_t              mode;
    fword_t                  f_start;   // static value / linear ramp start
    slope_t                  slope;     // linear ramp increment per clock
    logic [LEN_W-1:0]        len;       // linear ramp: clocks; flash ramp: samples
    nint_t                   p_off;     // integer offset P added after the core
  } chan_cfg_t;

  // Control lines from the frequency detector to the phase detector
  typedef struct packed {
    logic set_r;   // force the R flip-flop high
    logic clr_r;   // force the R flip-flop low
    logic set_v;   // force the V flip-flop high
    logic clr_v;   // force the V flip-flop low
  } pd_ctrl_t;

endpackage
