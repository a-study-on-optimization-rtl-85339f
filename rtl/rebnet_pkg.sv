// Shared constants of the isometric residual-binarized network accelerator.
//
// Fixed-point formats follow the weight converter of the design: the per-neuron
// scale alpha is a 24-bit signed value with 12 fractional bits, the pre-scaled
// threshold tau*alpha is a 24-bit signed value with 8 fractional bits, and the
// integer accumulator of a processing element is 16 bits wide. The product
// acc*alpha therefore carries 12 fractional bits; tau*alpha is shifted left by 4
// to line up before the subtraction.
//
// The bit widths follow the design's converter; the thr_t packing and the
// configuration kinds are this design's choice.
package rebnet_pkg;
  localparam int unsigned ACC_W      = 16;  // P: integer popcount accumulator
  localparam int unsigned ALPHA_W    = 24;  // T: alpha word
  localparam int unsigned ALPHA_FRAC = 12;  // fractional bits of alpha
  localparam int unsigned TAUA_W     = 24;  // tau*alpha word
  localparam int unsigned TAUA_FRAC  = 8;   // fractional bits of tau*alpha
  localparam int unsigned THR_W      = ALPHA_W + TAUA_W;
  // acc*alpha - tau*alpha, 12 fractional bits
  localparam int unsigned Y_W        = ACC_W + ALPHA_W;
  localparam int unsigned Y_FRAC     = ALPHA_FRAC;

  // One threshold-memory entry of a neuron.
  typedef struct packed {
    logic signed [ALPHA_W-1:0] alpha;
    logic signed [TAUA_W-1:0]  tau_alpha;
  } thr_t;

  // Kind of a parameter write on the configuration port.
  typedef enum logic {CFG_WEIGHT = 1'b0, CFG_THRESH = 1'b1} cfg_kind_e;
endpackage
