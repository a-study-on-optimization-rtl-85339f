// rb_encoder: isometric residual-binarization encoder.
//
// Turns the thresholded, scaled value y = acc*alpha - tau*alpha of one neuron
// into an M-bit activation code. With isometric residual binarization the
// binarize factors of the levels are 2^(M-1), 2^(M-2), ..., 1 (integer units
// after the parameter scaling of the network), so only M+2 bits of y matter:
// the sign, the M least significant integer bits and one fractional bit.
// Saturation: if y is positive and any higher integer bit is 1, the M integer
// bits are forced to all ones; if y is negative and any higher integer bit is
// 0, they are forced to all zeros (OR / AND reduction of the unselected bits).
// The fractional bit is the constant 1 (0.5), so no level comparison can meet a
// tie. The M levels are then resolved as a residual chain: level i takes the
// sign of the residual r_i (1 when r_i >= 0) and passes r_i -/+ 2^(M-i) on.
// Code bit M-1 is level 1; read as an unsigned number the code grows with y,
// which is what lets max pooling compare codes directly.
//
// Combinational. The selection, saturation and chain follow the design's
// encoder description; the chain written as adders is this implementation's
// form of the level comparators.
module rb_encoder #(
  parameter int unsigned M    = 2,   // residual levels of the output
  parameter int unsigned Y_W  = 40,  // width of y
  parameter int unsigned FRAC = 12   // fractional bits of y
) (
  input  logic signed [Y_W-1:0] y_i,
  output logic        [M-1:0]   code_o
);
  localparam int unsigned RW = M + 3;  // residual width, half-units

  logic                   sgn;
  logic [Y_W-2-FRAC-M:0]  upper;
  logic [M-1:0]           low;
  logic [M-1:0]           low_sat;
  logic signed [RW-1:0]   r [M+1];

  assign sgn   = y_i[Y_W-1];
  assign upper = y_i[Y_W-2:FRAC+M];
  assign low   = y_i[FRAC+:M];

  always_comb begin
    if (!sgn && (|upper))      low_sat = '1;  // too large: top code
    else if (sgn && !(&upper)) low_sat = '0;  // too small: bottom code
    else                       low_sat = low;
    // value in half-units with the constant .5 fraction: {sign, low, 1}
    r[1] = RW'(signed'({sgn, low_sat, 1'b1}));
    r[0] = '0;
    for (int i = 1; i <= M; i++) begin
      code_o[M-i] = ~r[i][RW-1];
      if (code_o[M-i]) r[i+1] = r[i] - RW'(2 ** (M - i + 1));
      else             r[i+1] = r[i] + RW'(2 ** (M - i + 1));
    end
  end
endmodule
