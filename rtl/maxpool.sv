// maxpool: 2x2, stride-2 max pooling on residual-binarized codes.
//
// With isometric residual binarization the level factors are 2^(M-1), ..., 1
// and the batch-norm scale is made positive when the weights are converted, so
// the approximated value grows monotonically with the M-bit code read as an
// unsigned number. The maximum of the values is therefore the unsigned maximum
// of the codes, taken per element; this avoids the wrong results a plain
// bit-wise compare gives when level factors are not ordered.
//
// Input: an IFM_DIM x IFM_DIM map, pixels in row-major order, each pixel as
// CP = CH/SIMD beats of SIMD elements of EW bits (the next layer's SIMD width).
// Output: the (IFM_DIM/2)^2 pooled pixels in the same format. A one-row buffer
// of IFM_DIM/2 * CP words keeps the running maxima of the current row pair:
// the first beat of a window overwrites, the others compare, and the beat that
// closes a window (odd row, odd column) is sent out. A trailing odd row or
// column is dropped.
//
// Timing: one input beat per cycle; an output beat leaves through a register
// one cycle after the beat that closes its window. in_ready is low while an
// output beat waits.
//
// Source: comparing codes instead of values follows the design; the one-row
// buffer, the output register and dropping odd rows/columns are this design's
// choice.
module maxpool #(
  parameter int unsigned IFM_DIM = 28,
  parameter int unsigned CH      = 64,
  parameter int unsigned SIMD    = 32,
  parameter int unsigned EW      = 2,
  localparam int unsigned W      = SIMD * EW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  localparam int unsigned CP    = CH / SIMD;
  localparam int unsigned OD    = IFM_DIM / 2;
  localparam int unsigned DEPTH = OD * CP;
  localparam int unsigned AW    = DEPTH > 1 ? $clog2(DEPTH) : 1;
  localparam int unsigned XW    = $clog2(IFM_DIM + 1);
  localparam int unsigned PW    = CP > 1 ? $clog2(CP) : 1;

  logic [W-1:0]  rowbuf [DEPTH];
  logic [XW-1:0] x, y;
  logic [PW-1:0] p;
  logic          fire, in_win, first_beat, close_win;
  logic [AW-1:0] idx;
  logic [W-1:0]  old, mx;

  assign in_ready   = !out_valid || out_ready;
  assign fire       = in_valid && in_ready;
  assign in_win     = (x < XW'(2 * OD)) && (y < XW'(2 * OD));
  assign first_beat = !x[0] && !y[0];
  assign close_win  = x[0] && y[0];
  assign idx        = AW'((x >> 1) * CP + p);
  assign old        = rowbuf[idx];

  always_comb begin
    for (int s = 0; s < SIMD; s++)
      mx[s*EW+:EW] = (in_data[s*EW+:EW] > old[s*EW+:EW]) ? in_data[s*EW+:EW] : old[s*EW+:EW];
  end

  always_ff @(posedge clk) begin
    if (fire && in_win && !close_win) rowbuf[idx] <= first_beat ? in_data : mx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; p <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (in_ready) out_valid <= fire && in_win && close_win;
      if (fire) begin
        if (in_win && close_win) out_data <= mx;
        if (p == PW'(CP - 1)) begin
          p <= '0;
          if (x == XW'(IFM_DIM - 1)) begin
            x <= '0;
            y <= (y == XW'(IFM_DIM - 1)) ? '0 : y + 1'b1;
          end else x <= x + 1'b1;
        end else p <= p + 1'b1;
      end
    end
  end
endmodule
