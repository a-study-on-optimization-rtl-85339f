// pe: processing element of a matrix vector threshold unit.
//
// Each cycle (en & valid_i) it takes SIMD activations of M_IN bits each and
// SIMD weight bits. Activation bit j of every element forms bit plane j, whose
// binarize factor is 2^j (for an M-level code, plane M-1 is level 1). Per plane
// an XNOR with the weights and a popcount give XnorPopcount = 2*p - SIMD; the
// planes are shifted left by j (plain wiring) and summed in an adder tree, and
// the sum goes into the single accumulator. first_i restarts the accumulation,
// last_i closes it: the total is then multiplied once by alpha, tau*alpha is
// subtracted and the result is encoded into M_OUT levels by rb_encoder. With
// ACT = 0 (last layer) the raw accumulated sum is the output instead.
//
// The same element handles the first layer: a 1-bit binary image is M_IN = 1,
// and an 8-bit pixel x read as 8 planes gives exactly 2x-255, the centred pixel
// the first layer works on. That reuse of the plane datapath is this design's
// own choice.
//
// Timing: two register stages, both advanced only when en is high (the owner
// stalls the whole pipe with it). Stage A holds the accumulator and, after a
// last beat, the closed sum with its thresholds; stage B holds the output.
// So out_valid_o rises on the second enabled edge after the last beat.
//
// Source: the plane XNOR/popcount, the shift-and-add tree, one accumulator and
// one alpha multiplier follow the design's processing element.
module pe
  import rebnet_pkg::*;
#(
  parameter int unsigned SIMD  = 32,
  parameter int unsigned M_IN  = 2,
  parameter int unsigned M_OUT = 2,
  parameter bit          ACT   = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   valid_i,
  input  logic                   first_i,
  input  logic                   last_i,
  input  logic [SIMD*M_IN-1:0]   act_i,
  input  logic [SIMD-1:0]        wgt_i,
  input  thr_t                   thr_i,
  output logic                   valid_o,
  output logic [M_OUT-1:0]       code_o,
  output logic signed [ACC_W-1:0] acc_o
);
  localparam int unsigned CW = $clog2(SIMD + 1);

  logic [SIMD-1:0]          plane [M_IN];
  logic [CW-1:0]            pc    [M_IN];
  logic signed [ACC_W-1:0]  sum;
  logic signed [ACC_W-1:0]  acc_q, acc_next;
  logic                     res_v;
  logic signed [ACC_W-1:0]  res_acc;
  thr_t                     res_thr;
  logic signed [Y_W-1:0]    y;
  logic [M_OUT-1:0]         code;

  for (genvar j = 0; j < M_IN; j++) begin : g_plane
    for (genvar s = 0; s < SIMD; s++) begin : g_bit
      assign plane[j][s] = ~(act_i[s*M_IN+j] ^ wgt_i[s]);
    end
    popcount #(.N(SIMD)) u_pc (.bits_i(plane[j]), .count_o(pc[j]));
  end

  always_comb begin
    sum = '0;
    for (int j = 0; j < M_IN; j++)
      sum += (ACC_W'(2 * pc[j]) - ACC_W'(SIMD)) <<< j;
    acc_next = (first_i ? '0 : acc_q) + sum;
  end

  // Stage A: accumulator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= '0;
      res_v   <= 1'b0;
      res_acc <= '0;
      res_thr <= '0;
    end else if (en) begin
      res_v <= valid_i & last_i;
      if (valid_i) begin
        acc_q <= acc_next;
        if (last_i) begin
          res_acc <= acc_next;
          res_thr <= thr_i;
        end
      end
    end
  end

  // Stage B: one multiplier, threshold subtraction, encoder
  assign y = Y_W'(res_acc) * Y_W'(res_thr.alpha)
           - (Y_W'(res_thr.tau_alpha) <<< (ALPHA_FRAC - TAUA_FRAC));

  rb_encoder #(.M(M_OUT), .Y_W(Y_W), .FRAC(Y_FRAC)) u_enc (.y_i(y), .code_o(code));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      code_o  <= '0;
      acc_o   <= '0;
    end else if (en) begin
      valid_o <= res_v;
      if (res_v) begin
        code_o <= ACT ? code : '0;
        acc_o  <= res_acc;
      end
    end
  end
endmodule
