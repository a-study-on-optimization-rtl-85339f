// rebnet_cnv: dataflow accelerator for the CIFAR-10 / SVHN network (Arch2)
// with isometric residual-binarized activations.
//
// Network: 32x32 RGB image -> Conv(64,3) -> Conv(64,3) -> MaxPool(2,2)
//   -> Conv(128,3) -> Conv(128,3) -> MaxPool(2,2) -> Conv(256,3) -> Conv(256,3)
//   -> Dense(512) -> Dense(512) -> Dense(10, padded to 16).
// Every layer has its own MVTU and all layers run at the same time as one
// pipeline; the activations between layers are M-bit residual codes.
// Parallelism (PE x SIMD) per layer is the resource-limited configuration:
//   L1 16x3, L2 32x32, L3 16x32, L4 16x32, L5 4x32, L6 1x32, L7 1x4, L8 1x8,
//   L9 1x1,
// giving Folds of 32400, 28224, 20736, 28800, 20736, 18432, 32768, 32768, 8192
// cycles per image, so a new image can start every 32768 cycles.
//
// Interface:
//  - img_*: input pixels, row-major, one pixel per beat, {B, G, R} 8-bit raw
//    values with R in bits [7:0]. The first layer works on 2x-255 per channel.
//  - res_*: 16 output beats per image, the signed 16-bit class scores of
//    outputs 0..15 (only 0..9 are meaningful; 10..15 are padding).
//  - cfg_*: parameter writes (see layer_stage) for layer cfg_layer = 1..9.
//    All weights and thresholds must be written before images are sent.
// All streams are valid/ready.
//
// Source: layer shapes come from the design's per-layer Fold counts (unpadded
// 3x3 convolutions match all nine), PE/SIMD from its resource-limited
// configuration; the pixel format, score stream, FIFO depths (dense-layer
// FIFOs hold a whole input vector so the interval stays at the largest Fold)
// and the configuration port are this design's choice.
module rebnet_cnv
  import rebnet_pkg::*;
#(
  parameter int unsigned M          = 2,   // residual levels of the activations
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              img_valid,
  output logic              img_ready,
  input  logic [23:0]       img_data,
  output logic              res_valid,
  input  logic              res_ready,
  output logic [ACC_W-1:0]  res_data,
  input  logic              cfg_we,
  input  logic [3:0]        cfg_layer,
  input  cfg_kind_e         cfg_kind,
  input  logic [15:0]       cfg_pe,
  input  logic [31:0]       cfg_addr,
  input  logic [63:0]       cfg_data
);
  // The FIFO in front of a fully connected layer holds one whole input vector
  // of that layer (its synapse fold count in beats), so the layer before it
  // can finish the next image while the fully connected layer is still busy.
  localparam int unsigned FIFO_TO_L7 = FIFO_DEPTH > 256 / 4 ? FIFO_DEPTH : 256 / 4;
  localparam int unsigned FIFO_TO_L8 = FIFO_DEPTH > 512 / 8 ? FIFO_DEPTH : 512 / 8;
  localparam int unsigned FIFO_TO_L9 = FIFO_DEPTH > 512 / 1 ? FIFO_DEPTH : 512 / 1;

  // streams between stages
  logic          v1, r1;  logic [32*M-1:0] d1;   // L1 out, SIMD 32
  logic          v2, r2;  logic [32*M-1:0] d2;   // L2 out
  logic          v2p, r2p; logic [32*M-1:0] d2p; // pool 1 out
  logic          v3, r3;  logic [32*M-1:0] d3;
  logic          v4, r4;  logic [32*M-1:0] d4;
  logic          v4p, r4p; logic [32*M-1:0] d4p; // pool 2 out
  logic          v5, r5;  logic [32*M-1:0] d5;
  logic          v6, r6;  logic [4*M-1:0]  d6;   // to L7, SIMD 4
  logic          v7, r7;  logic [8*M-1:0]  d7;   // to L8, SIMD 8
  logic          v8, r8;  logic [1*M-1:0]  d8;   // to L9, SIMD 1

  layer_stage #(.LAYER_ID(1), .CONV(1), .IFM_DIM(32), .K(3), .MW(27), .MH(64), .SIMD(3), .PE(16),
                .M_IN(8), .M_OUT(M), .NEXT_SIMD(32), .FIFO_DEPTH(FIFO_DEPTH)) u_l1 (
    .clk, .rst_n, .in_valid(img_valid), .in_ready(img_ready), .in_data(img_data),
    .out_valid(v1), .out_ready(r1), .out_data(d1),
    .cfg_we, .cfg_layer, .cfg_kind, .cfg_pe, .cfg_addr, .cfg_data);

  layer_stage #(.LAYER_ID(2), .CONV(1), .IFM_DIM(30), .K(3), .MW(576), .MH(64), .SIMD(32), .PE(32),
                .M_IN(M), .M_OUT(M), .NEXT_SIMD(32), .FIFO_DEPTH(FIFO_DEPTH)) u_l2 (
    .clk, .rst_n, .in_valid(v1), .in_ready(r1), .in_data(d1),
    .out_valid(v2), .out_ready(r2), .out_data(d2),
    .cfg_we, .cfg_layer, .cfg_kind, .cfg_pe, .cfg_addr, .cfg_data);

  maxpool #(.IFM_DIM(28), .CH(64), .SIMD(32), .EW(M)) u_mp1 (
    .clk, .rst_n, .in_valid(v2), .in_ready(r2), .in_data(d2),
    .out_valid(v2p), .out_ready(r2p), .out_data(d2p));

  layer_stage #(.LAYER_ID(3), .CONV(1), .IFM_DIM(14), .K(3), .MW(576), .MH(128), .SIMD(32), .PE(16),
                .M_IN(M), .M_OUT(M), .NEXT_SIMD(32), .FIFO_DEPTH(FIFO_DEPTH)) u_l3 (
    .clk, .rst_n, .in_valid(v2p), .in_ready(r2p), .in_data(d2p),
    .out_valid(v3), .out_ready(r3), .out_data(d3),
    .cfg_we, .cfg_layer, .cfg_kind, .cfg_pe, .cfg_addr, .cfg_data);

  layer_stage #(.LAYER_ID(4), .CONV(1), .IFM_DIM(12), .K(3), .MW(1152), .MH(128), .SIMD(32), .PE(16),
                .M_IN(M), .M_OUT(M), .NEXT_SIMD(32), .FIFO_DEPTH(FIFO_DEPTH)) u_l4 (
    .clk, .rst_n, .in_valid(v3), .in_ready(r3), .in_data(d3),
    .out_valid(v4), .out_ready(r4), .out_data(d4),
    .cfg_we, .cfg_layer, .cfg_kind, .cfg_pe, .cfg_addr, .cfg_data);

  maxpool #(.IFM_DIM(10), .CH(128), .SIMD(32), .EW(M)) u_mp2 (
    .clk, .rst_n, .in_valid(v4), .in_ready(r4), .in_data(d4),
    .out_valid(v4p), .out_ready(r4p), .out_data(d4p));

  layer_stage #(.LAYER_ID(5), .CONV(1), .IFM_DIM(5), .K(3), .MW(1152), .MH(256), .SIMD(32), .PE(4),
                .M_IN(M), .M_OUT(M), .NEXT_SIMD(32), .FIFO_DEPTH(FIFO_DEPTH)) u_l5 (
    .clk, .rst_n, .in_valid(v4p), .in_ready(r4p), .in_data(d4p),
    .out_valid(v5), .out_ready(r5), .out_data(d5),
    .cfg_we, .cfg_layer, .cfg_kind, .cfg_pe, .cfg_addr, .cfg_data);

  layer_stage #(.LAYER_ID(6), .CONV(1), .IFM_DIM(3), .K(3), .MW(2304), .MH(256), .SIMD(32), .PE(1),
                .M_IN(M), .M_OUT(M), .NEXT_SIMD(4), .FIFO_DEPTH(FIFO_TO_L7)) u_l6 (
    .clk, .rst_n, .in_valid(v5), .in_ready(r5), .in_data(d5),
    .out_valid(v6), .out_ready(r6), .out_data(d6),
    .cfg_we, .cfg_layer, .cfg_kind, .cfg_pe, .cfg_addr, .cfg_data);

  layer_stage #(.LAYER_ID(7), .CONV(0), .MW(256), .MH(512), .SIMD(4), .PE(1),
                .M_IN(M), .M_OUT(M), .NEXT_SIMD(8), .FIFO_DEPTH(FIFO_TO_L8)) u_l7 (
    .clk, .rst_n, .in_valid(v6), .in_ready(r6), .in_data(d6),
    .out_valid(v7), .out_ready(r7), .out_data(d7),
    .cfg_we, .cfg_layer, .cfg_kind, .cfg_pe, .cfg_addr, .cfg_data);

  layer_stage #(.LAYER_ID(8), .CONV(0), .MW(512), .MH(512), .SIMD(8), .PE(1),
                .M_IN(M), .M_OUT(M), .NEXT_SIMD(1), .FIFO_DEPTH(FIFO_TO_L9)) u_l8 (
    .clk, .rst_n, .in_valid(v7), .in_ready(r7), .in_data(d7),
    .out_valid(v8), .out_ready(r8), .out_data(d8),
    .cfg_we, .cfg_layer, .cfg_kind, .cfg_pe, .cfg_addr, .cfg_data);

  layer_stage #(.LAYER_ID(9), .CONV(0), .MW(512), .MH(16), .SIMD(1), .PE(1),
                .M_IN(M), .M_OUT(M), .ACT(0), .NEXT_SIMD(1), .FIFO_DEPTH(FIFO_DEPTH)) u_l9 (
    .clk, .rst_n, .in_valid(v8), .in_ready(r8), .in_data(d8),
    .out_valid(res_valid), .out_ready(res_ready), .out_data(res_data),
    .cfg_we, .cfg_layer, .cfg_kind, .cfg_pe, .cfg_addr, .cfg_data);
endmodule
