// layer_stage: one layer of the dataflow accelerator.
//
// Chains what the design puts around a layer's compute engine:
//   [sliding window unit] -> MVTU -> bit-width converter -> interFIFO
// The sliding window unit is present for convolutional layers (CONV = 1) and
// turns the pixel stream into K x K windows; fully connected layers feed the
// MVTU directly. The width converter changes the stream from PE*M_OUT bits to
// NEXT_SIMD*M_OUT bits right after the MVTU, so the FIFO and any following max
// pooling and sliding window unit only carry the next layer's SIMD lanes. With
// ACT = 0 (output layer) the stream carries PE raw 16-bit sums and is passed on
// unchanged.
//
// Parameters are written through a shared configuration port; a write reaches
// this layer when cfg_layer equals LAYER_ID. cfg_kind selects the weight memory
// (cfg_data[SIMD-1:0] into PE cfg_pe, word cfg_addr) or the threshold memory
// (cfg_data[47:24] = alpha, cfg_data[23:0] = tau*alpha, neuron fold cfg_addr).
//
// Source: the layer chain, the early width conversion and the interFIFO
// follow the design's dataflow description; the configuration port, its
// encoding and the FIFO placement before max pooling are this design's choice.
module layer_stage
  import rebnet_pkg::*;
#(
  parameter int unsigned LAYER_ID   = 1,
  parameter bit          CONV       = 1'b1,
  parameter int unsigned IFM_DIM    = 32,
  parameter int unsigned K          = 3,
  parameter int unsigned MW         = 27,
  parameter int unsigned MH         = 64,
  parameter int unsigned SIMD       = 3,
  parameter int unsigned PE         = 16,
  parameter int unsigned M_IN       = 8,
  parameter int unsigned M_OUT      = 2,
  parameter bit          ACT        = 1'b1,
  parameter int unsigned NEXT_SIMD  = 32,
  parameter int unsigned FIFO_DEPTH = 32,
  localparam int unsigned IN_W      = SIMD * M_IN,
  localparam int unsigned MV_W      = ACT ? PE * M_OUT : PE * ACC_W,
  localparam int unsigned OUT_W     = ACT ? NEXT_SIMD * M_OUT : MV_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [IN_W-1:0]   in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [OUT_W-1:0]  out_data,
  input  logic              cfg_we,
  input  logic [3:0]        cfg_layer,
  input  cfg_kind_e         cfg_kind,
  input  logic [15:0]       cfg_pe,
  input  logic [31:0]       cfg_addr,
  input  logic [63:0]       cfg_data
);
  localparam int unsigned SF  = MW / SIMD;
  localparam int unsigned NF  = MH / PE;
  localparam int unsigned WAW = SF * NF > 1 ? $clog2(SF * NF) : 1;
  localparam int unsigned TAW = NF > 1 ? $clog2(NF) : 1;
  localparam int unsigned PEW = PE > 1 ? $clog2(PE) : 1;

  logic             mv_in_valid, mv_in_ready;
  logic [IN_W-1:0]  mv_in_data;
  logic             mv_out_valid, mv_out_ready;
  logic [MV_W-1:0]  mv_out_data;
  logic             wc_valid, wc_ready;
  logic [OUT_W-1:0] wc_data;
  logic             hit;

  assign hit = cfg_we && (cfg_layer == 4'(LAYER_ID));

  if (CONV) begin : g_swu
    swu #(.IFM_DIM(IFM_DIM), .IFM_CH(MW / (K * K)), .K(K), .SIMD(SIMD), .EW(M_IN)) u_swu (
      .clk, .rst_n,
      .in_valid, .in_ready, .in_data,
      .out_valid(mv_in_valid), .out_ready(mv_in_ready), .out_data(mv_in_data)
    );
  end else begin : g_direct
    assign mv_in_valid = in_valid;
    assign in_ready    = mv_in_ready;
    assign mv_in_data  = in_data;
  end

  mvtu #(.MW(MW), .MH(MH), .SIMD(SIMD), .PE(PE), .M_IN(M_IN), .M_OUT(M_OUT), .ACT(ACT)) u_mvtu (
    .clk, .rst_n,
    .in_valid(mv_in_valid), .in_ready(mv_in_ready), .in_data(mv_in_data),
    .out_valid(mv_out_valid), .out_ready(mv_out_ready), .out_data(mv_out_data),
    .wgt_we(hit && cfg_kind == CFG_WEIGHT), .wgt_pe(PEW'(cfg_pe)), .wgt_addr(WAW'(cfg_addr)),
    .wgt_data(cfg_data[SIMD-1:0]),
    .thr_we(hit && cfg_kind == CFG_THRESH), .thr_pe(PEW'(cfg_pe)), .thr_addr(TAW'(cfg_addr)),
    .thr_data(thr_t'(cfg_data[THR_W-1:0]))
  );

  width_conv #(.IN_W(MV_W), .OUT_W(OUT_W)) u_wc (
    .clk, .rst_n,
    .in_valid(mv_out_valid), .in_ready(mv_out_ready), .in_data(mv_out_data),
    .out_valid(wc_valid), .out_ready(wc_ready), .out_data(wc_data)
  );

  stream_fifo #(.W(OUT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid(wc_valid), .in_ready(wc_ready), .in_data(wc_data),
    .out_valid, .out_ready, .out_data
  );
endmodule
