// swu: sliding window unit, the sampler in front of a convolutional MVTU.
//
// Input: an IFM_DIM x IFM_DIM feature map of IFM_CH channels, one pixel after
// the other in row-major order, each pixel as CP = IFM_CH/SIMD beats of SIMD
// elements of EW bits (the data stream is already cut to the SIMD width of the
// following MVTU, so the buffer needs no further partitioning).
// Output: for every output pixel (row-major, stride 1, no padding, OFM_DIM =
// IFM_DIM-K+1) the K x K window as K*K*CP beats in (ky, kx, part) order, which
// is the synapse order of the convolution weights.
//
// The buffer holds K+1 lines in a single memory SIMD*EW bits wide: K lines are
// sampled while the extra line is filled from the input in parallel. A counter
// of complete lines held (avail) couples the two sides: the writer may fill a
// line while avail <= K, the reader may emit an output row once avail >= K.
// Finishing an output row frees its oldest line; the last output row of an
// image frees all K remaining lines, so images follow each other without gaps.
//
// Timing: one beat written and one read per cycle at most; the read is
// synchronous into the output register, which holds while out_ready is low.
//
// Source: the K+1 line buffer in one SIMD-wide memory follows the design; the
// avail counter, output order and stride-1/no-padding limits are this design's
// choice.
module swu #(
  parameter int unsigned IFM_DIM = 30,
  parameter int unsigned IFM_CH  = 64,
  parameter int unsigned K       = 3,
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
  localparam int unsigned CP      = IFM_CH / SIMD;
  localparam int unsigned OFM_DIM = IFM_DIM - K + 1;
  localparam int unsigned LINE    = IFM_DIM * CP;
  localparam int unsigned DEPTH   = (K + 1) * LINE;
  localparam int unsigned AW      = $clog2(DEPTH);
  localparam int unsigned XW      = $clog2(IFM_DIM + 1);
  localparam int unsigned PW      = CP > 1 ? $clog2(CP) : 1;
  localparam int unsigned KW      = $clog2(K + 1);
  localparam int unsigned HW      = $clog2(K + 2);

  logic [W-1:0] mem [DEPTH];

  // writer
  logic [XW-1:0] wx, wrow;
  logic [PW-1:0] wp;
  logic [KW-1:0] wslot;
  logic          wr_fire, row_done;
  // reader
  logic [XW-1:0] ox, oy;
  logic [KW-1:0] ky, kx, rslot, rs;
  logic [PW-1:0] rp;
  logic          adv, rd_fire, orow_done, img_done;
  logic [HW-1:0] avail, release_n;
  logic [AW-1:0] waddr, raddr;

  assign in_ready = (avail <= HW'(K));
  assign wr_fire  = in_valid && in_ready;
  assign row_done = wr_fire && (wx == XW'(IFM_DIM - 1)) && (wp == PW'(CP - 1));
  assign waddr    = AW'(int'(wslot) * LINE + int'(wx) * CP + int'(wp));

  assign adv       = !out_valid || out_ready;
  assign rd_fire   = adv && (avail >= HW'(K));
  assign rs        = KW'((int'(rslot) + int'(ky)) % (K + 1));
  assign raddr     = AW'(int'(rs) * LINE + (int'(ox) + int'(kx)) * CP + int'(rp));
  assign orow_done = rd_fire && (rp == PW'(CP - 1)) && (kx == KW'(K - 1)) &&
                     (ky == KW'(K - 1)) && (ox == XW'(OFM_DIM - 1));
  assign img_done  = orow_done && (oy == XW'(OFM_DIM - 1));
  assign release_n = !orow_done ? '0 : (img_done ? HW'(K) : HW'(1));

  always_ff @(posedge clk) begin
    if (wr_fire) mem[waddr] <= in_data;
    if (rd_fire) out_data <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wx <= '0; wp <= '0; wrow <= '0; wslot <= '0;
      ox <= '0; oy <= '0; ky <= '0; kx <= '0; rp <= '0; rslot <= '0;
      avail <= '0; out_valid <= 1'b0;
    end else begin
      avail <= avail + HW'(row_done) - release_n;
      // writer counters
      if (wr_fire) begin
        if (wp == PW'(CP - 1)) begin
          wp <= '0;
          if (wx == XW'(IFM_DIM - 1)) begin
            wx    <= '0;
            wrow  <= (wrow == XW'(IFM_DIM - 1)) ? '0 : wrow + 1'b1;
            wslot <= (wslot == KW'(K)) ? '0 : wslot + 1'b1;
          end else wx <= wx + 1'b1;
        end else wp <= wp + 1'b1;
      end
      // reader counters
      if (adv) out_valid <= rd_fire;
      if (rd_fire) begin
        if (rp == PW'(CP - 1)) begin
          rp <= '0;
          if (kx == KW'(K - 1)) begin
            kx <= '0;
            if (ky == KW'(K - 1)) begin
              ky <= '0;
              if (ox == XW'(OFM_DIM - 1)) begin
                ox <= '0;
                oy <= img_done ? '0 : oy + 1'b1;
                rslot <= KW'((int'(rslot) + int'(release_n)) % (K + 1));
              end else ox <= ox + 1'b1;
            end else ky <= ky + 1'b1;
          end else kx <= kx + 1'b1;
        end else rp <= rp + 1'b1;
      end
    end
  end

  // The buffer never holds more than K+1 lines.
  a_cap: assert property (@(posedge clk) disable iff (!rst_n) avail <= HW'(K + 1));
endmodule
