// width_conv: stream bit-width converter between two layers.
//
// An MVTU emits PE output elements per beat, the next stage wants SIMD
// elements per beat (both times EW bits). Converting right after the MVTU makes
// every later stage (FIFO, max pooling, sliding window buffer) only as wide as
// the next layer's SIMD lanes. IN_W and OUT_W must divide one another.
//  - equal widths: plain bypass (wires);
//  - widening by R = OUT_W/IN_W: R input beats are packed, first beat in the
//    least significant bits, and sent as one beat;
//  - narrowing by R = IN_W/OUT_W: each input beat is sent as R beats, least
//    significant part first.
// Element order is kept. Timing: a registered output; widening accepts an
// input beat every cycle and emits one beat per R, narrowing emits one beat
// per cycle and takes a new input beat together with the last part of the old.
//
// Source: converting right after the MVTU is the design's adaptive-width
// stream; the packing order and the registered output are this design's choice.
module width_conv #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned OUT_W = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IN_W-1:0]  in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_data
);
  if (IN_W == OUT_W) begin : g_bypass
    assign out_valid = in_valid;
    assign in_ready  = out_ready;
    assign out_data  = in_data;
  end else if (OUT_W > IN_W) begin : g_up
    localparam int unsigned R  = OUT_W / IN_W;
    localparam int unsigned CW = $clog2(R);
    logic [CW-1:0]    cnt;
    logic [OUT_W-1:0] acc;
    logic             fire;
    assign in_ready = !out_valid || out_ready;
    assign fire     = in_valid && in_ready;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt <= '0; acc <= '0; out_valid <= 1'b0; out_data <= '0;
      end else begin
        if (out_valid && out_ready) out_valid <= 1'b0;
        if (fire) begin
          acc[cnt*IN_W+:IN_W] <= in_data;
          if (cnt == CW'(R - 1)) begin
            cnt       <= '0;
            out_valid <= 1'b1;
            out_data  <= {in_data, acc[(R-1)*IN_W-1:0]};
          end else cnt <= cnt + 1'b1;
        end
      end
    end
    a_div: assert property (@(posedge clk) OUT_W % IN_W == 0);
  end else begin : g_down
    localparam int unsigned R  = IN_W / OUT_W;
    localparam int unsigned CW = $clog2(R);
    logic [CW-1:0]   cnt;
    logic [IN_W-1:0] buf_q;
    logic            full;
    assign in_ready  = !full || (out_ready && cnt == CW'(R - 1));
    assign out_valid = full;
    assign out_data  = buf_q[cnt*OUT_W+:OUT_W];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt <= '0; buf_q <= '0; full <= 1'b0;
      end else begin
        if (full && out_ready) begin
          if (cnt == CW'(R - 1)) begin
            cnt  <= '0;
            full <= 1'b0;
          end else cnt <= cnt + 1'b1;
        end
        if (in_valid && in_ready) begin
          buf_q <= in_data;
          full  <= 1'b1;
        end
      end
    end
    a_div: assert property (@(posedge clk) IN_W % OUT_W == 0);
  end
endmodule
