// mvtu: matrix vector threshold unit, the compute engine of one layer.
//
// Multiplies each input vector of MW elements (M_IN bits each) with a binary
// MH x MW weight matrix, thresholds and encodes the MH results. The work is
// folded: PE processing elements each take SIMD synapses per cycle, so one
// vector takes NF = MH/PE neuron folds of SF = MW/SIMD synapse folds, i.e.
// NF*SF cycles (the layer's Fold per vector) at an initiation interval of 1 -
// all M_IN levels of an element are processed in the same cycle.
// The vector arrives as SF beats of SIMD*M_IN bits (element s of a beat in bits
// [s*M_IN +: M_IN], beat 0 first). During neuron fold 0 the beats are taken
// from the input stream and kept in an input buffer; the other folds replay it.
// Neuron n = nf*PE + p is computed by PE p; its weights sit in that PE's weight
// memory at address nf*SF + sf, its alpha and tau*alpha at address nf. Each
// neuron fold produces one output beat of PE lanes (lane p in bits
// [p*OW +: OW], OW = M_OUT, or ACC_W raw sums when ACT = 0).
//
// Memories are written through a simple write port (cfg_*) before use; reads
// are synchronous. Pipeline: issue (memory read, activation register) -> PE
// stage A -> PE stage B = output register. The whole pipe stalls while an
// output beat waits for out_ready. Streams use valid/ready; a beat moves when
// both are high.
//
// Matrix sizes must be multiples of SIMD and PE; the weight converter pads a
// layer with zero-effect bubble neurons/synapses to get there.
//
// Source: folding, SIMD/PE structure, one multiplier per PE and II = 1 follow
// the design; the input-buffer replay, memory layout, write port and the
// three-stage stall-all pipeline are this design's choice.
module mvtu
  import rebnet_pkg::*;
#(
  parameter int unsigned MW    = 576,
  parameter int unsigned MH    = 64,
  parameter int unsigned SIMD  = 32,
  parameter int unsigned PE    = 32,
  parameter int unsigned M_IN  = 2,
  parameter int unsigned M_OUT = 2,
  parameter bit          ACT   = 1'b1,
  localparam int unsigned SF   = MW / SIMD,
  localparam int unsigned NF   = MH / PE,
  localparam int unsigned OW   = ACT ? M_OUT : ACC_W,
  localparam int unsigned WDEPTH = SF * NF,
  localparam int unsigned WAW  = WDEPTH > 1 ? $clog2(WDEPTH) : 1,
  localparam int unsigned TAW  = NF > 1 ? $clog2(NF) : 1,
  localparam int unsigned PEW  = PE > 1 ? $clog2(PE) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // input vector stream
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [SIMD*M_IN-1:0]    in_data,
  // output stream
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [PE*OW-1:0]        out_data,
  // parameter write port
  input  logic                    wgt_we,
  input  logic [PEW-1:0]          wgt_pe,
  input  logic [WAW-1:0]          wgt_addr,
  input  logic [SIMD-1:0]         wgt_data,
  input  logic                    thr_we,
  input  logic [PEW-1:0]          thr_pe,
  input  logic [TAW-1:0]          thr_addr,
  input  thr_t                    thr_data
);
  localparam int unsigned SFW = SF > 1 ? $clog2(SF) : 1;

  logic [SIMD-1:0]       wmem [PE][WDEPTH];
  thr_t                  tmem [PE][NF];
  logic [SIMD*M_IN-1:0]  ibuf [SF];

  logic [SFW-1:0] sf_q;
  logic [TAW-1:0] nf_q;
  logic           adv, issue;
  logic [SIMD*M_IN-1:0] act_src;
  logic [WAW-1:0] raddr;

  // stage-0 registers (issue)
  logic                  s0_v, s0_first, s0_last;
  logic [SIMD*M_IN-1:0]  s0_act;
  logic [SIMD-1:0]       s0_wgt [PE];
  thr_t                  s0_thr [PE];

  logic [PE-1:0]         pe_v;
  logic [M_OUT-1:0]      pe_code [PE];
  logic signed [ACC_W-1:0] pe_acc [PE];

  assign adv      = !out_valid || out_ready;
  assign in_ready = adv && (nf_q == '0);
  assign issue    = adv && ((nf_q != '0) || in_valid);
  assign act_src  = (nf_q == '0) ? in_data : ibuf[sf_q];
  assign raddr    = WAW'(nf_q * SF + sf_q);

  // parameter writes
  always_ff @(posedge clk) begin
    if (wgt_we) wmem[wgt_pe][wgt_addr] <= wgt_data;
    if (thr_we) tmem[thr_pe][thr_addr] <= thr_data;
  end

  // input buffer and synchronous memory reads
  always_ff @(posedge clk) begin
    if (issue) begin
      if (nf_q == '0) ibuf[sf_q] <= in_data;
      s0_act <= act_src;
      for (int p = 0; p < PE; p++) begin
        s0_wgt[p] <= wmem[p][raddr];
        s0_thr[p] <= tmem[p][nf_q];
      end
    end
  end

  // fold counters and stage-0 control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sf_q <= '0; nf_q <= '0;
      s0_v <= 1'b0; s0_first <= 1'b0; s0_last <= 1'b0;
    end else if (adv) begin
      s0_v <= issue;
      if (issue) begin
        s0_first <= (sf_q == '0);
        s0_last  <= (sf_q == SFW'(SF - 1));
        if (sf_q == SFW'(SF - 1)) begin
          sf_q <= '0;
          nf_q <= (nf_q == TAW'(NF - 1)) ? '0 : nf_q + 1'b1;
        end else begin
          sf_q <= sf_q + 1'b1;
        end
      end
    end
  end

  for (genvar p = 0; p < PE; p++) begin : g_pe
    pe #(.SIMD(SIMD), .M_IN(M_IN), .M_OUT(M_OUT), .ACT(ACT)) u_pe (
      .clk, .rst_n, .en(adv),
      .valid_i(s0_v), .first_i(s0_first), .last_i(s0_last),
      .act_i(s0_act), .wgt_i(s0_wgt[p]), .thr_i(s0_thr[p]),
      .valid_o(pe_v[p]), .code_o(pe_code[p]), .acc_o(pe_acc[p])
    );
    if (ACT) begin : g_code
      assign out_data[p*OW+:OW] = OW'(pe_code[p]);
    end else begin : g_raw
      assign out_data[p*OW+:OW] = OW'(pe_acc[p]);
    end
  end

  assign out_valid = pe_v[0];

  // A beat offered on the output stays until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid && $stable(out_data);
  endproperty
  a_hold: assert property (p_hold);
endmodule
