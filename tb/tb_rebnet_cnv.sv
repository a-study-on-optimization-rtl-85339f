// End-to-end test of the CIFAR-10 accelerator at its full size (M = 2, all
// nine layers at their real dimensions and parallelism).
//
// The bench builds a deterministic random network: weight bit w(L, n, k) from
// a hash of layer, neuron and synapse; per neuron an alpha scaled so that the
// thresholded values spread over all codes (and beyond, to hit saturation)
// and a random tau*alpha. It writes everything through the configuration
// port, streams NIMG random 32x32 RGB images, and checks the 16 class scores
// of every image against a behavioural model of the network written directly
// from the arithmetic: first layer on 2x-255, codes c mapped to values 2c-3,
// y = acc*alpha - 16*tau*alpha, code = clamp(floor(floor(y/4096)/2) + 2, 0, 3),
// 2x2 max pooling on codes, raw sums out of the last layer.
//
// It also counts the mechanisms of the dataflow and fails if one never
// happened: result back-pressure, inter-layer stalls, a full sliding-window
// line buffer, neuron-fold replay of the input buffer, width conversion,
// max-pool outputs and encoder saturation at both ends. The gap between the
// results of consecutive images is compared with the largest Fold (32768): it must
// be within 1% of it once the pipeline is full.
//
// The expected behaviour follows the design's arithmetic and dataflow; sizes,
// stimuli and the watchdog limit are this bench's own choice. It prints
// TB_RESULT checks=N failures=F and finishes.
module tb_rebnet_cnv;
  import rebnet_pkg::*;
  localparam int M = 2;          // the accelerator's default level count
  localparam int NIMG = 4;
  localparam int NL = 9;
  localparam int MAXFOLD = 32768;

  // layer table: conv?, input map size, MW, MH, SIMD, PE, pool after?
  // (variables, set at time 0, so the model loops are not unrolled)
  int L_CONV [NL], L_DIM [NL], L_MW [NL], L_MH [NL], L_SIMD [NL], L_PE [NL], L_POOL [NL];
  initial begin
    L_CONV = '{1, 1, 1, 1, 1, 1, 0, 0, 0};
    L_DIM  = '{32, 30, 14, 12, 5, 3, 1, 1, 1};
    L_MW   = '{27, 576, 576, 1152, 1152, 2304, 256, 512, 512};
    L_MH   = '{64, 64, 128, 128, 256, 256, 512, 512, 16};
    L_SIMD = '{3, 32, 32, 32, 32, 32, 4, 8, 1};
    L_PE   = '{16, 32, 16, 16, 4, 1, 1, 1, 1};
    L_POOL = '{0, 1, 0, 1, 0, 0, 0, 0, 0};
  end

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic img_valid = 0, img_ready;
  logic [23:0] img_data = '0;
  logic res_valid, res_ready = 0;
  logic [ACC_W-1:0] res_data;
  logic cfg_we = 0;
  logic [3:0] cfg_layer = '0;
  cfg_kind_e cfg_kind = CFG_WEIGHT;
  logic [15:0] cfg_pe = '0;
  logic [31:0] cfg_addr = '0;
  logic [63:0] cfg_data = '0;

  rebnet_cnv dut (.clk, .rst_n, .img_valid, .img_ready, .img_data, .res_valid, .res_ready,
    .res_data, .cfg_we, .cfg_layer, .cfg_kind, .cfg_pe, .cfg_addr, .cfg_data);

  always #5 clk = ~clk;

  bit   wts [NL][];          // [n*MW + k]
  thr_t thr [NL][];
  int   expq[$];
  int   cycle = 0, nres = 0;
  int   done_cycle [NIMG];
  int   sat_hi = 0, sat_lo = 0;
  int   n_bp = 0, n_stall = 0, n_swu_full = 0, n_replay = 0, n_wc = 0, n_pool = 0;

  always @(posedge clk) cycle++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: %0d results of %0d", nres, NIMG * 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit wbit(int l, int n, int k);
    logic [31:0] h;
    h = 32'(l) * 32'h9E37_79B1 ^ 32'(n) * 32'h85EB_CA77 ^ 32'(k) * 32'hC2B2_AE3D;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    return h[7];
  endfunction

  function automatic int enc(longint y);
    longint v = y >>> 12;
    longint c = (v >>> 1) + (1 << (M - 1));
    if (c < 0) begin c = 0; end
    if (c > (1 << M) - 1) begin c = (1 << M) - 1; end
    return int'(c);
  endfunction

  // one layer of the model on value vectors: in is [pixel][channel] flattened
  logic [23:0] pix [NIMG][32*32];
  int vin[], vout[];  // model activations in and out of a layer, [pixel][channel]
  int model_img;

  task automatic model_layer(int l, output int odim);
    int dim = L_DIM[l], mw = L_MW[l], mh = L_MH[l];
    int c_in = L_CONV[l] ? mw / 9 : mw;
    int od = L_CONV[l] ? dim - 2 : 1;
    int acc, k;
    longint y;
    vout = new[od * od * mh];
    for (int oy = 0; oy < od; oy++)
      for (int ox = 0; ox < od; ox++)
        for (int n = 0; n < mh; n++) begin
          acc = 0;
          if (L_CONV[l]) begin
            for (int ky = 0; ky < 3; ky++)
              for (int kx = 0; kx < 3; kx++)
                for (int c = 0; c < c_in; c++) begin
                  k = (ky * 3 + kx) * c_in + c;
                  if (wts[l][n*mw+k]) acc += vin[((oy+ky)*dim + ox+kx)*c_in + c];
                  else                acc -= vin[((oy+ky)*dim + ox+kx)*c_in + c];
                end
          end else begin
            for (k = 0; k < mw; k++) acc += wts[l][n*mw+k] ? vin[k] : -vin[k];
          end
          if (l == NL - 1) begin
            vout[(oy*od+ox)*mh + n] = acc;
          end else begin
            y = longint'(acc) * longint'(thr[l][n].alpha) - longint'(thr[l][n].tau_alpha) * 16;
            if ((y >>> 12) >= (1 << M)) sat_hi++;
            if ((y >>> 12) < -(1 << M)) sat_lo++;
            vout[(oy*od+ox)*mh + n] = enc(y);   // a code for now
          end
        end
    odim = od;
  endtask

  task automatic model_image();

    int dim, od, ch;
    vin = new[32 * 32 * 3];
    for (int i = 0; i < 32 * 32; i++)
      for (int c = 0; c < 3; c++) vin[i*3+c] = 2 * int'(pix[model_img][i][c*8+:8]) - 255;
    for (int l = 0; l < NL; l++) begin
      model_layer(l, od);
      if (l == NL - 1) break;
      ch = L_MH[l];
      if (L_POOL[l]) begin
        vin = new[(od / 2) * (od / 2) * ch];
        for (int y = 0; y < od / 2; y++)
          for (int x = 0; x < od / 2; x++)
            for (int c = 0; c < ch; c++) begin
              int mx = 0;
              for (int dy = 0; dy < 2; dy++)
                for (int dx = 0; dx < 2; dx++)
                  if (vout[((2*y+dy)*od + 2*x+dx)*ch + c] > mx) mx = vout[((2*y+dy)*od + 2*x+dx)*ch + c];
              vin[(y*(od/2) + x)*ch + c] = mx;
            end
      end else begin
        vin = vout;
      end
      for (int i = 0; i < vin.size(); i++) vin[i] = 2 * vin[i] - ((1 << M) - 1);  // code -> value
    end
    for (int n = 0; n < 16; n++) expq.push_back(vout[n]);
  endtask

  // result checker and back-pressure
  always @(negedge clk) res_ready = ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n) begin
    if (res_valid && !res_ready) n_bp++;
    if (dut.u_l2.u_mvtu.out_valid && !dut.u_l2.u_mvtu.out_ready) n_stall++;
    if (dut.u_l3.u_mvtu.out_valid && !dut.u_l3.u_mvtu.out_ready) n_stall++;
    if (dut.u_l1.g_swu.u_swu.in_valid && !dut.u_l1.g_swu.u_swu.in_ready) n_swu_full++;
    if (dut.u_l3.u_mvtu.issue && dut.u_l3.u_mvtu.nf_q != 0) n_replay++;
    if (dut.u_l1.u_wc.out_valid && dut.u_l1.u_wc.out_ready) n_wc++;
    if (dut.u_mp1.out_valid && dut.u_mp1.out_ready) n_pool++;
    if (res_valid && res_ready) begin
      checks++;
      if (expq.size() == 0 || $signed(res_data) != expq[0]) begin
        failures++;
        $display("image %0d score %0d: got %0d expected %0d", nres / 16, nres % 16,
                 $signed(res_data), expq.size() ? expq[0] : 0);
      end
      if (expq.size()) void'(expq.pop_front());
      nres++;
      if (nres % 16 == 0) done_cycle[nres/16-1] = cycle;
    end
  end

  task automatic cfg_write(int l, cfg_kind_e kind, int pe, int addr, logic [63:0] data);
    @(negedge clk);
    cfg_we = 1; cfg_layer = 4'(l + 1); cfg_kind = kind; cfg_pe = 16'(pe);
    cfg_addr = 32'(addr); cfg_data = data;
  endtask

  initial begin
    real sd, base;
    int sf_n, nf;
    logic [63:0] d;
    #1;
    // network parameters
    for (int l = 0; l < NL; l++) begin
      wts[l] = new[L_MW[l] * L_MH[l]];
      thr[l] = new[L_MH[l]];
      for (int n = 0; n < L_MH[l]; n++)
        for (int k = 0; k < L_MW[l]; k++) wts[l][n*L_MW[l]+k] = wbit(l, n, k);
      sd   = (l == 0) ? $sqrt(27.0 * 21675.0) : $sqrt(real'(L_MW[l]) * real'((4 ** M - 1) / 3));
      base = 4096.0 * real'(1 << M) / (1.5 * sd);
      for (int n = 0; n < L_MH[l]; n++) begin
        thr[l][n].alpha     = 24'(int'(base * (0.5 + 1.5 * real'($urandom_range(0, 1000)) / 1000.0)) + 1);
        thr[l][n].tau_alpha = 24'(int'($urandom_range(0, 2 * 256 * (1 << M))) - 256 * (1 << M));
      end
    end
    for (int i = 0; i < NIMG; i++)
      for (int p = 0; p < 32 * 32; p++) pix[i][p] = 24'($urandom);
    for (int i = 0; i < NIMG; i++) begin
      model_img = i;
      model_image();
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    // load weights and thresholds
    for (int l = 0; l < NL; l++) begin
      sf_n = L_MW[l] / L_SIMD[l];
      for (int n = 0; n < L_MH[l]; n++) begin
        nf = n / L_PE[l];
        for (int sf = 0; sf < sf_n; sf++) begin
          d = '0;
          for (int s = 0; s < L_SIMD[l]; s++) d[s] = wts[l][n*L_MW[l] + sf*L_SIMD[l] + s];
          cfg_write(l, CFG_WEIGHT, n % L_PE[l], nf * sf_n + sf, d);
        end
        cfg_write(l, CFG_THRESH, n % L_PE[l], nf, 64'(thr[l][n]));
      end
    end
    @(negedge clk); cfg_we = 0;
    $display("parameters loaded at cycle %0d", cycle);
    // stream the images
    for (int i = 0; i < NIMG; i++)
      for (int p = 0; p < 32 * 32; p++) begin
        img_valid = 1; img_data = pix[i][p];
        do @(posedge clk); while (!img_ready);
        @(negedge clk);
        img_valid = 0;
      end
    wait (nres == NIMG * 16);
    repeat (20) @(negedge clk);
    checks += 9;
    if (expq.size() != 0) begin failures++; $display("missing results"); end
    if (n_bp == 0)       begin failures++; $display("no result back-pressure"); end
    if (n_stall == 0)    begin failures++; $display("no inter-layer stall"); end
    if (n_swu_full == 0) begin failures++; $display("line buffer never full"); end
    if (n_replay == 0)   begin failures++; $display("no neuron-fold replay"); end
    if (n_wc == 0)       begin failures++; $display("no width conversion"); end
    if (n_pool == 0)     begin failures++; $display("no pooling output"); end
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("no saturation %0d %0d", sat_hi, sat_lo); end
    $display("image results at cycles %0d .. %0d; gap between the last two %0d (largest Fold %0d)",
             done_cycle[0], done_cycle[NIMG-1], done_cycle[NIMG-1] - done_cycle[NIMG-2], MAXFOLD);
    if (done_cycle[NIMG-1] - done_cycle[NIMG-2] > MAXFOLD + MAXFOLD / 100) begin
      failures++; $display("image interval more than 1%% above the largest Fold");
    end
    $display("counts: backpressure %0d stalls %0d swu_full %0d replay %0d wc %0d pool %0d sat %0d/%0d",
             n_bp, n_stall, n_swu_full, n_replay, n_wc, n_pool, sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
