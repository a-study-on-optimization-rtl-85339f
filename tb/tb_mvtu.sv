// Self-checking test of the MVTU at a small fold (MW 12, MH 8, SIMD 4, PE 2,
// 2-bit input and output codes: SF = 3, NF = 4, Fold 12 per vector).
// Weights and thresholds are written through the write port, then random
// vectors are streamed. Expected outputs are computed in the bench from the
// same random matrix: acc_n = sum_k (2x_k - 3) * (w_nk ? 1 : -1), code from
// y = acc*alpha - 16*tau*alpha. A second instance with ACT = 0 must give the
// raw sums. Phase 1 runs with the stream always valid and always ready and
// checks the initiation interval of 1 (N vectors in N*Fold cycles plus the
// pipeline latency); phase 2 adds random input gaps and output stalls.
//
// The expected behaviour follows the design's arithmetic and dataflow; sizes,
// stimuli and the watchdog limit are this bench's own choice. It prints
// TB_RESULT checks=N failures=F and finishes.
module tb_mvtu;
  import rebnet_pkg::*;
  localparam int MW = 12, MH = 8, SIMD = 4, PE = 2, MI = 2, MO = 2;
  localparam int SF = MW / SIMD, NF = MH / PE;
  localparam int NV1 = 20, NV2 = 60;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_ready_r;
  logic [SIMD*MI-1:0] in_data;
  logic out_valid, out_valid_r, out_ready = 0;
  logic [PE*MO-1:0] out_data;
  logic [PE*ACC_W-1:0] out_raw;
  logic wgt_we = 0, thr_we = 0;
  logic [0:0] wgt_pe, thr_pe;
  logic [3:0] wgt_addr;
  logic [1:0] thr_addr;
  logic [SIMD-1:0] wgt_data;
  thr_t thr_data;

  mvtu #(.MW(MW), .MH(MH), .SIMD(SIMD), .PE(PE), .M_IN(MI), .M_OUT(MO), .ACT(1'b1)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data,
    .wgt_we, .wgt_pe, .wgt_addr, .wgt_data, .thr_we, .thr_pe, .thr_addr, .thr_data);
  mvtu #(.MW(MW), .MH(MH), .SIMD(SIMD), .PE(PE), .M_IN(MI), .M_OUT(MO), .ACT(1'b0)) dut_raw (
    .clk, .rst_n, .in_valid, .in_ready(in_ready_r), .in_data, .out_valid(out_valid_r), .out_ready,
    .out_data(out_raw),
    .wgt_we, .wgt_pe, .wgt_addr, .wgt_data, .thr_we, .thr_pe, .thr_addr, .thr_data);

  always #5 clk = ~clk;

  bit   w [MH][MW];
  thr_t th [MH];
  int   exp_code[$], exp_acc[$];
  int   cycle = 0, first_in = -1, last_out = -1, nout = 0;
  bit   random_mode = 0;

  function automatic int enc(longint y);
    longint v = y >>> 12;
    longint c = (v >>> 1) + 2;
    if (c < 0) c = 0;
    if (c > 3) c = 3;
    return int'(c);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle++;

  task automatic send_vector();
    int x [MW];
    int acc;
    longint y;
    for (int k = 0; k < MW; k++) x[k] = $urandom_range(0, 3);
    for (int n = 0; n < MH; n++) begin
      acc = 0;
      for (int k = 0; k < MW; k++) acc += (2 * x[k] - 3) * (w[n][k] ? 1 : -1);
      y = longint'(acc) * longint'(th[n].alpha) - longint'(th[n].tau_alpha) * 16;
      exp_acc.push_back(acc);
      exp_code.push_back(enc(y));
    end
    for (int sf = 0; sf < SF; sf++) begin
      while (random_mode && $urandom_range(0, 2) == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      for (int s = 0; s < SIMD; s++) in_data[s*MI+:MI] = MI'(x[sf*SIMD+s]);
      do @(posedge clk); while (!in_ready);
      if (first_in < 0) first_in = cycle;
      @(negedge clk);
    end
    in_valid = 0;
    // the vector is replayed from the buffer for the other neuron folds
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      nout++;
      last_out = cycle;
      for (int p = 0; p < PE; p++) begin
        checks++;
        if (exp_code.size() == 0) begin
          failures++;
        end else begin
          if (int'(out_data[p*MO+:MO]) != exp_code[0] ||
              int'($signed(out_raw[p*ACC_W+:ACC_W])) != exp_acc[0] || !out_valid_r) begin
            failures++;
            $display("neuron out: code %0d raw %0d, expected %0d %0d", out_data[p*MO+:MO],
                     $signed(out_raw[p*ACC_W+:ACC_W]), exp_code[0], exp_acc[0]);
          end
          void'(exp_code.pop_front()); void'(exp_acc.pop_front());
        end
      end
    end
  end

  // output ready driver
  always @(negedge clk) out_ready = random_mode ? ($urandom_range(0, 2) != 0) : 1'b1;

  initial begin
    for (int n = 0; n < MH; n++) begin
      for (int k = 0; k < MW; k++) w[n][k] = 1'($urandom);
      th[n].alpha     = 24'($urandom_range(200, 1200));
      th[n].tau_alpha = 24'(int'($urandom_range(0, 6000)) - 3000);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load the parameters
    for (int n = 0; n < MH; n++) begin
      for (int sf = 0; sf < SF; sf++) begin
        @(negedge clk);
        wgt_we = 1; wgt_pe = 1'(n % PE); wgt_addr = 4'((n / PE) * SF + sf);
        for (int s = 0; s < SIMD; s++) wgt_data[s] = w[n][sf*SIMD+s];
      end
      @(negedge clk);
      wgt_we = 0; thr_we = 1; thr_pe = 1'(n % PE); thr_addr = 2'(n / PE); thr_data = th[n];
      @(negedge clk);
      thr_we = 0;
    end
    // phase 1: full rate
    for (int v = 0; v < NV1; v++) send_vector();
    wait (exp_code.size() == 0);
    checks++;
    if (last_out - first_in > NV1 * SF * NF + 4) begin
      failures++;
      $display("throughput: %0d vectors took %0d cycles, expected <= %0d", NV1,
               last_out - first_in, NV1 * SF * NF + 4);
    end
    // phase 2: random gaps and stalls
    random_mode = 1;
    for (int v = 0; v < NV2; v++) send_vector();
    fork
      wait (exp_code.size() == 0);
      repeat (5000) @(posedge clk);
    join_any
    checks++;
    if (nout != (NV1 + NV2) * NF) begin
      failures++;
      $display("output beats %0d, expected %0d", nout, (NV1 + NV2) * NF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
