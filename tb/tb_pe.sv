// Self-checking test of the processing element (SIMD 32, 2-bit inputs, 2-bit
// outputs). Random neurons of 1..6 beats are fed with random activations,
// weights, alpha and tau*alpha; the expected sum is
//   acc = sum over beats and lanes of (2c - 3) * (w ? +1 : -1)
// (c = 2-bit input code), the expected code comes from y = acc*alpha -
// 16*tau*alpha as in the encoder test. The enable is dropped at random to
// check that the pipe freezes, and the output must appear exactly two enabled
// cycles after the last beat of a neuron.
//
// The expected behaviour follows the design's arithmetic and dataflow; sizes,
// stimuli and the watchdog limit are this bench's own choice. It prints
// TB_RESULT checks=N failures=F and finishes.
module tb_pe;
  import rebnet_pkg::*;
  localparam int SIMD = 32, MI = 2, MO = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, valid = 0, first = 0, last = 0;
  logic [SIMD*MI-1:0] act;
  logic [SIMD-1:0] wgt;
  thr_t thr;
  logic vo;
  logic [MO-1:0] code;
  logic signed [ACC_W-1:0] acc;

  pe #(.SIMD(SIMD), .M_IN(MI), .M_OUT(MO), .ACT(1'b1)) dut (
    .clk, .rst_n, .en, .valid_i(valid), .first_i(first), .last_i(last),
    .act_i(act), .wgt_i(wgt), .thr_i(thr), .valid_o(vo), .code_o(code), .acc_o(acc));

  always #5 clk = ~clk;

  int exp_acc[$], exp_code[$], exp_time[$];
  int en_cycles = 0;

  function automatic int enc(longint y);
    longint v = y >>> 12;
    longint c = (v >>> 1) + 2;
    if (c < 0) c = 0;
    if (c > 3) c = 3;
    return int'(c);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && en) en_cycles++;

  initial begin
    int nbeats, sum;
    longint y;
    act = '0; wgt = '0; thr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      nbeats = $urandom_range(1, 6);
      sum = 0;
      thr.alpha     = 24'($urandom_range(64, 2048));
      thr.tau_alpha = 24'(int'($urandom_range(0, 4000)) - 2000);
      for (int b = 0; b < nbeats; b++) begin
        // random stall cycles
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk); en = 0; valid = 0;
        end
        @(negedge clk);
        en = 1; valid = 1;
        first = (b == 0); last = (b == nbeats - 1);
        act = {$urandom, $urandom};
        wgt = $urandom;
        for (int s = 0; s < SIMD; s++)
          sum += (2 * int'(act[s*MI+:MI]) - 3) * (wgt[s] ? 1 : -1);
        if (last) begin
          y = longint'(sum) * longint'(thr.alpha) - longint'(thr.tau_alpha) * 16;
          exp_acc.push_back(sum);
          exp_code.push_back(enc(y));
          exp_time.push_back(en_cycles + 2);  // consumed on the next enabled edge, +1 stage
        end
      end
      @(negedge clk); valid = 0; first = 0; last = 0;
    end
    @(negedge clk); en = 1; valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_acc.size() != 0) begin
      failures++;
      $display("%0d results never came out", exp_acc.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fresh output detector: sample after every enabled edge
  always @(posedge clk) begin
    if (rst_n && en) begin
      #1;
      if (vo) begin
        checks++;
        if (exp_acc.size() == 0) begin
          failures++;
          $display("unexpected output");
        end else begin
          if (int'(acc) != exp_acc[0] || int'(code) != exp_code[0] || en_cycles != exp_time[0]) begin
            failures++;
            $display("got acc=%0d code=%0d at %0d, expected acc=%0d code=%0d at %0d",
                     acc, code, en_cycles, exp_acc[0], exp_code[0], exp_time[0]);
          end
          void'(exp_acc.pop_front()); void'(exp_code.pop_front()); void'(exp_time.pop_front());
        end
      end
    end
  end
endmodule
