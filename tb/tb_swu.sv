// Self-checking test of the sliding window unit: 5x5 map, 4 channels as two
// parts of SIMD 2, 2-bit elements, K = 3 (3x3 output, 9*2 beats per window).
// Three images are sent back to back with random input gaps and output
// stalls; each output beat must equal input pixel (oy+ky, ox+kx), part p of the
// same image, in (oy, ox, ky, kx, p) order. The bench also checks that the
// input was held back at least once because the K+1 line buffer was full, and
// that at full rate the unit sustains one output beat per cycle.
//
// The expected behaviour follows the design's arithmetic and dataflow; sizes,
// stimuli and the watchdog limit are this bench's own choice. It prints
// TB_RESULT checks=N failures=F and finishes.
module tb_swu;
  localparam int D = 5, CH = 4, K = 3, SIMD = 2, EW = 2;
  localparam int CP = CH / SIMD, OD = D - K + 1, W = SIMD * EW, NIMG = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data, out_data;
  int full_stalls = 0, cycle = 0, nout = 0, first_out = -1, last_out = -1;
  bit random_mode = 0;

  swu #(.IFM_DIM(D), .IFM_CH(CH), .K(K), .SIMD(SIMD), .EW(EW)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  logic [W-1:0] img [2*NIMG][D][D][CP];
  logic [W-1:0] expq[$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = random_mode ? ($urandom_range(0, 3) == 0) : 1'b1;

  always @(posedge clk) begin
    if (rst_n && in_valid && !in_ready) full_stalls++;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      nout++;
      if (first_out < 0) first_out = cycle;
      last_out = cycle;
      if (expq.size() == 0 || out_data !== expq[0]) begin
        failures++;
        $display("beat %0d: got %h expected %h", nout, out_data, expq.size() ? expq[0] : '0);
      end
      if (expq.size()) void'(expq.pop_front());
    end
  end

  task automatic send_images(int first, int count);
    for (int n = first; n < first + count; n++) begin
      for (int oy = 0; oy < OD; oy++)
        for (int ox = 0; ox < OD; ox++)
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++)
              for (int p = 0; p < CP; p++) expq.push_back(img[n][oy+ky][ox+kx][p]);
    end
    for (int n = first; n < first + count; n++)
      for (int y = 0; y < D; y++)
        for (int x = 0; x < D; x++)
          for (int p = 0; p < CP; p++) begin
            while (random_mode && $urandom_range(0, 3) == 0) begin
              in_valid = 0;
              @(negedge clk);
            end
            in_valid = 1;
            in_data  = img[n][y][x][p];
            do @(posedge clk); while (!in_ready);
            @(negedge clk);
          end
    in_valid = 0;
  endtask

  initial begin
    for (int n = 0; n < 2 * NIMG; n++)
      for (int y = 0; y < D; y++)
        for (int x = 0; x < D; x++)
          for (int p = 0; p < CP; p++) img[n][y][x][p] = W'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // full rate: output side must not idle once the first window is ready
    send_images(0, NIMG);
    wait (expq.size() == 0);
    checks++;
    if (last_out - first_out + 1 > NIMG * OD * OD * K * K * CP + NIMG * D * CP * 2) begin
      failures++;
      $display("full-rate run too slow: %0d cycles", last_out - first_out + 1);
    end
    random_mode = 1;
    send_images(NIMG, NIMG);
    fork
      wait (expq.size() == 0);
      repeat (20000) @(posedge clk);
    join_any
    checks += 2;
    if (nout != 2 * NIMG * OD * OD * K * K * CP) begin
      failures++;
      $display("got %0d beats", nout);
    end
    if (full_stalls == 0) begin
      failures++;
      $display("line buffer never filled up");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
