// Self-checking test of max pooling: 6x6 maps (and a 5x5 map, whose last row
// and column are dropped), 4 channels as two parts of SIMD 2, 2-bit codes.
// Each output element must be the unsigned maximum of the four codes of its
// 2x2 window. Random input gaps and output stalls; two images back to back.
//
// The expected behaviour follows the design's arithmetic and dataflow; sizes,
// stimuli and the watchdog limit are this bench's own choice. It prints
// TB_RESULT checks=N failures=F and finishes.
module tb_maxpool;
  localparam int CH = 4, SIMD = 2, EW = 2, CP = CH / SIMD, W = SIMD * EW;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic a_iv = 0, a_ir, a_ov, b_iv = 0, b_ir, b_ov, out_ready = 0;
  logic [W-1:0] a_id, a_od, b_id, b_od;
  logic [W-1:0] qa[$], qb[$];

  maxpool #(.IFM_DIM(6), .CH(CH), .SIMD(SIMD), .EW(EW)) dut (
    .clk, .rst_n, .in_valid(a_iv), .in_ready(a_ir), .in_data(a_id),
    .out_valid(a_ov), .out_ready, .out_data(a_od));
  maxpool #(.IFM_DIM(5), .CH(CH), .SIMD(SIMD), .EW(EW)) dut_odd (
    .clk, .rst_n, .in_valid(b_iv), .in_ready(b_ir), .in_data(b_id),
    .out_valid(b_ov), .out_ready, .out_data(b_od));

  always #5 clk = ~clk;
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && a_ov && out_ready) begin
      checks++;
      if (qa.size() == 0 || a_od !== qa[0]) begin failures++; $display("6x6: got %h", a_od); end
      if (qa.size()) void'(qa.pop_front());
    end
    if (rst_n && b_ov && out_ready) begin
      checks++;
      if (qb.size() == 0 || b_od !== qb[0]) begin failures++; $display("5x5: got %h", b_od); end
      if (qb.size()) void'(qb.pop_front());
    end
  end

  task automatic run(int d, bit which);
    logic [W-1:0] m [8][8][CP];
    logic [W-1:0] e;
    for (int y = 0; y < d; y++)
      for (int x = 0; x < d; x++)
        for (int p = 0; p < CP; p++) m[y][x][p] = W'($urandom);
    for (int oy = 0; oy < d / 2; oy++)
      for (int ox = 0; ox < d / 2; ox++)
        for (int p = 0; p < CP; p++) begin
          for (int s = 0; s < SIMD; s++) begin
            e[s*EW+:EW] = '0;
            for (int dy = 0; dy < 2; dy++)
              for (int dx = 0; dx < 2; dx++)
                if (m[2*oy+dy][2*ox+dx][p][s*EW+:EW] > e[s*EW+:EW])
                  e[s*EW+:EW] = m[2*oy+dy][2*ox+dx][p][s*EW+:EW];
          end
          if (which) qb.push_back(e); else qa.push_back(e);
        end
    for (int y = 0; y < d; y++)
      for (int x = 0; x < d; x++)
        for (int p = 0; p < CP; p++) begin
          while ($urandom_range(0, 3) == 0) @(negedge clk);
          if (which) begin b_iv = 1; b_id = m[y][x][p]; end
          else       begin a_iv = 1; a_id = m[y][x][p]; end
          do @(posedge clk); while (which ? !b_ir : !a_ir);
          @(negedge clk);
          a_iv = 0; b_iv = 0;
        end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2; i++) run(6, 0);
    for (int i = 0; i < 2; i++) run(5, 1);
    repeat (50) @(negedge clk);
    checks++;
    if (qa.size() != 0 || qb.size() != 0) begin
      failures++;
      $display("missing outputs %0d %0d", qa.size(), qb.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
