// Self-checking test of the interFIFO (8 bits, depth 4): random pushes and
// pops, order and data checked against a queue, full and empty both reached,
// and a word written into an empty FIFO readable one cycle later.
//
// The expected behaviour follows the design's arithmetic and dataflow; sizes,
// stimuli and the watchdog limit are this bench's own choice. It prints
// TB_RESULT checks=N failures=F and finishes.
module tb_stream_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [7:0] in_data, out_data;
  logic [7:0] q[$];
  int fulls = 0, pushes = 0, pops = 0;

  stream_fifo #(.W(8), .DEPTH(4)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (!in_ready) fulls++;
    if (out_valid && out_ready) begin
      checks++; pops++;
      if (q.size() == 0 || out_data !== q[0]) begin failures++; $display("pop %h", out_data); end
      if (q.size()) void'(q.pop_front());
    end
    if (in_valid && in_ready) begin
      q.push_back(in_data); pushes++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fall-through latency: one word into an empty FIFO
    @(negedge clk); in_valid = 1; in_data = 8'hA5;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid || out_data !== 8'hA5) begin failures++; $display("no fall-through"); end
    out_ready = 1;
    @(negedge clk); out_ready = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid  = (i < 1500) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      out_ready = (i < 1500) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      in_data   = 8'($urandom);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (10) @(negedge clk);
    checks += 2;
    if (fulls == 0) begin failures++; $display("never full"); end
    if (q.size() != 0 || pushes != pops) begin failures++; $display("lost data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
