// Self-checking test of the stream width converter: widening 8 -> 32 bits,
// narrowing 32 -> 8 bits and the equal-width bypass, each fed a random stream
// with random gaps and output stalls. The concatenated bit stream must come
// out unchanged, least significant part first; the narrowing converter must
// also reach one output beat per cycle when never stalled.
//
// The expected behaviour follows the design's arithmetic and dataflow; sizes,
// stimuli and the watchdog limit are this bench's own choice. It prints
// TB_RESULT checks=N failures=F and finishes.
module tb_width_conv;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic u_iv = 0, u_ir, u_ov, d_iv = 0, d_ir, d_ov, b_iv = 0, b_ir, b_ov;
  logic u_or = 0, d_or = 0, b_or = 0;
  logic [7:0]  u_id, d_od;
  logic [31:0] u_od, d_id;
  logic [15:0] b_id, b_od;
  logic [7:0]  bytes_u[$], bytes_d[$];
  logic [15:0] words_b[$];
  int cycle = 0, d_first = -1, d_last = -1, d_n = 0;
  bit stall = 1;

  width_conv #(.IN_W(8),  .OUT_W(32)) u_up (.clk, .rst_n, .in_valid(u_iv), .in_ready(u_ir), .in_data(u_id),
    .out_valid(u_ov), .out_ready(u_or), .out_data(u_od));
  width_conv #(.IN_W(32), .OUT_W(8))  u_dn (.clk, .rst_n, .in_valid(d_iv), .in_ready(d_ir), .in_data(d_id),
    .out_valid(d_ov), .out_ready(d_or), .out_data(d_od));
  width_conv #(.IN_W(16), .OUT_W(16)) u_by (.clk, .rst_n, .in_valid(b_iv), .in_ready(b_ir), .in_data(b_id),
    .out_valid(b_ov), .out_ready(b_or), .out_data(b_od));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;
  always @(negedge clk) begin
    u_or = stall ? ($urandom_range(0, 2) != 0) : 1'b1;
    d_or = stall ? ($urandom_range(0, 2) != 0) : 1'b1;
    b_or = ($urandom_range(0, 2) != 0);
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (u_ov && u_or) begin
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (bytes_u.size() == 0 || u_od[i*8+:8] !== bytes_u[0]) begin
          failures++; $display("up: byte %0d = %h", i, u_od[i*8+:8]);
        end
        if (bytes_u.size()) void'(bytes_u.pop_front());
      end
    end
    if (d_ov && d_or) begin
      checks++;
      d_n++;
      if (d_first < 0) d_first = cycle;
      d_last = cycle;
      if (bytes_d.size() == 0 || d_od !== bytes_d[0]) begin failures++; $display("down: %h", d_od); end
      if (bytes_d.size()) void'(bytes_d.pop_front());
    end
    if (b_ov && b_or) begin
      checks++;
      if (words_b.size() == 0 || b_od !== words_b[0]) begin failures++; $display("bypass: %h", b_od); end
      if (words_b.size()) void'(words_b.pop_front());
    end
  end

  task automatic feed_up(int n, bit gaps);
    for (int i = 0; i < n; i++) begin
      while (gaps && $urandom_range(0, 3) == 0) @(negedge clk);
      u_iv = 1; u_id = 8'($urandom); bytes_u.push_back(u_id);
      do @(posedge clk); while (!u_ir);
      @(negedge clk); u_iv = 0;
    end
  endtask
  task automatic feed_down(int n, bit gaps);
    for (int i = 0; i < n; i++) begin
      while (gaps && $urandom_range(0, 3) == 0) @(negedge clk);
      d_iv = 1; d_id = $urandom;
      for (int j = 0; j < 4; j++) bytes_d.push_back(d_id[j*8+:8]);
      do @(posedge clk); while (!d_ir);
      @(negedge clk); d_iv = 0;
    end
  endtask
  task automatic feed_bypass(int n);
    for (int i = 0; i < n; i++) begin
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      b_iv = 1; b_id = 16'($urandom); words_b.push_back(b_id);
      do @(posedge clk); while (!b_ir);
      @(negedge clk); b_iv = 0;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      feed_up(400, 1);
      feed_down(100, 1);
      feed_bypass(300);
    join
    repeat (20) @(negedge clk);
    // full-rate narrowing: 50 words -> 200 beats in 200 cycles
    stall = 0;
    d_n = 0; d_first = -1;
    @(negedge clk);
    d_iv = 1;
    for (int i = 0; i < 50; i++) begin
      d_id = $urandom;
      for (int j = 0; j < 4; j++) bytes_d.push_back(d_id[j*8+:8]);
      do @(posedge clk); while (!d_ir);
      @(negedge clk);
    end
    d_iv = 0;
    repeat (10) @(negedge clk);
    checks += 2;
    if (d_n != 200 || d_last - d_first + 1 != 200) begin
      failures++; $display("narrowing rate: %0d beats in %0d cycles", d_n, d_last - d_first + 1);
    end
    if (bytes_u.size() != 0 || bytes_d.size() != 0 || words_b.size() != 0) begin
      failures++; $display("left over %0d %0d %0d", bytes_u.size(), bytes_d.size(), words_b.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
