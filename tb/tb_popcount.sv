// Self-checking test of popcount: random and corner words for a 32-bit and a
// 3-bit counter, compared with a bit-by-bit count.
//
// The expected behaviour follows the design's arithmetic and dataflow; sizes,
// stimuli and the watchdog limit are this bench's own choice. It prints
// TB_RESULT checks=N failures=F and finishes.
module tb_popcount;
  int checks = 0, failures = 0;
  logic [31:0] a;  logic [5:0] ca;
  logic [2:0]  b;  logic [1:0] cb;
  popcount #(.N(32)) u_a (.bits_i(a), .count_o(ca));
  popcount #(.N(3))  u_b (.bits_i(b), .count_o(cb));

  function automatic int ref_count(logic [31:0] v);
    int n = 0;
    for (int i = 0; i < 32; i++) n += int'(v[i]);
    return n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      case (t)
        0: a = '0;
        1: a = '1;
        2: a = 32'h8000_0001;
        default: a = $urandom;
      endcase
      b = 3'($urandom);
      #1;
      checks += 2;
      if (int'(ca) != ref_count(a)) begin
        failures++;
        $display("popcount32 %h -> %0d, expected %0d", a, ca, ref_count(a));
      end
      if (int'(cb) != ref_count({29'b0, b})) begin
        failures++;
        $display("popcount3 %b -> %0d", b, cb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
