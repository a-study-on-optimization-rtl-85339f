// popcount: number of ones in an N-bit word.
//
// Used once per residual level inside a processing element to count the
// positive products of an XNOR between activation bits and weight bits.
// Purely combinational: the bits are summed in a loop, and synthesis turns the
// sum of single bits into a compressor/adder tree.
//
// Source: the design only needs a popcount per level; the loop form is this
// design's choice. Interface: bits_i in, count_o out (CW = clog2(N+1) bits),
// no clock.
module popcount #(
  parameter int unsigned N = 32,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  bits_i,
  output logic [CW-1:0] count_o
);
  always_comb begin
    count_o = '0;
    for (int unsigned i = 0; i < N; i++) begin
      count_o = count_o + CW'(bits_i[i]);
    end
  end
endmodule
