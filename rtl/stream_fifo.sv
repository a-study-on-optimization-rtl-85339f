// stream_fifo: synchronous FIFO between two dataflow stages (interFIFO).
//
// DEPTH entries of W bits with valid/ready on both sides. Write and read may
// happen in the same cycle; the head entry is read combinationally (first-word
// fall-through), so an entry can leave the cycle after it was written. The
// depth sets how far one layer can run ahead of the next.
//
// Source: the design places interFIFOs between layers; the fall-through form
// and the depth are this design's choice. Timing: in_ready = not full,
// out_valid = not empty, both decoded from the count register.
module stream_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  localparam int unsigned AW = DEPTH > 1 ? $clog2(DEPTH) : 1;
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic          wr, rd;

  assign in_ready  = (cnt != (AW+1)'(DEPTH));
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rp];
  assign wr        = in_valid && in_ready;
  assign rd        = out_valid && out_ready;

  always_ff @(posedge clk) if (wr) mem[wp] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(wr) - (AW+1)'(rd);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) cnt <= (AW+1)'(DEPTH));
endmodule
