// ins_tff: the T flip-flop of the INS decompressor. The coded stream
// interleaves odd bits (value bits of a CEBM codeword) and even bits
// (end-of-codeword flags); this flip-flop tells the two positions apart by
// toggling on every clock edge at which its T input is high.
//
// Interface: t is tied to the decompressor enable, so the flip-flop stands
// still while no data is being read. q = 1 marks an odd position (first bit of
// every pair), q = 0 an even one.
// Timing: q changes on the rising edge of clk; synchronous active-low reset
// loads INIT.
// The T flip-flop itself and its role follow the document. The reset value
// (odd position first) and driving T from the enable are this design's
// choices, picked so the unbubbled buffer of the structure diagram passes the
// first (odd) bit of each pair.
module ins_tff #(
  parameter bit INIT = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic t,
  output logic q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= INIT;
    else if (t)  q <= ~q;
  end

endmodule
