// ins_shift_counter: the "special k+1 bits counter" of the INS decompressor.
// A CEBM codeword carries a run-length L as its odd bits: L in binary is a
// leading 1 followed by those odd bits. The register is therefore preset to
// 1 and each odd bit is shifted in at the LSB; the preset 1 climbs towards the
// MSB, and when the codeword ends the register holds L itself, with no adder.
//
// Interface: rs restarts the register at 1. shift loads din at the LSB. Both
// together (the first odd bit of a new codeword) give {1, din}. q is the
// current value, handed to the CPU as x or r.
// Timing: updates on the rising edge of clk; q is valid from the edge after
// the last odd bit until the next rs+shift. Synchronous active-low reset
// loads 1.
// The preset-1 shift scheme follows the document, as does the width
// W = k+1 with k = ceil(log2(Lmax+1)) - 1. The rs/shift encoding is this
// design's own. A codeword longer than W-1 odd bits would push the leading 1
// out of the MSB; the assertion below flags that, since the width is meant to
// be chosen from the largest x or r of the compressed test set.
module ins_shift_counter #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rs,
  input  logic         shift,
  input  logic         din,
  output logic [W-1:0] q
);

  localparam logic [W-1:0] ONE = W'(1);

  logic [W-2:0] base;   // bits that move up one place on a shift

  always_comb base = rs ? ONE[W-2:0] : q[W-2:0];

  always_ff @(posedge clk) begin
    if (!rst_n)      q <= ONE;
    else if (shift)  q <= {base, din};
    else if (rs)     q <= ONE;
  end

  // The value must fit: the leading 1 may never be shifted out of the top.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  (shift && !rs) |-> !q[W-1])
    else $error("ins_shift_counter: codeword longer than %0d odd bits", W - 1);

endmodule
