// ins_bit_split: the steering logic between the serial input and the rest of
// the INS decompressor. In the document's structure two tri-state buffers,
// one with an inverted enable, share bit_in; the T flip-flop output enables
// one or the other. Here the buffers become AND gates so the logic stays
// two-state and synthesizable: the side that is not selected reads 0, and a
// per-side strobe tells the receiver whether the bit is meant for it.
//
// Interface: odd_sel (from the T flip-flop) = 1 sends bit_in to the counter
// (odd_bit, odd_stb), = 0 sends it to the FSM (even_bit, even_stb). valid_in
// (the decompressor enable) qualifies both strobes.
// Timing: purely combinational.
module ins_bit_split (
  input  logic bit_in,
  input  logic valid_in,
  input  logic odd_sel,
  output logic odd_bit,
  output logic odd_stb,
  output logic even_bit,
  output logic even_stb
);

  always_comb begin
    odd_stb  = valid_in &  odd_sel;
    even_stb = valid_in & ~odd_sel;
    odd_bit  = bit_in &  odd_sel;
    even_bit = bit_in & ~odd_sel;
  end

endmodule
