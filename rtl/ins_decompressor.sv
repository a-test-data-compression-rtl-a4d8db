// ins_decompressor: top level of the decompressor for INS (irrational numbers
// stored) test-data compression. Off-line, every N-bit slice of the test
// stream is read as a hexadecimal fraction f and replaced by the smallest
// integers x, r with x^(1/r) = f to N bits; x and r are sent to the chip as
// CEBM codewords, in which odd bits carry the value (after an implied leading
// 1) and even bits are 0 except the last. On chip this block turns the coded
// serial stream back into x and r and hands them to the SoC CPU, whose FPU
// evaluates 2^(log2(x)/r) and emits the N test bits.
//
// Structure (as in the document's decompressor diagram): a T flip-flop marks
// odd/even positions, a steering network sends odd bits to the k+1 bit
// counter and even bits to the FSM, and the FSM drives en, Shift and rs. The
// CPU is not part of this RTL: its x/r input and completion handshake are
// the ports xr, xr_valid, xr_is_r and cpu_done.
//
// Interface:
//   bit_in    coded data, one bit per clock while en is high
//   en        request for coded data
//   xr        counter value, CNT_W bits (= k+1)
//   xr_valid  one-cycle strobe, xr is a complete x (xr_is_r=0) or r (=1)
//   cpu_done  CPU finished the current pair; reading resumes
// Timing: a codeword of 2m bits takes 2m clocks; xr_valid follows its last
// bit by one cycle. After r, en stays low from the cycle after its last bit
// until the edge after cpu_done is seen high.
// CNT_W = 64 is this design's default: the document sizes the counter from
// the largest x or r of the compressed set (CNT_W = k+1 with
// k = ceil(log2(Lmax+1)) - 1) without giving a number for any test set; its
// worked example, x = 8, would need only 4 bits. A fully specified 48-bit
// segment typically needs a radicand of 35 to 48 bits, and 64 bits is also the
// widest integer an x87 FPU loads, so 64 covers what the CPU can use.
module ins_decompressor #(
  parameter int unsigned CNT_W = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bit_in,
  output logic             en,
  input  logic             cpu_done,
  output logic [CNT_W-1:0] xr,
  output logic             xr_valid,
  output logic             xr_is_r
);

  logic odd_sel;
  logic odd_bit, odd_stb, even_bit, even_stb;
  logic shift, rs;

  ins_tff u_tff (
    .clk   (clk),
    .rst_n (rst_n),
    .t     (en),
    .q     (odd_sel)
  );

  ins_bit_split u_split (
    .bit_in   (bit_in),
    .valid_in (en),
    .odd_sel  (odd_sel),
    .odd_bit  (odd_bit),
    .odd_stb  (odd_stb),
    .even_bit (even_bit),
    .even_stb (even_stb)
  );

  ins_decomp_fsm u_fsm (
    .clk      (clk),
    .rst_n    (rst_n),
    .odd_stb  (odd_stb),
    .even_stb (even_stb),
    .even_bit (even_bit),
    .cpu_done (cpu_done),
    .en       (en),
    .shift    (shift),
    .rs       (rs),
    .xr_valid (xr_valid),
    .xr_is_r  (xr_is_r)
  );

  ins_shift_counter #(.W(CNT_W)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .rs    (rs),
    .shift (shift),
    .din   (odd_bit),
    .q     (xr)
  );

endmodule
