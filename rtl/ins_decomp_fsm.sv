// ins_decomp_fsm: controller of the INS decompressor. Each compressed test
// segment arrives as two CEBM codewords, first the radicand x, then the root
// number r. In a codeword the bits alternate odd (value) / even (flag); an
// even bit of 1 ends the codeword. The FSM keeps en high while it reads,
// lets the odd bits be shifted into the k+1 bit counter, watches the even
// bits, and after r drops en until the CPU reports that x^(1/r) has been
// expanded into test data.
//
// Interface:
//   odd_stb            the current bit is an odd bit (goes to the counter)
//   even_stb, even_bit the current bit is an even bit, and its value
//   cpu_done           CPU has finished with the pair (sampled in WAIT_CPU)
//   en                 request one coded bit per clock
//   shift, rs          counter controls: shift in the odd bit / restart at 1
//   xr_valid, xr_is_r  one-cycle strobe, registered, that the counter holds a
//                      complete x (xr_is_r = 0) or r (xr_is_r = 1)
// shift is the odd-bit strobe unchanged, since every odd bit goes straight
// into the counter; it is kept as an output so the counter's control comes
// from the FSM as in the document's structure.
// Timing: the codeword ends on the clock edge that samples its final even 1;
// xr_valid is high in the following cycle, while the counter still holds the
// value, because the counter is restarted only together with the first odd
// bit of the next codeword (rs with shift). The FSM leaves WAIT_CPU on the
// edge at which cpu_done is sampled high, so with cpu_done tied high the
// decompressor loses a single cycle per segment.
// The document gives en, Shift, rs, the even-bit termination rule and the
// order x then r. The state encoding, the registered strobe, the late
// counter restart and the cpu_done handshake are this design's choices.
module ins_decomp_fsm
  import ins_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic odd_stb,
  input  logic even_stb,
  input  logic even_bit,
  input  logic cpu_done,
  output logic en,
  output logic shift,
  output logic rs,
  output logic xr_valid,
  output logic xr_is_r
);

  ins_state_e state;
  logic       fresh;     // next odd bit starts a new codeword
  logic       cw_end;    // this even bit closes the current codeword

  always_comb begin
    en     = (state != ST_WAIT_CPU);
    shift  = odd_stb;
    rs     = fresh & odd_stb;
    cw_end = even_stb & even_bit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ST_READ_X;
      fresh    <= 1'b1;
      xr_valid <= 1'b0;
      xr_is_r  <= 1'b0;
    end else begin
      xr_valid <= 1'b0;
      if (odd_stb) fresh <= 1'b0;
      unique case (state)
        ST_READ_X: if (cw_end) begin
          state    <= ST_READ_R;
          fresh    <= 1'b1;
          xr_valid <= 1'b1;
          xr_is_r  <= 1'b0;
        end
        ST_READ_R: if (cw_end) begin
          state    <= ST_WAIT_CPU;
          fresh    <= 1'b1;
          xr_valid <= 1'b1;
          xr_is_r  <= 1'b1;
        end
        ST_WAIT_CPU: if (cpu_done) state <= ST_READ_X;
        default: state <= ST_READ_X;
      endcase
    end
  end

  // Odd and even positions are exclusive, and no bit is taken while waiting.
  a_one_position: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(odd_stb && even_stb));
  a_no_read_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
                                      (state == ST_WAIT_CPU) |-> !(odd_stb || even_stb));

endmodule
