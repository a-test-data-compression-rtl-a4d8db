// ins_pkg: types shared by the INS (irrational numbers stored) test-data
// decompressor. The controller walks through three phases per coded segment:
// it reads the CEBM codeword of the radicand x, then that of the root number r,
// then waits while the SoC CPU expands x^(1/r) into test bits. The phase
// encoding is this design's choice; the document only names the FSM.
package ins_pkg;

  typedef enum logic [1:0] {
    ST_READ_X   = 2'd0,  // shifting in the codeword of the radicand x
    ST_READ_R   = 2'd1,  // shifting in the codeword of the root number r
    ST_WAIT_CPU = 2'd2   // en low: CPU computes x^(1/r) and emits N bits
  } ins_state_e;

endpackage
