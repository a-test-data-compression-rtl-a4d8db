// tb_ins_pkg: stimulus helpers for the INS decompressor testbenches.
// cebm_encode builds the CEBM codeword of a value L >= 2: with m = floor(log2 L)
// the m bits of L below its leading 1 are the odd bits (most significant
// first), the even bits are m-1 zeros and a final 1, and the codeword sends
// them interleaved, odd bit first: L = 9 = 1001b gives 00 00 11.
package tb_ins_pkg;

  typedef struct {
    logic [127:0] bits;   // bits[0] is sent first
    int           len;    // 2*m
  } codeword_t;

  function automatic int msb_pos(longint unsigned v);
    int p = 0;
    for (int i = 0; i < 64; i++) if (v[i]) p = i;
    return p;
  endfunction

  function automatic codeword_t cebm_encode(longint unsigned value);
    codeword_t cw;
    int m = msb_pos(value);
    cw.bits = '0;
    cw.len  = 2 * m;
    for (int j = 0; j < m; j++) begin
      cw.bits[2*j]     = value[m-1-j];        // odd bit
      cw.bits[2*j + 1] = (j == m - 1);        // even bit: 1 ends the codeword
    end
    return cw;
  endfunction

endpackage
