// tb_ins_roundtrip: compress-and-restore run of the whole INS flow on
// pseudo-random test data with don't-care bits, with the decompressor at its
// default size. The stream is cut into N = 16 bit segments; each bit is a
// don't-care with probability rho (0, 50, 80 and 95 percent in turn). Like
// the off-line encoder, the testbench finds for each segment the smallest
// root number r (from 2 up) and then the smallest radicand x whose r-th root,
// read as one hex integer digit and three hex fraction digits, agrees with
// the segment on every specified bit. It sends the CEBM codewords of x and r
// through the decompressor, lets the CPU model rebuild the segment, and
// checks the rebuilt bits against the specified ones. A segment whose first
// four bits are all specified 0 reads as a number below 1, which no root of
// x >= 2 can match, so such segments get a 1 in their first nibble. For each
// rho it prints the compression gain (original bits / coded bits), which
// should rise with rho; a gain at 95 percent no higher than at 0 percent
// counts as a failure.
`timescale 1ns/1ps
module tb_ins_roundtrip;
  import tb_ins_pkg::*;

  localparam int N        = 16;
  localparam int CNT_W    = 64;     // default of the design
  localparam int SEGMENTS = 60;     // per rho
  localparam int RHO [4] = '{0, 50, 80, 95};

  logic clk = 1'b0, rst_n = 1'b0, bit_in = 1'b0, cpu_done;
  logic en, xr_valid, xr_is_r;
  logic [CNT_W-1:0] xr;
  logic [7:0]   latency = 8'd2;
  logic [N-1:0] out_bits;
  logic         out_valid;

  ins_decompressor dut (
    .clk, .rst_n, .bit_in, .en, .cpu_done, .xr, .xr_valid, .xr_is_r
  );

  ins_cpu_model #(.N(N), .CNT_W(CNT_W)) cpu (
    .clk, .rst_n, .xr, .xr_valid, .xr_is_r, .latency, .cpu_done, .out_bits, .out_valid
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int coded_bits = 0;

  function automatic logic [N-1:0] root_prefix(longint unsigned x, int r);
    return N'(longint'($floor($pow(real'(x), 1.0 / real'(r)) * (2.0 ** (N - 4)))));
  endfunction

  // smallest r, then smallest x, whose root prefix matches seg on care bits
  task automatic encode(logic [N-1:0] seg, logic [N-1:0] care,
                        output longint unsigned x, output int r);
    real lo, hi;
    lo = real'(seg & care) / (2.0 ** (N - 4));
    hi = real'((seg & care) | ~care) / (2.0 ** (N - 4)) + 2.0 ** (4 - N);
    for (r = 2; r < 64; r++) begin
      longint unsigned c, top;
      c   = longint'($floor($pow(lo, real'(r))));
      top = longint'($ceil($pow(hi, real'(r))));
      if (c < 2) c = 2;
      if (top > c + 4000) top = c + 4000;   // bound the scan per r
      for (longint unsigned k = c; k <= top; k++) begin
        if (((root_prefix(k, r) ^ seg) & care) == '0) begin
          x = k;
          return;
        end
      end
    end
    x = 0;
  endtask

  task automatic send(longint unsigned v);
    codeword_t cw;
    cw = cebm_encode(v);
    coded_bits += cw.len;
    for (int b = 0; b < cw.len; b++) begin
      while (!en) @(negedge clk);
      bit_in = cw.bits[b];
      @(negedge clk);
    end
    bit_in = 1'b0;
  endtask

  initial begin
    real gain [4];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int p = 0; p < 4; p++) begin
      int max_bits;
      max_bits   = 0;
      coded_bits = 0;
      for (int s = 0; s < SEGMENTS; s++) begin
        logic [N-1:0]    seg, care, hi_seg;
        longint unsigned x;
        int              r;
        seg = N'($urandom);
        for (int b = 0; b < N; b++) care[b] = ($urandom_range(0, 99) >= RHO[p]);
        hi_seg = (seg & care) | ~care;        // largest value the segment allows
        if (hi_seg[N-1 -: 4] == 4'd0) begin
          seg[N-1 -: 4] = 4'(1 + s % 15);
          care[N-1 -: 4] = 4'hF;
        end
        encode(seg, care, x, r);
        checks++;
        if (x == 0) begin
          failures++;
          $display("FAIL no (x, r) found for %h care %h", seg, care);
          continue;
        end
        if ($clog2(x + 1) > max_bits) max_bits = $clog2(x + 1);
        send(x);
        send(longint'(r));
        while (!out_valid) @(negedge clk);
        checks++;
        if (((out_bits ^ seg) & care) != '0) begin
          failures++;
          $display("FAIL rho=%0d segment %0d: rebuilt %h from x=%0d r=%0d, expected %h care %h",
                   RHO[p], s, out_bits, x, r, seg, care);
        end
        @(negedge clk);
      end
      gain[p] = real'(SEGMENTS * N) / real'(coded_bits);
      $display("rho=%0d%% segments=%0d original_bits=%0d coded_bits=%0d gain=%0.2f largest_x_bits=%0d",
               RHO[p], SEGMENTS, SEGMENTS * N, coded_bits, gain[p], max_bits);
    end
    checks++;
    if (!(gain[3] > gain[0])) begin
      failures++;
      $display("FAIL gain does not rise with the share of don't-care bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
