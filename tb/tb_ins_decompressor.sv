// tb_ins_decompressor: end-to-end test of the INS decompressor at its default
// parameters, with a behavioural CPU model closing the loop.
//  1. The worked example of the scheme: the 48 test bits
//     0001 1010 1110 1000 1001 1111 1001 1001 0101 1010 1101 0011 are stored
//     as x = 8, r = 4, coded 000001 0001. The decompressor must deliver x = 8
//     and r = 4 and the CPU model must rebuild 0x1AE89F995AD3. Two further
//     known roots, sqrt(2) = 1.6A09E667F3B... and sqrt(3) = 1.BB67AE8584C...,
//     are checked the same way.
//  2. Random x/r pairs, coded with CEBM, from the shortest group A1 (2, 3) up
//     to the full counter width (63 odd bits), with random CPU latencies,
//     including none.
// Every cycle it checks that xr_valid comes exactly one cycle after the last
// bit of a codeword, carries the right value and x/r flag, and that en is low
// from then until the CPU reports done. It counts the mechanisms exercised:
// x and r decoded, A1 codewords, full-width codewords, CPU waits with en low
// and back-to-back pairs; any of them never seen counts as a failure.
`timescale 1ns/1ps
module tb_ins_decompressor;
  import tb_ins_pkg::*;

  localparam int CNT_W = 64;   // default of the design
  localparam int N     = 48;
  localparam longint unsigned MASK = (CNT_W >= 64) ? '1 : ((64'd1 << CNT_W) - 1);

  logic clk = 1'b0, rst_n = 1'b0, bit_in = 1'b0, cpu_done;
  logic en, xr_valid, xr_is_r;
  logic [CNT_W-1:0] xr;
  logic [7:0]   latency = 8'd0;
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
  int n_x = 0, n_r = 0, n_a1 = 0, n_full = 0, n_wait_cycles = 0, n_b2b = 0, n_out = 0;

  task automatic check64(longint unsigned got, longint unsigned exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %0h expected %0h", $time, what, got, exp);
      if (failures >= 50) begin   // the stream is lost: stop early
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  // Send one x/r pair as the tester would: one bit per clock while en is
  // high. Checks strobes cycle by cycle and returns after the CPU is done.
  task automatic send_pair(longint unsigned x, longint unsigned r, int lat,
                           longint unsigned exp_out, logic check_out);
    codeword_t cw;
    longint unsigned vals[2];
    vals[0] = x; vals[1] = r;
    latency = 8'(lat);
    while (!en) @(negedge clk);     // decompressor leaving its CPU wait
    for (int w = 0; w < 2; w++) begin
      cw = cebm_encode(vals[w]);
      if (vals[w] < 4) n_a1++;
      if (vals[w] >= (64'd1 << (CNT_W - 1))) n_full++;
      for (int b = 0; b < cw.len; b++) begin
        check64(longint'(en), 1, "en high while reading");
        bit_in = cw.bits[b];
        @(negedge clk);             // bit b taken at the edge just passed
        if (b == cw.len - 1 && w == 0) begin
          check64(longint'(xr_valid), 1, "x strobe after last bit");
          check64(longint'(xr), x, "decoded x");
          check64(longint'(xr_is_r), 0, "x flagged as x");
          n_x++;
        end else if (b != cw.len - 1) begin
          check64(longint'(xr_valid), 0, "no strobe inside a codeword");
        end
      end
    end
    // cycle after the last bit of r
    bit_in = 1'b0;
    check64(longint'(xr_valid), 1, "r strobe");
    check64(longint'(xr), r, "decoded r");
    check64(longint'(xr_is_r), 1, "r flagged as r");
    n_r++;
    check64(longint'(en), 0, "en low after r");
    // wait for the CPU; en must stay low until cpu_done has been seen
    for (int c = 0; !cpu_done; c++) begin
      if (c > 300) begin
        check64(0, 1, "CPU never finished");
        break;
      end
      @(negedge clk);
      if (!cpu_done) begin
        n_wait_cycles++;
        check64(longint'(en), 0, "en low while CPU busy");
      end
    end
    if (lat == 0) n_b2b++;
    if (check_out) begin
      check64(longint'(out_valid), 1, "CPU output strobe");
      check64(longint'(out_bits), exp_out, "rebuilt test bits");
      n_out++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // worked example and two known roots
    send_pair(8, 4, 3, 64'h1AE89F995AD3, 1'b1);
    send_pair(2, 2, 0, 64'h16A09E667F3B, 1'b1);
    send_pair(3, 2, 5, 64'h1BB67AE8584C, 1'b1);
    // random pairs
    for (int p = 0; p < 400; p++) begin
      longint unsigned x, r;
      int k;
      k = p % 5;
      case (k)
        0: begin x = longint'($urandom_range(2, 3)); r = longint'($urandom_range(2, 3)); end
        1: begin x = (64'd1 << (CNT_W - 1)) | {$urandom, $urandom}; r = longint'($urandom_range(2, 40)); end
        default: begin
          x = {$urandom, $urandom} >> $urandom_range(0, 62);
          r = longint'($urandom) >> $urandom_range(8, 30);
        end
      endcase
      x = x & MASK;
      r = r & MASK;
      if (x < 2) x = 2;
      if (r < 2) r = 2;
      send_pair(x, r, (p % 4 == 0) ? 0 : $urandom_range(1, 20), 0, 1'b0);
    end
    $display("x=%0d r=%0d A1=%0d full_width=%0d cpu_wait_cycles=%0d back_to_back=%0d outputs=%0d",
             n_x, n_r, n_a1, n_full, n_wait_cycles, n_b2b, n_out);
    if (n_x == 0 || n_r == 0 || n_a1 == 0 || n_full == 0 || n_wait_cycles == 0
        || n_b2b == 0 || n_out == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
