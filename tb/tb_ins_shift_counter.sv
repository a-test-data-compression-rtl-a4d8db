// tb_ins_shift_counter: checks the preset-1 shift counter at its default
// width. Random values L from 2 up to 2^W - 1 are split into the bits below
// their leading 1 and shifted in MSB first, the first one with rs; after the
// last bit the register must hold L. Between values the testbench idles a
// random number of cycles (the value must hold), and sometimes applies rs
// alone (the register must read 1).
`timescale 1ns/1ps
module tb_ins_shift_counter;
  import tb_ins_pkg::*;
  localparam int W = 64;
  localparam longint unsigned MASK = (W >= 64) ? '1 : ((64'd1 << W) - 1);

  logic clk = 1'b0, rst_n = 1'b0, rs = 1'b0, shift = 1'b0, din = 1'b0;
  logic [W-1:0] q;
  int checks = 0, failures = 0;

  ins_shift_counter dut (.*);   // default width, W = 64

  always #5 clk = ~clk;

  task automatic check(logic [W-1:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0h expected %0h", what, q, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(W'(1), "reset value");
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      longint unsigned v;
      int m;
      case (n % 4)
        0: v = longint'($urandom_range(2, 3));
        1: v = (64'd1 << (W - 1)) | {$urandom, $urandom};   // full width
        default: v = {$urandom, $urandom} >> $urandom_range(0, W - 2);
      endcase
      v = v & MASK;
      if (v < 2) v = 2;
      m = msb_pos(v);
      for (int j = 0; j < m; j++) begin
        @(negedge clk);
        shift = 1'b1;
        rs    = (j == 0);
        din   = v[m-1-j];
      end
      @(negedge clk);
      shift = 1'b0; rs = 1'b0;
      check(W'(v), "decoded value");
      repeat ($urandom_range(0, 3)) @(negedge clk);
      check(W'(v), "value holds");
      if ($urandom_range(0, 3) == 0) begin
        rs = 1'b1;
        @(negedge clk) rs = 1'b0;
        check(W'(1), "rs alone restarts at 1");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
