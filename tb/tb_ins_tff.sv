// tb_ins_tff: checks the T flip-flop of the INS decompressor. After reset q
// must read 1 (odd position first); afterwards q must invert on every edge
// with t high and hold on every edge with t low, for a random t sequence,
// compared with a reference bit kept by the testbench.
`timescale 1ns/1ps
module tb_ins_tff;
  logic clk = 1'b0, rst_n = 1'b0, t = 1'b0, q;
  int checks = 0, failures = 0;
  logic ref_q;

  ins_tff dut (.clk(clk), .rst_n(rst_n), .t(t), .q(q));

  always #5 clk = ~clk;

  task automatic check(logic exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(1'b1, "reset value");
    rst_n = 1'b1;
    ref_q = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk) t = 1'($urandom_range(0, 1));
      @(posedge clk) if (t) ref_q = ~ref_q;
      #1 check(ref_q, "toggle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
