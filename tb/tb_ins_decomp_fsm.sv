// tb_ins_decomp_fsm: checks the decompressor controller on its own. The
// testbench plays the T flip-flop and the steering logic (odd/even strobes
// alternating, odd first, advancing only while en is high) and feeds pairs of
// CEBM codewords (x then r) of random lengths. Each cycle it checks en, shift,
// rs (only with the first odd bit of a codeword), and that xr_valid rises
// exactly one cycle after the final even 1, with xr_is_r telling x from r.
// cpu_done is raised after a random delay, sometimes at once; en must stay
// low until it is seen.
`timescale 1ns/1ps
module tb_ins_decomp_fsm;
  import tb_ins_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic odd_stb = 1'b0, even_stb = 1'b0, even_bit = 1'b0, cpu_done = 1'b0;
  logic en, shift, rs, xr_valid, xr_is_r;
  int checks = 0, failures = 0;

  ins_decomp_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %0b expected %0b", $time, what, got, exp);
    end
  endtask

  int pairs_done = 0, waits = 0;

  initial begin
    codeword_t cw;
    logic      exp_valid_next, exp_is_r_next;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    exp_valid_next = 1'b0;
    exp_is_r_next  = 1'b0;
    for (int p = 0; p < 60; p++) begin
      for (int w = 0; w < 2; w++) begin
        longint unsigned v;
        v  = longint'($urandom_range(2, 5000));
        cw = cebm_encode(v);
        for (int b = 0; b < cw.len; b++) begin
          // negedge: drive the bit, check the combinational outputs
          odd_stb  = (b % 2 == 0);
          even_stb = (b % 2 == 1);
          even_bit = even_stb & cw.bits[b];
          #1;
          check(en, 1'b1, "en while reading");
          check(shift, odd_stb, "shift on odd bit");
          check(rs, (b == 0), "rs with first odd bit only");
          check(xr_valid, exp_valid_next, "xr_valid timing");
          if (exp_valid_next) check(xr_is_r, exp_is_r_next, "xr_is_r");
          exp_valid_next = (b == cw.len - 1);
          exp_is_r_next  = (w == 1);
          @(negedge clk);
        end
      end
      // after r: strobes idle, en must drop until cpu_done is seen
      odd_stb = 1'b0; even_stb = 1'b0; even_bit = 1'b0;
      #1;
      check(xr_valid, 1'b1, "r valid after last bit");
      check(xr_is_r, 1'b1, "r flagged as r");
      check(en, 1'b0, "en low while waiting for CPU");
      exp_valid_next = 1'b0;
      begin
        int d;
        d = (p % 3 == 0) ? 0 : $urandom_range(1, 6);
        if (d > 0) waits++;
        repeat (d) begin
          @(negedge clk) #1;
          check(en, 1'b0, "en held low");
          check(xr_valid, 1'b0, "no strobe while waiting");
        end
      end
      cpu_done = 1'b1;
      @(negedge clk) cpu_done = 1'b0;
      pairs_done++;
    end
    if (waits == 0) begin failures++; $display("FAIL no CPU wait exercised"); end
    $display("pairs=%0d cpu_waits=%0d", pairs_done, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
