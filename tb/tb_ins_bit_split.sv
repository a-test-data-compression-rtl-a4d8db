// tb_ins_bit_split: exhaustive check of the odd/even steering logic. For all
// eight combinations of bit_in, valid_in and odd_sel the four outputs are
// compared with a truth table written out in the testbench: each bit goes
// to the side odd_sel selects, and valid_in gates only the two strobes.
`timescale 1ns/1ps
module tb_ins_bit_split;
  logic bit_in, valid_in, odd_sel;
  logic odd_bit, odd_stb, even_bit, even_stb;
  int checks = 0, failures = 0;

  ins_bit_split dut (.*);

  // {odd_bit, odd_stb, even_bit, even_stb} indexed by {bit_in, valid_in, odd_sel}
  // The bits follow odd_sel alone; valid_in gates only the strobes.
  logic [3:0] expected [8] = '{4'b0000, 4'b0000, 4'b0001, 4'b0100,
                               4'b0010, 4'b1000, 4'b0011, 4'b1100};

  initial begin
    for (int i = 0; i < 8; i++) begin
      {bit_in, valid_in, odd_sel} = 3'(i);
      #1;
      checks++;
      if ({odd_bit, odd_stb, even_bit, even_stb} !== expected[i]) begin
        failures++;
        $display("FAIL in=%03b got %04b expected %04b", 3'(i),
                 {odd_bit, odd_stb, even_bit, even_stb}, expected[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
