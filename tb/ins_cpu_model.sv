// ins_cpu_model: behavioural stand-in (not synthesizable) for the SoC CPU
// with its x87-style FPU that completes INS decompression. It takes x and r
// from the decompressor strobes, waits `latency` cycles to mimic the FPU
// program (root computed as 2^(log2(x)/r)), then presents the first N bits
// of x^(1/r) read as a hexadecimal number with one integer digit - the
// inverse of the encoder, which reads N test bits as a hex fraction d.ddd -
// and pulses cpu_done and out_valid for one cycle.
// Timing: out_bits/out_valid/cpu_done are registered. Double precision is
// exact enough for N = 48 (4 + 44 bits against a 53-bit significand) in the
// cases the testbench checks.
`timescale 1ns/1ps
module ins_cpu_model #(
  parameter int N     = 48,
  parameter int CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] xr,
  input  logic             xr_valid,
  input  logic             xr_is_r,
  input  logic [7:0]       latency,
  output logic             cpu_done,
  output logic [N-1:0]     out_bits,
  output logic             out_valid
);

  longint unsigned x_q, r_q;
  int              cnt;
  logic            busy;

  function automatic logic [N-1:0] root_bits(longint unsigned x, longint unsigned r);
    real v;
    v = $pow(real'(x), 1.0 / real'(r));
    return N'(longint'($floor(v * (2.0 ** (N - 4)))));
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cpu_done  <= 1'b0;
      out_valid <= 1'b0;
      out_bits  <= '0;
      cnt       <= 0;
      x_q       <= 0;
      r_q       <= 0;
    end else begin
      cpu_done  <= 1'b0;
      out_valid <= 1'b0;
      if (xr_valid && !xr_is_r) x_q <= longint'(xr);
      if (xr_valid && xr_is_r) begin
        r_q  <= longint'(xr);
        busy <= 1'b1;
        cnt  <= int'(latency);
      end else if (busy) begin
        if (cnt == 0) begin
          busy      <= 1'b0;
          cpu_done  <= 1'b1;
          out_valid <= 1'b1;
          out_bits  <= root_bits(x_q, r_q);
        end else begin
          cnt <= cnt - 1;
        end
      end
    end
  end

endmodule
