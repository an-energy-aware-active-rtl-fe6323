// tea_encrypt: Tiny Encryption Algorithm (TEA), encryption direction.
//
// TEA is a 64-bit block cipher with a 128-bit key: 32 cycles, each made of two
// Feistel half-rounds on the 32-bit halves v0 and v1, with a running sum that
// grows by the constant 0x9E3779B9 every cycle. The card reader interface of the
// prototype uses TEA, run by a state machine; the algorithm is the published one,
// and doing one full cycle (both half-rounds) per clock is this design's choice.
//
// Interface: pulse start with plain and key valid (ignored while busy); busy is
// high during the computation; done pulses for one clock with cipher valid, and
// cipher holds until the next start. Halves: v0 = block[63:32], v1 = block[31:0];
// key words k0..k3 = key[31:0], key[63:32], key[95:64], key[127:96].
// Timing: done comes CYCLES+1 clocks after start (default 33).
module tea_encrypt
  import sc_pkg::*;
#(
  parameter int unsigned CYCLES = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [63:0]  plain,
  input  logic [127:0] key,
  output logic         busy,
  output logic         done,
  output logic [63:0]  cipher
);

  logic [31:0] v0_q, v1_q, sum_q;
  logic [5:0]  cnt_q;
  logic [31:0] k0, k1, k2, k3;
  logic [31:0] sum_n, v0_n, v1_n;

  assign {k3, k2, k1, k0} = key;

  always_comb begin
    sum_n = sum_q + TEA_DELTA;
    v0_n  = v0_q + (((v1_q << 4) + k0) ^ (v1_q + sum_n) ^ ((v1_q >> 5) + k1));
    v1_n  = v1_q + (((v0_n << 4) + k2) ^ (v0_n + sum_n) ^ ((v0_n >> 5) + k3));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0_q  <= '0;
      v1_q  <= '0;
      sum_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          {v0_q, v1_q} <= plain;
          sum_q        <= '0;
          cnt_q        <= '0;
          busy         <= 1'b1;
        end
      end else begin
        v0_q  <= v0_n;
        v1_q  <= v1_n;
        sum_q <= sum_n;
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == 6'(CYCLES - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign cipher = {v0_q, v1_q};

endmodule
