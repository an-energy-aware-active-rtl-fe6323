// tea_decrypt: Tiny Encryption Algorithm (TEA), decryption direction.
//
// Undoes tea_encrypt: the running sum starts at CYCLES * 0x9E3779B9 and the two
// Feistel half-rounds are applied in reverse order with subtraction, one full
// cycle per clock. The prototype's reader interface has separate encryption and
// decryption blocks sharing one key register; this block is the decryption one.
//
// Interface and timing as tea_encrypt: start (ignored while busy) loads cipher;
// done pulses CYCLES+1 clocks later with plain valid.
module tea_decrypt
  import sc_pkg::*;
#(
  parameter int unsigned CYCLES = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [63:0]  cipher,
  input  logic [127:0] key,
  output logic         busy,
  output logic         done,
  output logic [63:0]  plain
);

  localparam logic [31:0] SUM0 = 32'(TEA_DELTA * CYCLES);

  logic [31:0] v0_q, v1_q, sum_q;
  logic [5:0]  cnt_q;
  logic [31:0] k0, k1, k2, k3;
  logic [31:0] v0_n, v1_n;

  assign {k3, k2, k1, k0} = key;

  always_comb begin
    v1_n = v1_q - (((v0_q << 4) + k2) ^ (v0_q + sum_q) ^ ((v0_q >> 5) + k3));
    v0_n = v0_q - (((v1_n << 4) + k0) ^ (v1_n + sum_q) ^ ((v1_n >> 5) + k1));
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
          {v0_q, v1_q} <= cipher;
          sum_q        <= SUM0;
          cnt_q        <= '0;
          busy         <= 1'b1;
        end
      end else begin
        v0_q  <= v0_n;
        v1_q  <= v1_n;
        sum_q <= sum_q - TEA_DELTA;
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == 6'(CYCLES - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign plain = {v0_q, v1_q};

endmodule
