// tea_ref_pkg: reference model of the TEA block cipher for the testbenches.
//
// Straight transcription of the published algorithm as a loop, independent of the
// clocked implementation: 32 cycles, delta 0x9E3779B9, v0 = block[63:32],
// v1 = block[31:0], key word i = key[32*i +: 32].
package tea_ref_pkg;

  function automatic logic [63:0] tea_enc(input logic [63:0] blk, input logic [127:0] key);
    logic [31:0] v0, v1, sum;
    logic [31:0] k [4];
    for (int i = 0; i < 4; i++) k[i] = key[32*i +: 32];
    v0 = blk[63:32]; v1 = blk[31:0]; sum = 0;
    for (int i = 0; i < 32; i++) begin
      sum += 32'h9E3779B9;
      v0  += ((v1 << 4) + k[0]) ^ (v1 + sum) ^ ((v1 >> 5) + k[1]);
      v1  += ((v0 << 4) + k[2]) ^ (v0 + sum) ^ ((v0 >> 5) + k[3]);
    end
    return {v0, v1};
  endfunction

  function automatic logic [63:0] tea_dec(input logic [63:0] blk, input logic [127:0] key);
    logic [31:0] v0, v1, sum;
    logic [31:0] k [4];
    for (int i = 0; i < 4; i++) k[i] = key[32*i +: 32];
    v0 = blk[63:32]; v1 = blk[31:0]; sum = 32'hC6EF3720;
    for (int i = 0; i < 32; i++) begin
      v1  -= ((v0 << 4) + k[2]) ^ (v0 + sum) ^ ((v0 >> 5) + k[3]);
      v0  -= ((v1 << 4) + k[0]) ^ (v1 + sum) ^ ((v1 >> 5) + k[1]);
      sum -= 32'h9E3779B9;
    end
    return {v0, v1};
  endfunction

endpackage
