// key_register: the 128-bit TEA key of the card reader interface.
//
// One key serves both the encryption and the decryption block. The key is
// replaced periodically (for instance by the microcontroller's key-update
// routine, which derives a new key from the old one) through the Key Update path,
// one 32-bit word at a time. Word-wise update and a zero key after reset are this
// design's choices.
//
// Interface: we writes wdata into key word idx (word i is key[32*i +: 32]).
// Timing: the new word is visible the clock after we.
module key_register (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [1:0]   idx,
  input  logic [31:0]  wdata,
  output logic [127:0] key
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  key <= '0;
    else if (we) key[idx*32 +: 32] <= wdata;
  end

endmodule
