// card_interface: encrypted card reader interface.
//
// Everything the card exchanges with a reader is TEA-encrypted. Bytes from the
// UART are packed into 64-bit blocks by the data shifter; the controller passes
// each block to the decryption block, whose plain text (a command) goes to the
// control interface with Decrypt Done. Replies come back from the control
// interface as plain text with Start Encrypt; the encryption block's cipher text
// is sent out through the shifter. Both cipher blocks use the key in the key
// register, which the control interface can update word by word (Key Update).
// The six-block structure (UART, data shifter, controller, key register,
// encryption, decryption) is the prototype's; the UART itself is outside this
// module, which connects to its byte-wide side.
//
// Timing: a received block reaches dec_done 35 clocks after its last byte
// (1 shifter + 1 controller + 33 decryption); enc_start to the first tx byte takes
// 35 clocks as well.
module card_interface (
  input  logic         clk,
  input  logic         rst_n,
  // UART byte side
  input  logic         rx_valid,
  input  logic [7:0]   rx_data,
  output logic         tx_valid,
  output logic [7:0]   tx_data,
  input  logic         tx_ready,
  // control interface side
  output logic         dec_done,
  output logic [63:0]  dec_plain,
  input  logic         enc_start,
  input  logic [63:0]  enc_plain,
  output logic         enc_busy,
  input  logic         key_we,
  input  logic [1:0]   key_idx,
  input  logic [31:0]  key_wdata,
  output logic         overrun
);

  logic [127:0] key;
  logic         rx_ready, tx_busy, tx_load;
  logic [63:0]  rx_block, tx_block;
  logic         dec_start, dec_busy;
  logic [63:0]  dec_cipher;
  logic         enc_done;
  logic [63:0]  enc_cipher;

  data_shifter u_shifter (
    .clk, .rst_n,
    .rx_valid, .rx_data, .rx_ready, .rx_block,
    .tx_load, .tx_block, .tx_busy, .tx_valid, .tx_data, .tx_ready
  );

  reader_controller u_ctrl (
    .clk, .rst_n,
    .rx_ready, .rx_block, .tx_busy, .tx_load, .tx_block,
    .dec_busy, .dec_start, .dec_cipher,
    .enc_done, .enc_cipher, .overrun
  );

  key_register u_key (
    .clk, .rst_n, .we(key_we), .idx(key_idx), .wdata(key_wdata), .key
  );

  tea_encrypt u_enc (
    .clk, .rst_n, .start(enc_start), .plain(enc_plain), .key,
    .busy(enc_busy), .done(enc_done), .cipher(enc_cipher)
  );

  tea_decrypt u_dec (
    .clk, .rst_n, .start(dec_start), .cipher(dec_cipher), .key,
    .busy(dec_busy), .done(dec_done), .plain(dec_plain)
  );

endmodule
