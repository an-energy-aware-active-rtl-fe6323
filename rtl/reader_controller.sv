// reader_controller: sequencing in the card reader interface.
//
// A complete cipher-text block from the data shifter is handed to the decryption
// block with a Decrypt Start pulse as soon as decryption is idle; a cipher-text
// block finished by the encryption block (Encrypt Done) is handed to the data
// shifter for transmission as soon as the shifter is idle. One block can wait on
// each path; a second received block arriving while one still waits overwrites
// it and sets the sticky `overrun` flag. The controller's place between shifter,
// encryption and decryption is the prototype's; the one-deep holding registers
// and the overrun flag are this design's choices.
//
// Timing: dec_start follows rx_ready by one clock when decryption is idle;
// tx_load follows enc_done by one clock when the shifter is idle.
module reader_controller (
  input  logic        clk,
  input  logic        rst_n,
  // from/to data shifter
  input  logic        rx_ready,
  input  logic [63:0] rx_block,
  input  logic        tx_busy,
  output logic        tx_load,
  output logic [63:0] tx_block,
  // to/from decryption
  input  logic        dec_busy,
  output logic        dec_start,
  output logic [63:0] dec_cipher,
  // from encryption
  input  logic        enc_done,
  input  logic [63:0] enc_cipher,
  output logic        overrun
);

  logic rx_pend_q, tx_pend_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_pend_q  <= 1'b0;
      tx_pend_q  <= 1'b0;
      dec_start  <= 1'b0;
      tx_load    <= 1'b0;
      dec_cipher <= '0;
      tx_block   <= '0;
      overrun    <= 1'b0;
    end else begin
      dec_start <= 1'b0;
      tx_load   <= 1'b0;
      // Receive path: shifter -> decryption.
      if (rx_ready) begin
        dec_cipher <= rx_block;
        if (rx_pend_q) overrun <= 1'b1;
        if (!dec_busy && !dec_start) begin
          dec_start <= 1'b1;
          rx_pend_q <= 1'b0;
        end else begin
          rx_pend_q <= 1'b1;
        end
      end else if (rx_pend_q && !dec_busy && !dec_start) begin
        dec_start <= 1'b1;
        rx_pend_q <= 1'b0;
      end
      // Transmit path: encryption -> shifter.
      if (enc_done) begin
        tx_block <= enc_cipher;
        if (!tx_busy && !tx_load) begin
          tx_load   <= 1'b1;
          tx_pend_q <= 1'b0;
        end else begin
          tx_pend_q <= 1'b1;
        end
      end else if (tx_pend_q && !tx_busy && !tx_load) begin
        tx_load   <= 1'b1;
        tx_pend_q <= 1'b0;
      end
    end
  end

endmodule
