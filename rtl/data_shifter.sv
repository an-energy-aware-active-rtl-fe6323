// data_shifter: byte <-> block conversion between the UART and the TEA blocks.
//
// The reader exchanges 64-bit encrypted blocks with the card one byte at a time
// through the UART. On the receive side the shifter collects eight bytes, most
// significant first, and then presents the block with a one-clock `rx_ready`. On
// the transmit side a block loaded with tx_load is sent out as eight bytes, most
// significant first, over a valid/ready byte handshake. The role of the shifter
// (between UART, controller and encryption block) is the prototype's; byte order
// and handshakes are this design's choices.
//
// Timing: rx_ready is high in the clock after the eighth rx_valid byte. tx_valid
// rises the clock after tx_load; each byte is taken on a clock with tx_valid and
// tx_ready both high. tx_load while tx_busy is ignored.
module data_shifter (
  input  logic        clk,
  input  logic        rst_n,
  // UART receive side
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  output logic        rx_ready,
  output logic [63:0] rx_block,
  // UART transmit side
  input  logic        tx_load,
  input  logic [63:0] tx_block,
  output logic        tx_busy,
  output logic        tx_valid,
  output logic [7:0]  tx_data,
  input  logic        tx_ready
);

  logic [2:0]  rx_cnt_q;
  logic [63:0] tx_q;
  logic [3:0]  tx_left_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_cnt_q <= '0;
      rx_block <= '0;
      rx_ready <= 1'b0;
    end else begin
      rx_ready <= 1'b0;
      if (rx_valid) begin
        rx_block <= {rx_block[55:0], rx_data};
        rx_cnt_q <= rx_cnt_q + 1'b1;
        if (rx_cnt_q == 3'd7) rx_ready <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_q      <= '0;
      tx_left_q <= '0;
    end else if (tx_left_q == '0) begin
      if (tx_load) begin
        tx_q      <= tx_block;
        tx_left_q <= 4'd8;
      end
    end else if (tx_ready) begin
      tx_q      <= {tx_q[55:0], 8'h00};
      tx_left_q <= tx_left_q - 1'b1;
    end
  end

  assign tx_busy  = (tx_left_q != '0);
  assign tx_valid = tx_busy;
  assign tx_data  = tx_q[63:56];

endmodule
