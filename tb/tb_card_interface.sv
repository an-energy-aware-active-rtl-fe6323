// tb_card_interface: checks the encrypted card reader interface end to end.
//
// The testbench plays the reader: it encrypts command blocks with the reference
// TEA model, sends them byte by byte, and expects the decrypted block on
// dec_plain with dec_done. It then asks for a reply (enc_start), collects the
// eight transmitted bytes and decrypts them with the model. This is repeated
// after a key update through the key port. Sending blocks faster than decryption
// can take them must set overrun. Latency from the last received byte to
// dec_done is checked against 35 clocks.
module tb_card_interface;
  import tea_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        rx_valid, tx_valid, tx_ready, dec_done, enc_start, enc_busy, key_we, overrun;
  logic [7:0]  rx_data, tx_data;
  logic [63:0] dec_plain, enc_plain;
  logic [1:0]  key_idx;
  logic [31:0] key_wdata;
  logic [127:0] key;
  int checks = 0, failures = 0;

  card_interface u_dut (.clk, .rst_n, .rx_valid, .rx_data, .tx_valid, .tx_data, .tx_ready,
    .dec_done, .dec_plain, .enc_start, .enc_plain, .enc_busy, .key_we, .key_idx, .key_wdata, .overrun);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_block(input logic [63:0] c);
    for (int b = 7; b >= 0; b--) begin
      @(negedge clk); rx_valid = 1; rx_data = c[8*b +: 8];
    end
    @(negedge clk); rx_valid = 0;
  endtask

  task automatic exchange(input logic [63:0] cmd, input logic [63:0] reply);
    int lat;
    logic [63:0] got;
    send_block(tea_enc(cmd, key));
    lat = 1;
    while (!dec_done) begin @(negedge clk); lat++; end
    check(lat == 35, $sformatf("decrypt latency %0d", lat));
    check(dec_plain == cmd, $sformatf("command %h exp %h", dec_plain, cmd));
    @(negedge clk); enc_start = 1; enc_plain = reply;
    @(negedge clk); enc_start = 0;
    got = 0;
    for (int b = 0; b < 8; b++) begin
      while (!tx_valid) @(negedge clk);
      got = {got[55:0], tx_data};
      tx_ready = 1; @(negedge clk); tx_ready = 0;
    end
    check(tea_dec(got, key) == reply, $sformatf("reply %h exp %h", tea_dec(got, key), reply));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx_valid = 0; rx_data = 0; tx_ready = 0; enc_start = 0; enc_plain = 0; key_we = 0; key_idx = 0; key_wdata = 0;
    key = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exchange(64'h0102_0304_0506_0708, 64'hA0A1_A2A3_A4A5_A6A7);
    exchange({$urandom, $urandom}, {$urandom, $urandom});
    // key update, word by word
    for (int i = 0; i < 4; i++) begin
      key[32*i +: 32] = $urandom;
      @(negedge clk); key_we = 1; key_idx = 2'(i); key_wdata = key[32*i +: 32];
      @(negedge clk); key_we = 0;
    end
    exchange({$urandom, $urandom}, {$urandom, $urandom});
    exchange({$urandom, $urandom}, {$urandom, $urandom});
    check(!overrun, "no overrun at normal pace");
    // three blocks back to back overrun the single waiting slot
    send_block(64'h1); send_block(64'h2); send_block(64'h3);
    repeat (2) @(negedge clk);
    check(overrun, "overrun flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
