// tb_reader_controller: checks the sequencing of the card reader interface.
//
// A received block must be passed to decryption with one dec_start as soon as
// decryption is idle (one clock later when idle, after busy falls otherwise); an
// encrypted block must be passed to the shifter with one tx_load as soon as the
// shifter is idle; a block arriving while one waits must set overrun.
module tb_reader_controller;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        rx_ready, tx_busy, tx_load, dec_busy, dec_start, enc_done, overrun;
  logic [63:0] rx_block, tx_block, dec_cipher, enc_cipher;
  int checks = 0, failures = 0;

  reader_controller u_dut (.clk, .rst_n, .rx_ready, .rx_block, .tx_busy, .tx_load, .tx_block,
                           .dec_busy, .dec_start, .dec_cipher, .enc_done, .enc_cipher, .overrun);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx_ready = 0; rx_block = 0; tx_busy = 0; dec_busy = 0; enc_done = 0; enc_cipher = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // idle decryption: start one clock after rx_ready
    @(negedge clk); rx_ready = 1; rx_block = 64'h1111_2222_3333_4444;
    @(negedge clk); rx_ready = 0;
    check(dec_start && dec_cipher == 64'h1111_2222_3333_4444, "dec_start one clock after rx_ready");
    dec_busy = 1;
    @(negedge clk);
    check(!dec_start, "single dec_start");
    // busy decryption: block waits
    @(negedge clk); rx_ready = 1; rx_block = 64'h5555_6666_7777_8888;
    @(negedge clk); rx_ready = 0;
    repeat (5) begin check(!dec_start, "no start while busy"); @(negedge clk); end
    dec_busy = 0;
    @(negedge clk);
    check(dec_start && dec_cipher == 64'h5555_6666_7777_8888, "waiting block started after busy fell");
    check(!overrun, "no overrun yet");
    dec_busy = 1;
    // overrun: two blocks while busy
    @(negedge clk); rx_ready = 1; @(negedge clk); rx_ready = 0;
    @(negedge clk); rx_ready = 1; @(negedge clk); rx_ready = 0;
    check(overrun, "overrun flagged");
    dec_busy = 0;
    // transmit path
    tx_busy = 1;
    @(negedge clk); enc_done = 1; enc_cipher = 64'hAAAA_BBBB_CCCC_DDDD;
    @(negedge clk); enc_done = 0;
    repeat (3) begin check(!tx_load, "no tx_load while shifter busy"); @(negedge clk); end
    tx_busy = 0;
    @(negedge clk);
    check(tx_load && tx_block == 64'hAAAA_BBBB_CCCC_DDDD, "tx_load after shifter idle");
    tx_busy = 1;
    @(negedge clk);
    check(!tx_load, "single tx_load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
