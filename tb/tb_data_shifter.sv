// tb_data_shifter: checks byte packing and unpacking in the data shifter.
//
// Eight received bytes, sent with random gaps, must come out as one 64-bit block
// (first byte most significant) with a single rx_ready one clock after the last
// byte. A loaded block must go out as eight bytes, most significant first, under
// a randomly stalling tx_ready, with tx_busy high until the last byte is taken.
module tb_data_shifter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        rx_valid, rx_ready, tx_load, tx_busy, tx_valid, tx_ready;
  logic [7:0]  rx_data, tx_data;
  logic [63:0] rx_block, tx_block;
  int checks = 0, failures = 0;

  data_shifter u_dut (.clk, .rst_n, .rx_valid, .rx_data, .rx_ready, .rx_block,
                      .tx_load, .tx_block, .tx_busy, .tx_valid, .tx_data, .tx_ready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] blk, got;
    int nready;
    rx_valid = 0; rx_data = 0; tx_load = 0; tx_block = 0; tx_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 10; n++) begin
      blk = {$urandom, $urandom};
      nready = 0;
      for (int b = 7; b >= 0; b--) begin
        @(negedge clk); rx_valid = 1; rx_data = blk[8*b +: 8];
        @(negedge clk); rx_valid = 0;
        if (b != 0) begin
          check(!rx_ready, "early rx_ready");
          repeat ($urandom_range(3)) @(negedge clk);
        end
      end
      check(rx_ready, "rx_ready one clock after the eighth byte");
      check(rx_block == blk, $sformatf("rx block %h exp %h", rx_block, blk));
      @(negedge clk);
      check(!rx_ready, "rx_ready is a single pulse");
      // transmit
      blk = {$urandom, $urandom};
      @(negedge clk); tx_load = 1; tx_block = blk;
      @(negedge clk); tx_load = 0; tx_block = 0;
      got = 0;
      for (int b = 0; b < 8; b++) begin
        check(tx_busy && tx_valid, "tx byte available");
        while ($urandom_range(2) == 0) @(negedge clk);
        got = {got[55:0], tx_data};
        tx_ready = 1;
        @(negedge clk); tx_ready = 0;
      end
      check(!tx_busy && !tx_valid, "tx idle after eight bytes");
      check(got == blk, $sformatf("tx bytes %h exp %h", got, blk));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
