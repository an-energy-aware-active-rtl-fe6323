// tb_tea: self-checking test of tea_encrypt and tea_decrypt.
//
// Checks the all-zero key and block against the published TEA result
// (41EA3A0A 94BAA940), random blocks and keys against the reference model in
// tea_ref_pkg, that decryption inverts encryption, that start is ignored while
// busy, and that done arrives 33 clocks after start.
module tb_tea;
  import tea_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         e_start, d_start, e_busy, d_busy, e_done, d_done;
  logic [63:0]  e_in, d_in, e_out, d_out;
  logic [127:0] key;
  int checks = 0, failures = 0;

  tea_encrypt u_enc (.clk, .rst_n, .start(e_start), .plain(e_in), .key, .busy(e_busy), .done(e_done), .cipher(e_out));
  tea_decrypt u_dec (.clk, .rst_n, .start(d_start), .cipher(d_in), .key, .busy(d_busy), .done(d_done), .plain(d_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_enc(input logic [63:0] p, output logic [63:0] c, output int lat);
    lat = 0;
    @(negedge clk); e_in = p; e_start = 1;
    @(negedge clk); e_start = 0;
    e_in = ~p;  // must not matter after start
    lat = 1;
    while (!e_done) begin
      if (lat == 5) begin e_start = 1; @(negedge clk); e_start = 0; lat++; continue; end
      @(negedge clk); lat++;
    end
    c = e_out;
  endtask

  task automatic run_dec(input logic [63:0] c, output logic [63:0] p, output int lat);
    @(negedge clk); d_in = c; d_start = 1;
    @(negedge clk); d_start = 0; d_in = ~c;
    lat = 1;
    while (!d_done) begin @(negedge clk); lat++; end
    p = d_out;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] c, p, blk;
    int lat;
    e_start = 0; d_start = 0; e_in = 0; d_in = 0; key = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_enc(64'h0, c, lat);
    check(c == 64'h41EA3A0A_94BAA940, $sformatf("zero vector enc %h", c));
    check(lat == 33, $sformatf("enc latency %0d", lat));
    run_dec(c, p, lat);
    check(p == 64'h0, $sformatf("zero vector dec %h", p));
    check(lat == 33, $sformatf("dec latency %0d", lat));
    for (int i = 0; i < 20; i++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      blk = {$urandom, $urandom};
      run_enc(blk, c, lat);
      check(c == tea_enc(blk, key), $sformatf("enc %h -> %h exp %h", blk, c, tea_enc(blk, key)));
      run_dec(c, p, lat);
      check(p == blk, $sformatf("dec round trip %h exp %h", p, blk));
      run_dec(blk, p, lat);
      check(p == tea_dec(blk, key), "dec vs model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
