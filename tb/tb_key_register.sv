// tb_key_register: checks word-wise update of the 128-bit key register.
module tb_key_register;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic         we;
  logic [1:0]   idx;
  logic [31:0]  wdata;
  logic [127:0] key, ref_key;
  int checks = 0, failures = 0;

  key_register u_dut (.clk, .rst_n, .we, .idx, .wdata, .key);

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
    we = 0; idx = 0; wdata = 0; ref_key = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(key == 0, "reset key");
    for (int i = 0; i < 50; i++) begin
      @(negedge clk); we = ($urandom_range(3) != 0); idx = 2'($urandom_range(3)); wdata = $urandom;
      if (we) ref_key[32*idx +: 32] = wdata;
      @(negedge clk); we = 0;
      check(key == ref_key, $sformatf("key %h exp %h", key, ref_key));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
