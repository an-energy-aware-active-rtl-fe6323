// tb_gray_counter: checks the segmented Gray counter with parity prediction.
//
// A binary reference count is kept in the testbench. After every step the binary
// output must equal it, each 8-bit segment of the state must be the Gray code of
// the matching reference segment (g = b ^ (b >> 1)), no parity error may be
// reported, and a step may change at most one bit per segment. Loads just below
// segment wrap points exercise carries between segments. Single flipped bits
// must raise parity_err.
module tb_gray_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        en, load, perr;
  logic [31:0] load_val, flip, gray, value;
  logic [31:0] ref_cnt, prev_gray;
  int checks = 0, failures = 0;

  gray_counter u_dut (.clk, .rst_n, .en, .load, .load_val, .flip, .gray, .value, .parity_err(perr));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] seg_gray(input logic [31:0] b);
    logic [31:0] g;
    for (int s = 0; s < 4; s++) g[8*s +: 8] = b[8*s +: 8] ^ (b[8*s +: 8] >> 1);
    return g;
  endfunction

  task automatic step(input int n);
    for (int i = 0; i < n; i++) begin
      prev_gray = gray;
      @(negedge clk); en = 1;
      @(negedge clk); en = 0;
      ref_cnt++;
      check(value == ref_cnt, $sformatf("value %h exp %h", value, ref_cnt));
      check(gray == seg_gray(ref_cnt), $sformatf("gray %h exp %h", gray, seg_gray(ref_cnt)));
      check(!perr, "parity error while counting");
      for (int s = 0; s < 4; s++)
        check($countones(gray[8*s +: 8] ^ prev_gray[8*s +: 8]) <= 1, "more than one bit changed in a segment");
    end
  endtask

  task automatic do_load(input logic [31:0] v);
    @(negedge clk); load = 1; load_val = v;
    @(negedge clk); load = 0;
    ref_cnt = v;
    check(value == v && !perr, $sformatf("load %h got %h perr %b", v, value, perr));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; load = 0; load_val = 0; flip = 0; ref_cnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(value == 0 && !perr, "reset state");
    step(300);
    do_load(32'h0000_FFFD); step(5);
    do_load(32'h00FF_FFFE); step(4);
    do_load(32'hFFFF_FFFE); step(4);   // wraps to zero
    do_load($urandom); step(50);
    // single-bit upsets in every segment
    for (int b = 0; b < 32; b += 3) begin
      @(negedge clk); flip = 32'(1) << b;
      @(negedge clk); flip = 0;
      check(perr, $sformatf("upset on bit %0d not detected", b));
      do_load(32'h1234_5678);
    end
    // an upset during a counting step is also detected
    @(negedge clk); en = 1; flip = 32'h0001_0000;
    @(negedge clk); en = 0; flip = 0;
    check(perr, "upset during a step not detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
