// tb_ft_counter: checks the area-redundant fault-tolerant counter.
//
// The count must follow a reference through counting and writes. An upset in the
// main counter must raise `error` while the output still carries the right count
// (taken from the redundant counter), and the error must clear after the next
// step once the main counter has been reloaded. An upset in the redundant
// counter alone must not disturb the output.
module tb_ft_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        en, wr, error;
  logic [31:0] wdata, flip_main, flip_red, count, ref_cnt;
  int checks = 0, failures = 0;
  int corrected = 0;

  ft_counter u_dut (.clk, .rst_n, .en, .wr, .wdata, .flip_main, .flip_red, .count, .error);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step();
    @(negedge clk); en = 1;
    @(negedge clk); en = 0;
    ref_cnt++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; wr = 0; wdata = 0; flip_main = 0; flip_red = 0; ref_cnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      step();
      check(count == ref_cnt && !error, $sformatf("count %h exp %h", count, ref_cnt));
    end
    // write takes effect only together with en
    @(negedge clk); wr = 1; wdata = 32'h00FF_FFF0;
    @(negedge clk); check(count == ref_cnt, "write without en must wait");
    en = 1;
    @(negedge clk); en = 0; wr = 0; ref_cnt = 32'h00FF_FFF0;
    check(count == ref_cnt, $sformatf("write: %h", count));
    for (int k = 0; k < 40; k++) begin
      int b;
      b = $urandom_range(31);
      @(negedge clk); flip_main = 32'(1) << b;
      @(negedge clk); flip_main = 0;
      check(error, $sformatf("upset on main bit %0d not detected", b));
      check(count == ref_cnt, $sformatf("output not corrected after upset on bit %0d: %h exp %h", b, count, ref_cnt));
      step();
      check(!error, "error not cleared after reload");
      check(count == ref_cnt, $sformatf("count after reload %h exp %h", count, ref_cnt));
      if (!error && count == ref_cnt) corrected++;
      // upset in the redundant counter only
      @(negedge clk); flip_red = 32'(1) << $urandom_range(31);
      @(negedge clk); flip_red = 0;
      check(count == ref_cnt && !error, "redundant upset disturbed the output");
      // repair the redundant copy with a write so the next round starts clean
      @(negedge clk); wr = 1; en = 1; wdata = ref_cnt;
      @(negedge clk); wr = 0; en = 0;
      step();
      check(count == ref_cnt && !error, "count after rewrite");
    end
    check(corrected == 40, "every upset corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
