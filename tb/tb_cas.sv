// tb_cas: checks the continually-active subsystem (counter feeding the CAM).
//
// Timing keys are stored a few steps ahead of the count; stepping the subsystem
// must raise exactly the match lines of the keys equal to the present count, at
// exactly those steps. A counter upset must not cause a missed or false match.
module tb_cas;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        en, cnt_wr, cam_wr, cam_wvalid, cnt_error, seu_cam_en;
  logic [31:0] cnt_wdata, cam_wdata, count, cam_rdata, match, cam_perr, seu_main, seu_red;
  logic [4:0]  cam_addr, seu_row;
  logic [5:0]  seu_bit;
  logic [31:0] keys [32];
  int checks = 0, failures = 0;

  cas u_dut (.clk, .rst_n, .en, .cnt_wr, .cnt_wdata, .cam_wr, .cam_addr, .cam_wdata, .cam_wvalid,
             .count, .cnt_error, .cam_rdata, .match, .cam_parity_err(cam_perr),
             .seu_cnt_main(seu_main), .seu_cnt_red(seu_red), .seu_cam_en, .seu_cam_row(seu_row),
             .seu_cam_bit(seu_bit));

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
    logic [31:0] exp;
    en = 0; cnt_wr = 0; cam_wr = 0; cam_wvalid = 0; seu_cam_en = 0; cnt_wdata = 0; cam_wdata = 0;
    cam_addr = 0; seu_main = 0; seu_red = 0; seu_row = 0; seu_bit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // start the clock near a segment carry
    @(negedge clk); cnt_wr = 1; cnt_wdata = 32'h0000_FFF0; en = 1;
    @(negedge clk); cnt_wr = 0; en = 0;
    check(count == 32'h0000_FFF0, "counter write");
    for (int r = 0; r < 32; r++) begin
      keys[r] = 32'h0000_FFF0 + 32'($urandom_range(40));
      @(negedge clk); cam_wr = 1; cam_addr = 5'(r); cam_wdata = keys[r]; cam_wvalid = 1; en = 1;
      @(negedge clk); cam_wr = 0; en = 0;
    end
    // the count advanced by 32 during the writes
    check(count == 32'h0000_FFF0 + 32, "count advanced with every step");
    @(negedge clk); cnt_wr = 1; cnt_wdata = 32'h0000_FFF0; en = 1;
    @(negedge clk); cnt_wr = 0; en = 0;
    for (int s = 0; s <= 42; s++) begin
      exp = 0;
      for (int r = 0; r < 32; r++) exp[r] = (keys[r] == count);
      check(match == exp, $sformatf("count %h match %h exp %h", count, match, exp));
      if (s == 20) begin
        @(negedge clk); seu_main = 32'h0000_0100;
        @(negedge clk); seu_main = 0;
        check(cnt_error, "counter upset flagged");
        exp = 0;
        for (int r = 0; r < 32; r++) exp[r] = (keys[r] == count);
        check(match == exp, "match unaffected by a counter upset");
      end
      @(negedge clk); en = 1;
      @(negedge clk); en = 0;
    end
    check(count == 32'h0000_FFF0 + 43, "final count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
