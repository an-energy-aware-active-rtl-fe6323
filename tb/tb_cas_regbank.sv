// tb_cas_regbank: checks the register bank between the CAS and the PAS.
//
// The testbench plays the CAS: a count that steps on tick, a 32-row word array
// written when the bank presents a write at tick, and match lines for rows equal
// to the count. Tick and peak come every 16 clocks, half a period apart. It
// checks that reads finish at the first peak, writes at the first peak after the
// first tick, that writes reach the CAS only at a tick, that captured values are
// those present at the peak, and that a match raises one match_evt per period
// and stays in the sticky register until cleared.
module tb_cas_regbank;
  import sc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        tick, peak, req, row_en, done, match_clr, match_evt, cnt_err_q, cam_perr_q;
  cas_op_e     op;
  logic [4:0]  addr, cas_addr;
  logic [31:0] data, rd_data_q, count_q, match_q;
  logic        cas_cnt_wr, cas_cam_wr, cas_wvalid;
  logic [31:0] cas_wdata, cas_count, cas_rdata, cas_match;
  logic [31:0] mem [32];
  logic [31:0] mem_en;
  int cyc = 0, checks = 0, failures = 0, evts = 0;

  cas_regbank u_dut (.clk, .rst_n, .tick, .peak, .req, .req_op(op), .req_addr(addr), .req_row_en(row_en),
    .req_data(data), .done, .rd_data_q, .count_q, .match_q, .match_clr, .match_evt, .cnt_err_q, .cam_perr_q,
    .cas_cnt_wr, .cas_cam_wr, .cas_addr, .cas_wdata, .cas_wvalid, .cas_count, .cas_cnt_error(1'b0),
    .cas_rdata, .cas_match, .cas_parity_err(32'h0));

  assign tick = (cyc % 16) == 15;
  assign peak = (cyc % 16) == 7;
  assign cas_rdata = mem[cas_addr];
  always_comb for (int i = 0; i < 32; i++) cas_match[i] = mem_en[i] && mem[i] == cas_count;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (match_evt) evts <= evts + 1;
    if (tick) begin
      cas_count <= cas_count + 1;
      if (cas_cnt_wr) cas_count <= cas_wdata;
      if (cas_cam_wr) begin mem[cas_addr] <= cas_wdata; mem_en[cas_addr] <= cas_wvalid; end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xact(input cas_op_e o, input logic [4:0] a, input logic [31:0] d, input logic v,
                      output int t_done, output int saw_tick, output int saw_peak_at);
    int t0;
    @(negedge clk); req = 1; op = o; addr = a; data = d; row_en = v; t0 = cyc;
    saw_tick = -1; saw_peak_at = -1;
    while (!done) begin
      @(posedge clk); #1;
      if (cyc > 0 && ((cyc - 1) % 16) == 15 && saw_tick < 0) saw_tick = cyc - 1;
    end
    t_done = cyc - 1;
    @(negedge clk); req = 0;
    @(negedge clk);
    check(!done, "done falls after req");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int td, tt, tp;
    req = 0; op = CAS_READ; addr = 0; data = 0; row_en = 0; match_clr = 0;
    cas_count = 0; mem_en = 0;
    for (int i = 0; i < 32; i++) mem[i] = 32'(i) * 32'h0101_0101;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // read: completes at the first peak after the request
    xact(CAS_READ, 5, 0, 0, td, tt, tp);
    check((td % 16) == 7, $sformatf("read done at phase %0d", td % 16));
    check(rd_data_q == 32'h0505_0505, "read data");
    // CAM write: completes at the peak following the first tick
    xact(CAS_CAM_WR, 9, 32'h0000_0040, 1, td, tt, tp);
    check((td % 16) == 7 && tt >= 0 && td > tt, $sformatf("write done at %0d after tick %0d", td, tt));
    check(mem[9] == 32'h40 && mem_en[9], "write reached the CAS");
    check(rd_data_q == 32'h40, "write read back");
    // counter write
    xact(CAS_CNT_WR, 0, 32'h0000_003E, 0, td, tt, tp);
    check(count_q == 32'h3E, $sformatf("count captured %h", count_q));
    // wait until the count passes 0x40 and check match capture
    while (cas_count != 32'h42) @(negedge clk);
    check(match_q[9] && $countones(match_q) == 1, $sformatf("sticky match %h", match_q));
    check(evts == 1, $sformatf("one match event per matching count: %0d", evts));
    @(negedge clk); match_clr = 1;
    @(negedge clk); match_clr = 0;
    check(match_q == 0, "match cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
