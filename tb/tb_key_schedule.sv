// tb_key_schedule: timing-key schedules of the key-update applications, on the
// full core at its default size.
//
// Several applications share the CAM: a daily TEA key update (row 0), an hourly
// signing-key rotation (row 2), a second job due at the same instant as the
// daily update (row 3), and a weekly job (row 4). Periods are real: at 13.95 kHz
// an hour is 50,220,000 CAS steps and a day 1,205,280,000. The count starts at
// 0xF000_0000, so the daily trigger lies beyond the 32-bit wrap. Since real
// periods cannot be simulated step by step, the processor moves the count to
// three steps before each trigger (a counter write) and sleeps; the test then
// checks that the interrupt arrives exactly three steps later, that the match
// lines name exactly the rows due, and that nothing fires early.
//
// A week (8,436,960,000 steps) is more than 2^32 steps, so a weekly timing key
// stored modulo 2^32 comes due after 4,141,992,704 steps (about 3.4 days). The
// test checks that the hardware does exactly that, which is why a weekly period
// needs two chained triggers in software.
module tb_key_schedule;
  import sc_pkg::*;

  localparam int STEP = 256;
  localparam logic [31:0] BASE = 32'hF000_0000;
  localparam longint HOUR = 64'd3600 * 13950;
  localparam longint DAY  = 64'd86400 * 13950;
  localparam longint WEEK = 64'd7 * 86400 * 13950;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        rx_valid, tx_valid, tx_ready, mcu_wr, mcu_rd, mcu_irq, pas_clk, overrun;
  logic [7:0]  rx_data, tx_data, mcu_wdata, mcu_rdata;
  logic [2:0]  mcu_addr;

  smart_card_top u_dut (.clk, .rst_n, .rx_valid, .rx_data, .tx_valid, .tx_data, .tx_ready,
    .mcu_addr, .mcu_wdata, .mcu_wr, .mcu_rd, .mcu_rdata, .mcu_irq, .pas_clk,
    .seu_cnt_main(32'h0), .seu_cnt_red(32'h0), .seu_cam_en(1'b0), .seu_cam_row(5'h0),
    .seu_cam_bit(6'h0), .overrun);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_wr(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk); mcu_addr = a; mcu_wdata = d; mcu_wr = 1;
    @(negedge clk); mcu_wr = 0;
  endtask

  task automatic bus_rd(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk); mcu_addr = a; mcu_rd = 1; #1; d = mcu_rdata;
    @(negedge clk); mcu_rd = 0;
  endtask

  task automatic mcu_cmd(input op_e op, input logic [7:0] arg, input logic [31:0] d, output logic [31:0] r);
    logic [7:0] b;
    bus_wr(1, arg);
    for (int i = 0; i < 4; i++) bus_wr(3'(2 + i), d[8*i +: 8]);
    bus_wr(0, op);
    do bus_rd(6, b); while (b[7]);
    for (int i = 0; i < 4; i++) begin bus_rd(3'(2 + i), b); r[8*i +: 8] = b; end
  endtask

  // Move the count to three steps before `trig`, sleep, and check the wake-up.
  task automatic expect_event(input logic [31:0] trig, input logic [31:0] rows, input string name);
    logic [31:0] r, now;
    longint t_go, t_irq;
    mcu_cmd(OP_CNT_WRITE, 0, trig - 3, r);
    mcu_cmd(OP_MATCH_READ, 0, 0, r);
    check(r == 0, $sformatf("%s: stale match %h", name, r));
    bus_wr(7, 8'h02);
    bus_wr(7, 8'h01);
    t_go = cyc;
    while (!mcu_irq) @(negedge clk);
    t_irq = cyc;
    // the count was trig-3 at the write's peak; matching needs 3 more steps
    check(t_irq - t_go >= 2 * STEP && t_irq - t_go <= 3 * STEP + 16,
          $sformatf("%s: interrupt %0d clocks after sleep", name, t_irq - t_go));
    mcu_cmd(OP_MATCH_READ, 0, 0, r);
    check(r == rows, $sformatf("%s: match lines %h exp %h", name, r, rows));
    mcu_cmd(OP_CNT_READ, 0, 0, now);
    check(now - trig <= 1, $sformatf("%s: count %h at interrupt, trigger %h", name, now, trig));
    bus_wr(7, 8'h02);
    $display("%s: trigger %h matched rows %h", name, trig, r);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r, t_hour, t_day, t_week;
    rx_valid = 0; rx_data = 0; tx_ready = 0; mcu_wr = 0; mcu_rd = 0; mcu_addr = 0; mcu_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    t_hour = BASE + 32'(HOUR);
    t_day  = BASE + 32'(DAY);
    t_week = BASE + 32'(WEEK);
    check(t_day < BASE, "daily trigger lies beyond the 32-bit wrap");
    check(t_week - BASE == 32'd4141992704, "weekly key aliases to 4,141,992,704 steps");
    mcu_cmd(OP_CNT_WRITE, 0, BASE, r);
    mcu_cmd(OP_CAM_WRITE, 8'h80 | 8'd0, t_day, r);
    mcu_cmd(OP_CAM_WRITE, 8'h00 | 8'd1, 32'd1000, r);      // energy monitor, not matched
    mcu_cmd(OP_CAM_WRITE, 8'h80 | 8'd2, t_hour, r);
    mcu_cmd(OP_CAM_WRITE, 8'h80 | 8'd3, t_day, r);
    mcu_cmd(OP_CAM_WRITE, 8'h80 | 8'd4, t_week, r);
    expect_event(t_hour, 32'h0000_0004, "hourly");
    expect_event(t_day,  32'h0000_0009, "daily (two rows due together)");
    // the next hourly rotation, re-armed by the routine
    mcu_cmd(OP_CAM_WRITE, 8'h80 | 8'd2, t_day + 32'(HOUR), r);
    expect_event(t_day + 32'(HOUR), 32'h0000_0004, "hourly after the daily");
    expect_event(t_week, 32'h0000_0010, "weekly key (comes due early, modulo 2^32)");
    mcu_cmd(OP_CAM_READ, 8'd1, 0, r);
    check(r == 32'd1000, "energy monitor row untouched and never matched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
