// tb_mcu_interface: checks the microcontroller register interface.
//
// The testbench drives the 11-bit bus like the processor and plays the control
// interface. It checks that argument and data registers assemble the command,
// that writing the opcode raises cmd_valid until cmd_ack, that results and status
// are read back byte by byte, that a second opcode write while busy is ignored,
// and the interrupt and sleep behaviour: a sleep write drops pas_clk_en, a match
// event raises IRQ and restores it, and an IRQ clear write drops IRQ. A waiting
// reader message (msg_pend) also drives IRQ, shows in registers 6 and 7, and is
// not cleared by the IRQ clear write.
module tb_mcu_interface;
  import sc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0]  addr;
  logic [7:0]  wdata, rdata, cmd_op, cmd_arg;
  logic        wr, rd, irq, pas_clk_en, match_evt, msg_pend, cmd_valid, cmd_ack, rsp_valid;
  logic [31:0] cmd_data, rsp_data;
  status_t     rsp_status;
  int checks = 0, failures = 0;

  mcu_interface u_dut (.clk, .rst_n, .addr, .wdata, .wr, .rd, .rdata, .irq, .pas_clk_en, .match_evt, .msg_pend,
    .cmd_valid, .cmd_op, .cmd_arg, .cmd_data, .cmd_ack, .rsp_valid, .rsp_data, .rsp_status);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_wr(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  task automatic bus_rd(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk); addr = a; rd = 1; #1; d = rdata;
    @(negedge clk); rd = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    logic [31:0] r;
    addr = 0; wdata = 0; wr = 0; rd = 0; match_evt = 0; msg_pend = 0; cmd_ack = 0; rsp_valid = 0; rsp_data = 0; rsp_status = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(pas_clk_en && !irq && !cmd_valid, "reset state");
    bus_wr(1, 8'h85);
    bus_wr(2, 8'h44); bus_wr(3, 8'h33); bus_wr(4, 8'h22); bus_wr(5, 8'h11);
    bus_wr(0, OP_CAM_WRITE);
    check(cmd_valid && cmd_op == OP_CAM_WRITE && cmd_arg == 8'h85 && cmd_data == 32'h1122_3344, "command assembled");
    bus_rd(6, b);
    check(b[7], "busy while the command runs");
    bus_wr(0, OP_NOP);
    check(cmd_op == OP_CAM_WRITE, "opcode write ignored while busy");
    @(negedge clk); cmd_ack = 1;
    @(negedge clk); cmd_ack = 0;
    check(!cmd_valid, "cmd_valid dropped on ack");
    @(negedge clk); rsp_valid = 1; rsp_data = 32'hA1B2_C3D4; rsp_status = 8'h05;
    @(negedge clk); rsp_valid = 0;
    r = 0;
    for (int i = 0; i < 4; i++) begin bus_rd(3'(2 + i), b); r[8*i +: 8] = b; end
    check(r == 32'hA1B2_C3D4, $sformatf("result read %h", r));
    bus_rd(6, b);
    check(b == 8'h05, $sformatf("status %h", b));
    @(negedge clk); rd = 0; #1;
    check(rdata == 0, "rdata zero without rd");
    // sleep and wake
    bus_wr(7, 8'h01);
    check(!pas_clk_en, "sleep gates the clock");
    repeat (10) @(negedge clk);
    check(!pas_clk_en && !irq, "stays asleep");
    @(negedge clk); match_evt = 1;
    @(negedge clk); match_evt = 0;
    check(pas_clk_en && irq, "match wakes and interrupts");
    bus_rd(7, b);
    check(b == 8'h02, "control register shows IRQ");
    bus_wr(7, 8'h02);
    check(!irq, "IRQ cleared");
    // reader message
    @(negedge clk); msg_pend = 1; #1;
    check(irq, "message raises IRQ");
    bus_rd(6, b);
    check(b[5] && !b[6], "status register shows the message");
    bus_wr(7, 8'h02);
    check(irq, "IRQ clear leaves a waiting message");
    bus_rd(7, b);
    check(b == 8'h04, "control register shows the message");
    @(negedge clk); msg_pend = 0; #1;
    check(!irq, "IRQ falls with the message");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
