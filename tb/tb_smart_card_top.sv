// tb_smart_card_top: end-to-end test of the smart-card core at its default size.
//
// The testbench plays both the processor (over the 11-bit bus) and the reader
// (over the UART byte interface, with the reference TEA model). It runs the
// periodic key-update flow: the processor stores a timing key and an energy
// monitor word in the CAM and sleeps; when the count reaches the timing key the
// match interrupt wakes it; the interrupt routine reads the match lines, derives
// a new TEA key from the old one and loads it, charges the energy monitor,
// chooses the next update period from the remaining energy (short period while
// energy is plentiful, long period once it falls below a limit) and sleeps again.
// The reader talks to the card before and after key updates, under the key in
// force. Upsets are injected into the counter and into a CAM row.
//
// Mechanisms counted (each must happen at least once): CAS steps, match
// interrupts, sleep with the clock stopped, wake-up by a match, reader commands,
// key updates, the switch to the long update period, a corrected counter upset,
// a false match blocked by row parity, and a reader overrun.
module tb_smart_card_top;
  import sc_pkg::*;
  import tea_ref_pkg::*;

  localparam int STEP = 256;         // clocks per CAS step at the default divider
  localparam int SHORT_PERIOD = 10;  // "daily" in CAS steps
  localparam int LONG_PERIOD  = 20;  // "weekly" in CAS steps
  localparam logic [31:0] E_START = 32'd1000, E_COST = 32'd300, E_LIMIT = 32'd500;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        rx_valid, tx_valid, tx_ready, mcu_wr, mcu_rd, mcu_irq, pas_clk, overrun;
  logic [7:0]  rx_data, tx_data, mcu_wdata, mcu_rdata;
  logic [2:0]  mcu_addr;
  logic [31:0] seu_main, seu_red;
  logic        seu_cam_en;
  logic [4:0]  seu_row;
  logic [5:0]  seu_bit;

  smart_card_top u_dut (.clk, .rst_n, .rx_valid, .rx_data, .tx_valid, .tx_data, .tx_ready,
    .mcu_addr, .mcu_wdata, .mcu_wr, .mcu_rd, .mcu_rdata, .mcu_irq, .pas_clk,
    .seu_cnt_main(seu_main), .seu_cnt_red(seu_red), .seu_cam_en, .seu_cam_row(seu_row),
    .seu_cam_bit(seu_bit), .overrun);

  int checks = 0, failures = 0;
  int n_steps = 0, n_irq = 0, n_sleep = 0, n_wake = 0, n_reader = 0, n_keyupd = 0;
  int n_switch = 0, n_seu_fixed = 0, n_false_blocked = 0, n_overrun = 0;
  logic [127:0] key;        // key the reader and the card share
  logic [31:0]  energy;
  int           period;
  logic [31:0]  isr_now, next_trig;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // count CAS steps and interrupts
  logic irq_d = 0;
  always @(posedge clk) begin
    if (u_dut.u_div.tick) n_steps++;
    irq_d <= mcu_irq;
    if (mcu_irq && !irq_d) n_irq++;
  end

  // ---------------- processor side ----------------
  task automatic bus_wr(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk); mcu_addr = a; mcu_wdata = d; mcu_wr = 1;
    @(negedge clk); mcu_wr = 0;
  endtask

  task automatic bus_rd(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk); mcu_addr = a; mcu_rd = 1; #1; d = mcu_rdata;
    @(negedge clk); mcu_rd = 0;
  endtask

  task automatic mcu_cmd(input op_e op, input logic [7:0] arg, input logic [31:0] d,
                         output logic [31:0] r, output logic [7:0] st);
    logic [7:0] b;
    bus_wr(1, arg);
    for (int i = 0; i < 4; i++) bus_wr(3'(2 + i), d[8*i +: 8]);
    bus_wr(0, op);
    do bus_rd(6, b); while (b[7]);
    st = {5'b0, b[2:0]};
    for (int i = 0; i < 4; i++) begin bus_rd(3'(2 + i), b); r[8*i +: 8] = b; end
  endtask

  task automatic mcu_sleep();
    int edges;
    bus_wr(7, 8'h01);
    n_sleep++;
    edges = 0;
    repeat (3 * STEP) begin
      @(posedge clk); #1;
      if (pas_clk) edges++;
      if (mcu_irq) break;
    end
    if (!mcu_irq) check(edges == 0, $sformatf("PAS clock ran %0d times while asleep", edges));
  endtask

  // ---------------- reader side ----------------
  task automatic reader_cmd(input op_e op, input logic [7:0] arg, input logic [31:0] d, output logic [63:0] reply);
    logic [63:0] c, got;
    c = tea_enc({op, arg, 16'h0, d}, key);
    for (int b = 7; b >= 0; b--) begin
      @(negedge clk); rx_valid = 1; rx_data = c[8*b +: 8];
    end
    @(negedge clk); rx_valid = 0;
    got = 0;
    for (int b = 0; b < 8; b++) begin
      while (!tx_valid) @(negedge clk);
      got = {got[55:0], tx_data};
      tx_ready = 1; @(negedge clk); tx_ready = 0;
    end
    reply = tea_dec(got, key);
    check(reply[63:56] == op, $sformatf("reply opcode %h", reply[63:56]));
    n_reader++;
  endtask

  function automatic logic [127:0] next_key(input logic [127:0] k);
    return {k[95:0], k[127:96]} ^ 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210;
  endfunction

  // Interrupt routine: TEA key update (timing key in row 0, energy monitor in row 1).
  task automatic key_update_isr();
    logic [31:0] r, now;
    logic [7:0]  st;
    logic [127:0] nk;
    n_wake++;
    mcu_cmd(OP_MATCH_READ, 0, 0, r, st);
    check(r[0], $sformatf("timing key row matched: %h", r));
    mcu_cmd(OP_CNT_READ, 0, 0, now, st);
    isr_now = now;
    nk = next_key(key);
    for (int i = 0; i < 4; i++) mcu_cmd(OP_KEY_WRITE, 8'(i), nk[32*i +: 32], r, st);
    key = nk;
    n_keyupd++;
    mcu_cmd(OP_CAM_READ, 8'd1, 0, r, st);
    check(r == energy, $sformatf("energy monitor %0d exp %0d", r, energy));
    energy = r - E_COST;
    mcu_cmd(OP_CAM_WRITE, 8'd1, energy, r, st);          // row 1 stored, not matched
    if (energy < E_LIMIT && period != LONG_PERIOD) begin period = LONG_PERIOD; n_switch++; end
    next_trig = now + 32'(period);
    mcu_cmd(OP_CAM_WRITE, 8'h80 | 8'd0, next_trig, r, st);
    bus_wr(7, 8'h02);                                      // clear IRQ
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r, t0, trig;
    logic [7:0]  st;
    logic [63:0] rep;
    int start_cycle;
    rx_valid = 0; rx_data = 0; tx_ready = 0; mcu_wr = 0; mcu_rd = 0; mcu_addr = 0; mcu_wdata = 0;
    seu_main = 0; seu_red = 0; seu_cam_en = 0; seu_row = 0; seu_bit = 0;
    key = 0; energy = E_START; period = SHORT_PERIOD;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // The reader sets the time and reads it back (key is zero after reset).
    reader_cmd(OP_CNT_WRITE, 0, 32'h0000_00FA, rep);
    check(rep[31:0] == 32'h0000_00FA, $sformatf("reader counter write %h", rep[31:0]));
    reader_cmd(OP_CNT_READ, 0, 0, rep);
    t0 = rep[31:0];
    check(t0 >= 32'hFA && t0 <= 32'hFC, $sformatf("count after write %h", t0));
    // The processor programs the first trigger and the energy monitor.
    mcu_cmd(OP_CAM_WRITE, 8'd1, energy, r, st);
    mcu_cmd(OP_CNT_READ, 0, 0, t0, st);
    mcu_cmd(OP_CAM_WRITE, 8'h80 | 8'd0, t0 + SHORT_PERIOD, r, st);
    check(r == t0 + SHORT_PERIOD, "timing key written");

    // Periodic key updates while detached from the reader.
    for (int u = 0; u < 4; u++) begin
      mcu_cmd(OP_CAM_READ, 8'd0, 0, trig, st);
      mcu_sleep();
      while (!mcu_irq) @(negedge clk);
      check(pas_clk_en_now(), "clock restored by the match");
      key_update_isr();
      // the match was raised at the trigger count: the routine's first count read is at most one step later
      check(isr_now - trig <= 1, $sformatf("interrupt at count %h for trigger %h", isr_now, trig));
      // the reader can still talk to the card, under the new key
      reader_cmd(OP_CAM_READ, 8'd0, 0, rep);
      check(rep[31:0] == next_trig, $sformatf("reader reads the next trigger %h exp %h", rep[31:0], next_trig));
    end
    check(period == LONG_PERIOD, "switched to the long update period");

    // Counter upset: flipped bit in the main counter right after a step.
    @(posedge u_dut.u_div.tick); @(posedge clk); @(negedge clk);
    t0 = u_dut.u_cas.count;
    seu_main = 32'h0000_0004; @(negedge clk); seu_main = 0;
    mcu_cmd(OP_CNT_READ, 0, 0, r, st);
    check(r == t0, $sformatf("count corrected during the upset: %h exp %h", r, t0));
    check(st[1], "counter error reported");
    mcu_cmd(OP_CNT_READ, 0, 0, r, st);
    mcu_cmd(OP_CNT_READ, 0, 0, r, st);
    if (!st[1] && r >= t0 + 1 && r <= t0 + 4) n_seu_fixed++;
    check(!st[1], "counter error cleared after reload");

    // CAM upset: row 5 holds K (bit 0 clear); a flip would make it K+1 and match falsely.
    mcu_cmd(OP_CNT_READ, 0, 0, t0, st);
    trig = (t0 + 6) & ~32'h1;
    if (trig <= t0 + 2) trig += 2;
    mcu_cmd(OP_MATCH_READ, 0, 0, r, st);
    mcu_cmd(OP_CAM_WRITE, 8'h80 | 8'd5, trig, r, st);
    @(negedge clk); seu_cam_en = 1; seu_row = 5; seu_bit = 0;
    @(negedge clk); seu_cam_en = 0;
    while (u_dut.u_cas.count != trig + 2) @(negedge clk);
    mcu_cmd(OP_MATCH_READ, 0, 0, r, st);
    check(!r[5], "corrupted row did not match");
    check(st[2], "CAM parity error reported");
    if (!r[5] && st[2]) n_false_blocked++;
    mcu_cmd(OP_CAM_WRITE, 8'd5, 0, r, st);   // disable the row again
    mcu_cmd(OP_NOP, 0, 0, r, st);
    check(!st[2], "parity error gone after rewrite");
    bus_wr(7, 8'h02);

    // A reader that sends too fast overruns the card.
    for (int k = 0; k < 3; k++)
      for (int b = 0; b < 8; b++) begin @(negedge clk); rx_valid = 1; rx_data = 8'(k); end
    @(negedge clk); rx_valid = 0;
    repeat (4) @(negedge clk);
    if (overrun) n_overrun++;

    check(n_steps > 0, "CAS steps");
    check(n_irq >= 4, "match interrupts");
    check(n_sleep > 0 && n_wake > 0, "sleep and wake");
    check(n_reader > 0, "reader commands");
    check(n_keyupd > 0, "key updates");
    check(n_switch > 0, "update period switch");
    check(n_seu_fixed > 0, "counter upset corrected");
    check(n_false_blocked > 0, "false match blocked");
    check(n_overrun > 0, "reader overrun");
    $display("steps=%0d irq=%0d sleep=%0d wake=%0d reader=%0d keyupd=%0d switch=%0d seu_fixed=%0d false_blocked=%0d overrun=%0d",
             n_steps, n_irq, n_sleep, n_wake, n_reader, n_keyupd, n_switch, n_seu_fixed, n_false_blocked, n_overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit pas_clk_en_now();
    return u_dut.u_mcu_if.pas_clk_en;
  endfunction
endmodule
