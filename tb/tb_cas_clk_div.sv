// tb_cas_clk_div: checks the CAS rate divider at its default size (divide by 256).
//
// Over several periods it measures the distance between ticks (256 clocks), the
// distance from tick to peak (128 clocks) and that each is a single-cycle pulse.
module tb_cas_clk_div;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tick, peak;
  int checks = 0, failures = 0;

  cas_clk_div u_dut (.clk, .rst_n, .tick, .peak);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last_tick, last_peak, nt;
    cyc = 0; last_tick = -1; last_peak = -1; nt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (nt < 6) begin
      @(posedge clk); #1;
      cyc++;
      if (tick) begin
        if (last_tick >= 0) check(cyc - last_tick == 256, $sformatf("tick period %0d", cyc - last_tick));
        if (last_peak >= 0) check(cyc - last_peak == 128, $sformatf("peak to tick %0d", cyc - last_peak));
        check(!peak, "tick and peak together");
        last_tick = cyc; nt++;
      end
      if (peak) begin
        if (last_tick >= 0) check(cyc - last_tick == 128, $sformatf("tick to peak %0d", cyc - last_tick));
        last_peak = cyc;
      end
    end
    // the first tick after reset comes 256 clocks after reset release
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
