// tb_ft_cam: checks the fault-tolerant CAM at its default 32 x 32 size.
//
// A reference copy of all rows is kept in the testbench. For random search words
// and for each stored word, the match vector must be exactly the set of enabled
// rows holding that word; reads must return the stored word; writes must wait for
// en. A flipped data or parity bit must suppress the row's match and flag the row
// in parity_err, and rewriting the row must repair it.
module tb_ft_cam;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        en, wr, wvalid, inj_en;
  logic [4:0]  addr, inj_row;
  logic [5:0]  inj_bit;
  logic [31:0] wdata, search, rdata;
  logic [31:0] match, perr;
  logic [31:0] ref_w [32];
  logic [31:0] ref_en;
  int checks = 0, failures = 0;

  ft_cam u_dut (.clk, .rst_n, .en, .wr, .addr, .wdata, .wvalid, .search, .rdata, .match,
                .parity_err(perr), .inj_en, .inj_row, .inj_bit);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] ref_match(input logic [31:0] s);
    logic [31:0] m;
    for (int i = 0; i < 32; i++) m[i] = ref_en[i] && ref_w[i] == s;
    return m;
  endfunction

  task automatic write_row(input int r, input logic [31:0] d, input logic v);
    @(negedge clk); wr = 1; addr = 5'(r); wdata = d; wvalid = v; en = 1;
    @(negedge clk); wr = 0; en = 0;
    ref_w[r] = d; ref_en[r] = v;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; wr = 0; wvalid = 0; inj_en = 0; addr = 0; inj_row = 0; inj_bit = 0; wdata = 0; search = 0;
    ref_en = 0;
    for (int i = 0; i < 32; i++) ref_w[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(match == 0 && perr == 0, "no match after reset");
    // write without en does nothing
    @(negedge clk); wr = 1; addr = 3; wdata = 32'hDEAD_BEEF; wvalid = 1;
    @(negedge clk); wr = 0; search = 32'hDEAD_BEEF; #1;
    check(match == 0, "write without en took effect");
    // fill rows, some duplicated, some disabled
    for (int r = 0; r < 32; r++) write_row(r, (r % 5 == 0) ? 32'h0000_1000 : $urandom, (r % 7) != 6);
    for (int r = 0; r < 32; r++) begin
      @(negedge clk); addr = 5'(r); search = ref_w[r]; #1;
      check(rdata == ref_w[r], $sformatf("read row %0d", r));
      check(match == ref_match(search), $sformatf("match for row %0d word: %h exp %h", r, match, ref_match(search)));
    end
    for (int k = 0; k < 200; k++) begin
      @(negedge clk); search = (k % 2) ? $urandom : ref_w[$urandom_range(31)]; #1;
      check(match == ref_match(search), "random search");
      check(perr == 0, "spurious parity error");
    end
    // upsets: data bit and parity bit
    for (int k = 0; k < 20; k++) begin
      int r, b;
      r = $urandom_range(31); b = (k % 4 == 3) ? 32 : $urandom_range(31);
      write_row(r, $urandom, 1);
      @(negedge clk); inj_en = 1; inj_row = 5'(r); inj_bit = 6'(b);
      @(negedge clk); inj_en = 0;
      // search for the word the flipped row now actually holds
      search = (b == 32) ? ref_w[r] : ref_w[r] ^ (32'(1) << b); #1;
      check(!match[r], $sformatf("false match on corrupted row %0d bit %0d", r, b));
      check(perr[r] && $countones(perr) == 1, "parity error flag");
      write_row(r, ref_w[r], 1);
      search = ref_w[r]; #1;
      check(match[r] && perr == 0, "row repaired by rewrite");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
