// tb_control_interface: checks the command decoder.
//
// The CAS register bank is modelled by the testbench (done a few clocks after a
// request, held until the request drops). Commands from the microcontroller
// side and decrypted reader blocks are issued; the test checks the CAS requests
// they produce (operation, row, enable, data), key writes, match read and clear,
// the response data and status, the layout of the reply block handed to the
// encryption block, and that a bad opcode is flagged. The reader-processor
// mailbox is checked too: a reader message gets no reply, raises msg_pend and is
// read back by the processor; the processor's answer reaches the reader as a
// reply block; each message opcode from the wrong side is refused.
module tb_control_interface;
  import sc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        mcu_cmd_valid, mcu_cmd_ack, mcu_rsp_valid;
  logic [7:0]  mcu_cmd_op, mcu_cmd_arg;
  logic [31:0] mcu_cmd_data, rsp_data;
  status_t     rsp_status;
  logic        dec_done, enc_start, enc_busy, key_we;
  logic [63:0] dec_plain, enc_plain;
  logic [1:0]  key_idx;
  logic [31:0] key_wdata;
  logic        cas_req, cas_row_en, cas_done, match_clr, cnt_err, cam_perr, msg_pend;
  cas_op_e     cas_op;
  logic [4:0]  cas_addr;
  logic [31:0] cas_data, cas_rd_data, cas_count, cas_match;
  int checks = 0, failures = 0;
  int rb_wait = 0, n_req = 0;
  cas_op_e     last_op;
  logic [4:0]  last_addr;
  logic        last_en;
  logic [31:0] last_data;

  control_interface u_dut (.clk, .rst_n, .mcu_cmd_valid, .mcu_cmd_op, .mcu_cmd_arg, .mcu_cmd_data,
    .mcu_cmd_ack, .mcu_rsp_valid, .rsp_data, .rsp_status, .dec_done, .dec_plain, .enc_start, .enc_plain,
    .enc_busy, .key_we, .key_idx, .key_wdata, .cas_req, .cas_op, .cas_addr, .cas_row_en, .cas_data,
    .cas_done, .cas_rd_data, .cas_count, .cas_match, .match_clr, .cnt_err, .cam_perr, .msg_pend);

  // register bank model
  always_ff @(posedge clk) begin
    if (!cas_req) begin
      cas_done <= 1'b0; rb_wait <= 0;
    end else if (!cas_done) begin
      if (rb_wait == 0) begin
        n_req <= n_req + 1; last_op <= cas_op; last_addr <= cas_addr; last_en <= cas_row_en; last_data <= cas_data;
      end
      rb_wait <= rb_wait + 1;
      if (rb_wait == 4) cas_done <= 1'b1;
    end
  end
  assign cas_rd_data = 32'hCAFE_0000 | 32'(last_addr);
  assign cas_count   = 32'h0012_3456;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic mcu_cmd(input logic [7:0] op, input logic [7:0] arg, input logic [31:0] d,
                         output logic [31:0] r, output status_t st);
    @(negedge clk); mcu_cmd_valid = 1; mcu_cmd_op = op; mcu_cmd_arg = arg; mcu_cmd_data = d;
    while (!mcu_cmd_ack) @(negedge clk);
    mcu_cmd_valid = 0;
    while (!mcu_rsp_valid) @(negedge clk);
    r = rsp_data; st = rsp_status;
  endtask

  task automatic reader_cmd(input logic [63:0] blk, output logic [63:0] reply);
    @(negedge clk); dec_done = 1; dec_plain = blk;
    @(negedge clk); dec_done = 0; dec_plain = 0;
    while (!enc_start) @(negedge clk);
    reply = enc_plain;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    status_t st;
    logic [63:0] rep;
    int n0;
    mcu_cmd_valid = 0; mcu_cmd_op = 0; mcu_cmd_arg = 0; mcu_cmd_data = 0; dec_done = 0; dec_plain = 0;
    enc_busy = 0; cas_done = 0; cnt_err = 0; cam_perr = 0; cas_match = 32'h0000_0300;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // CAM write from the microcontroller
    mcu_cmd(OP_CAM_WRITE, 8'h80 | 8'd17, 32'h0000_5000, r, st);
    check(last_op == CAS_CAM_WR && last_addr == 17 && last_en && last_data == 32'h5000, "CAM write request");
    check(r == 32'hCAFE_0011 && st == 0, $sformatf("CAM write response %h %h", r, st));
    // counter read
    mcu_cmd(OP_CNT_READ, 0, 0, r, st);
    check(last_op == CAS_READ && r == 32'h0012_3456, "counter read");
    // counter write
    mcu_cmd(OP_CNT_WRITE, 0, 32'h0000_0100, r, st);
    check(last_op == CAS_CNT_WR && last_data == 32'h100, "counter write request");
    // CAM read of a disabled row write (arg bit 7 clear)
    mcu_cmd(OP_CAM_WRITE, 8'd3, 32'h7, r, st);
    check(!last_en && last_addr == 3, "row enable bit from argument");
    // match read returns and clears
    @(negedge clk); mcu_cmd_valid = 1; mcu_cmd_op = OP_MATCH_READ;
    while (!match_clr) @(negedge clk);
    check(match_clr, "match register cleared");
    mcu_cmd_valid = 0;
    while (!mcu_rsp_valid) @(negedge clk);
    check(rsp_data == 32'h0000_0300, "match read data");
    // key write makes no CAS request
    n0 = n_req;
    @(negedge clk); mcu_cmd_valid = 1; mcu_cmd_op = OP_KEY_WRITE; mcu_cmd_arg = 8'd2; mcu_cmd_data = 32'hBEEF_0002;
    while (!key_we) @(negedge clk);
    check(key_idx == 2 && key_wdata == 32'hBEEF_0002, "key write");
    mcu_cmd_valid = 0;
    while (!mcu_rsp_valid) @(negedge clk);
    check(n_req == n0, "key write made no CAS request");
    // bad opcode
    cnt_err = 1;
    mcu_cmd(8'h7F, 0, 0, r, st);
    check(st.bad_op && st.cnt_error && !st.cam_parity, "status of a bad opcode");
    cnt_err = 0;
    // reader: CAM read, reply block layout, waits for the encryptor
    enc_busy = 1;
    fork
      begin repeat (20) @(negedge clk); enc_busy = 0; end
    join_none
    reader_cmd({OP_CAM_READ, 8'd9, 16'h0, 32'h0}, rep);
    check(!enc_busy, "reply waits for the encryption block");
    check(last_op == CAS_READ && last_addr == 9, "reader CAM read request");
    check(rep == {OP_CAM_READ, 8'h00, 16'h0, 32'hCAFE_0009}, $sformatf("reply block %h", rep));
    // reader command beats a waiting microcontroller command
    @(negedge clk); mcu_cmd_valid = 1; mcu_cmd_op = OP_NOP; dec_done = 1; dec_plain = {OP_CNT_READ, 8'h0, 48'h0};
    @(negedge clk); dec_done = 0;
    while (!enc_start && !mcu_rsp_valid) @(negedge clk);
    check(enc_start, "reader command served first");
    check(enc_plain[31:0] == 32'h0012_3456, "reader counter read");
    while (!mcu_rsp_valid) @(negedge clk);
    mcu_cmd_valid = 0;
    check(mcu_rsp_valid, "microcontroller served next");
    // reader message to the processor: no reply block, mailbox filled
    check(!msg_pend, "no message after reset");
    @(negedge clk); dec_done = 1; dec_plain = {OP_TO_MCU, 8'hA5, 16'h0, 32'h1357_9BDF};
    @(negedge clk); dec_done = 0;
    n0 = 0;
    repeat (20) begin @(negedge clk); if (enc_start) n0++; end
    check(n0 == 0 && msg_pend, "reader message raises msg_pend without a reply");
    mcu_cmd(OP_MSG_READ, 8'h01, 0, r, st);
    check(r == 32'hA5 && msg_pend && st == 0, "processor reads the message argument");
    mcu_cmd(OP_MSG_READ, 8'h80, 0, r, st);
    check(r == 32'h1357_9BDF && !msg_pend, "processor reads the message data and clears");
    // processor answer to the reader
    @(negedge clk); mcu_cmd_valid = 1; mcu_cmd_op = OP_TO_READER; mcu_cmd_arg = 0; mcu_cmd_data = 32'h0BAD_F00D;
    while (!enc_start) @(negedge clk);
    check(enc_plain == {OP_TO_READER, 8'h00, 16'h0, 32'h0BAD_F00D}, $sformatf("answer block %h", enc_plain));
    while (!mcu_rsp_valid) @(negedge clk);
    mcu_cmd_valid = 0;
    check(rsp_data == 32'h0BAD_F00D && rsp_status == 0, "processor told the answer went out");
    // wrong sides
    mcu_cmd(OP_TO_MCU, 0, 32'h1, r, st);
    check(st.bad_op && !msg_pend, "processor cannot post a reader message");
    reader_cmd({OP_MSG_READ, 8'h80, 16'h0, 32'h0}, rep);
    check(rep[48] && rep[31:0] == 0, "reader cannot read the mailbox");
    reader_cmd({OP_TO_READER, 8'h00, 16'h0, 32'h55}, rep);
    check(rep[48], "reader cannot send an answer block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
