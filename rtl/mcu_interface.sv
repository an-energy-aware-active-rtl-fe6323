// mcu_interface: the microcontroller's window onto the card hardware.
//
// The 8-bit microcontroller reaches the control interface over an 11-bit bus,
// taken here as a 3-bit register address and an 8-bit data byte plus write and
// read strobes. Through eight byte registers it issues commands (opcode, argument
// and a 32-bit data word) and collects their 32-bit results and status. The block
// also raises the interrupt (IRQ) when the continually-active subsystem reports
// that a timing key matched or when the reader has left a message for the
// processor in the control interface's mailbox, and it puts the periodically-active
// subsystem to sleep by gating off its clock when the processor asks for it; the
// next match interrupt wakes it. IRQ, wake-up on a match and clock-gated sleep
// under processor control follow the prototype; the register map is this design's.
//
// Register map (addr):
//   0  W: opcode, issues the command      R: opcode of the last command
//   1  R/W: argument
//   2-5 W: command data bytes 0..3 (byte 0 least significant)
//       R: result bytes 0..3 of the last finished command
//   6  R: {busy, match_irq, msg, 2'b0, status[2:0]}
//   7  W: bit0 = go to sleep, bit1 = clear match IRQ   R: {5'b0, msg, match_irq, sleep}
// irq = match_irq | msg; msg (a reader message is waiting) is cleared by reading
// the mailbox with a clearing OP_MSG_READ.
// rdata is valid while rd is high, zero otherwise.
//
// Timing: this block runs on the free-running clock, so it can wake the rest.
// cmd_valid is raised the clock after the opcode write and held until cmd_ack;
// busy falls when rsp_valid arrives. pas_clk_en falls the clock after a sleep
// write and rises the clock after match_evt.
module mcu_interface
  import sc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // 11-bit microcontroller bus
  input  logic [2:0]  addr,
  input  logic [7:0]  wdata,
  input  logic        wr,
  input  logic        rd,
  output logic [7:0]  rdata,
  output logic        irq,
  // clock gating of the periodically-active subsystem
  output logic        pas_clk_en,
  input  logic        match_evt,
  input  logic        msg_pend,
  // command path to the control interface
  output logic        cmd_valid,
  output logic [7:0]  cmd_op,
  output logic [7:0]  cmd_arg,
  output logic [31:0] cmd_data,
  input  logic        cmd_ack,
  input  logic        rsp_valid,
  input  logic [31:0] rsp_data,
  input  status_t     rsp_status
);

  logic        busy_q, sleep_q, irq_q;
  logic [31:0] res_q;
  status_t     stat_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_valid <= 1'b0;
      cmd_op    <= '0;
      cmd_arg   <= '0;
      cmd_data  <= '0;
      busy_q    <= 1'b0;
      sleep_q   <= 1'b0;
      irq_q     <= 1'b0;
      res_q     <= '0;
      stat_q    <= '0;
    end else begin
      if (cmd_ack) cmd_valid <= 1'b0;
      if (rsp_valid) begin
        busy_q <= 1'b0;
        res_q  <= rsp_data;
        stat_q <= rsp_status;
      end
      if (wr) begin
        unique case (addr)
          3'd0: if (!busy_q) begin
            cmd_op    <= wdata;
            cmd_valid <= 1'b1;
            busy_q    <= 1'b1;
          end
          3'd1: cmd_arg           <= wdata;
          3'd2: cmd_data[7:0]     <= wdata;
          3'd3: cmd_data[15:8]    <= wdata;
          3'd4: cmd_data[23:16]   <= wdata;
          3'd5: cmd_data[31:24]   <= wdata;
          3'd6: ;
          3'd7: begin
            if (wdata[0]) sleep_q <= 1'b1;
            if (wdata[1]) irq_q   <= 1'b0;
          end
          default: ;
        endcase
      end
      // A match interrupt both flags the processor and wakes it.
      if (match_evt) begin
        irq_q   <= 1'b1;
        sleep_q <= 1'b0;
      end
    end
  end

  always_comb begin
    rdata = '0;
    if (rd) begin
      unique case (addr)
        3'd0: rdata = cmd_op;
        3'd1: rdata = cmd_arg;
        3'd2: rdata = res_q[7:0];
        3'd3: rdata = res_q[15:8];
        3'd4: rdata = res_q[23:16];
        3'd5: rdata = res_q[31:24];
        3'd6: rdata = {busy_q, irq_q, msg_pend, 2'b00, stat_q[2:0]};
        3'd7: rdata = {5'b0, msg_pend, irq_q, sleep_q};
        default: rdata = '0;
      endcase
    end
  end

  assign irq        = irq_q | msg_pend;
  assign pas_clk_en = !sleep_q;

endmodule
