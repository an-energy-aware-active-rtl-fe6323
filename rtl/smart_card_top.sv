// smart_card_top: digital core of an energy-aware active smart card.
//
// The card keeps time on its own, from an embedded crystal and battery, so that it
// can renew its encryption keys periodically even when no reader is attached. To
// make the battery last, only a tiny continually-active subsystem (CAS) runs all
// the time: a fault-tolerant 32-bit time counter stepped at 1/256 of the 3.5712
// MHz crystal clock (13.95 kHz), and a 32-entry fault-tolerant CAM of timing keys
// that is matched against the count. The periodically-active subsystem (PAS) -
// control interface, microcontroller interface, encrypted reader interface, and
// the external 8051 with its RAM and ROM - sleeps with its clock gated off until
// a timing key matches; the match raises an interrupt that restores the clock and
// tells the processor which keys fired. This partition and every block below
// follow the prototype's architecture; the processor, its memories and the UART
// are outside this module and connect through its ports.
//
// Ports:
//   clk, rst_n           primary (crystal) clock, active-low asynchronous reset
//   rx_*/tx_*            byte side of the UART towards the reader (valid/ready)
//   mcu_*                11-bit processor bus (3-bit address, 8-bit data) and IRQ
//   pas_clk              gated clock for the processor, RAM and ROM
//   seu_*                upset emulation for the counters and the CAM
//   overrun              a reader block was lost (reader sent too fast)
// Timing: the CAS steps once every 2^DIV_BITS clocks; PAS accesses to the CAS
// complete at the following power-clock peak (see cas_regbank).
module smart_card_top
  import sc_pkg::*;
#(
  parameter int unsigned DIV_BITS = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // UART byte side
  input  logic                    rx_valid,
  input  logic [7:0]              rx_data,
  output logic                    tx_valid,
  output logic [7:0]              tx_data,
  input  logic                    tx_ready,
  // processor bus
  input  logic [2:0]              mcu_addr,
  input  logic [7:0]              mcu_wdata,
  input  logic                    mcu_wr,
  input  logic                    mcu_rd,
  output logic [7:0]              mcu_rdata,
  output logic                    mcu_irq,
  output logic                    pas_clk,
  // upset emulation
  input  logic [CNT_W-1:0]        seu_cnt_main,
  input  logic [CNT_W-1:0]        seu_cnt_red,
  input  logic                    seu_cam_en,
  input  logic [CAM_AW-1:0]       seu_cam_row,
  input  logic [$clog2(CNT_W+1)-1:0] seu_cam_bit,
  output logic                    overrun
);

  // ---------------- continually-active subsystem ----------------
  logic                 tick, peak;
  logic                 cas_cnt_wr, cas_cam_wr, cas_wvalid;
  logic [CAM_AW-1:0]    cas_addr;
  logic [CNT_W-1:0]     cas_wdata, cas_count, cas_rdata;
  logic                 cas_cnt_error;
  logic [CAM_WORDS-1:0] cas_match, cas_parity_err;

  cas_clk_div #(.DIV_BITS(DIV_BITS)) u_div (.clk, .rst_n, .tick, .peak);

  cas #(.W(CNT_W), .WORDS(CAM_WORDS)) u_cas (
    .clk, .rst_n, .en(tick),
    .cnt_wr(cas_cnt_wr), .cnt_wdata(cas_wdata),
    .cam_wr(cas_cam_wr), .cam_addr(cas_addr), .cam_wdata(cas_wdata), .cam_wvalid(cas_wvalid),
    .count(cas_count), .cnt_error(cas_cnt_error), .cam_rdata(cas_rdata),
    .match(cas_match), .cam_parity_err(cas_parity_err),
    .seu_cnt_main, .seu_cnt_red, .seu_cam_en, .seu_cam_row, .seu_cam_bit
  );

  // ---------------- CAS / PAS register bank ----------------
  logic                 rb_req, rb_done, rb_row_en, rb_match_clr, rb_match_evt;
  cas_op_e              rb_op;
  logic [CAM_AW-1:0]    rb_addr;
  logic [CNT_W-1:0]     rb_data, rb_rd_data, rb_count;
  logic [CAM_WORDS-1:0] rb_match;
  logic                 rb_cnt_err, rb_cam_perr;

  cas_regbank #(.W(CNT_W), .WORDS(CAM_WORDS)) u_regbank (
    .clk, .rst_n, .tick, .peak,
    .req(rb_req), .req_op(rb_op), .req_addr(rb_addr), .req_row_en(rb_row_en), .req_data(rb_data),
    .done(rb_done), .rd_data_q(rb_rd_data), .count_q(rb_count), .match_q(rb_match),
    .match_clr(rb_match_clr), .match_evt(rb_match_evt),
    .cnt_err_q(rb_cnt_err), .cam_perr_q(rb_cam_perr),
    .cas_cnt_wr, .cas_cam_wr, .cas_addr, .cas_wdata, .cas_wvalid,
    .cas_count, .cas_cnt_error, .cas_rdata, .cas_match, .cas_parity_err
  );

  // ---------------- microcontroller interface and sleep gating ----------------
  logic        pas_clk_en, msg_pend;
  logic        cmd_valid, cmd_ack, rsp_valid;
  logic [7:0]  cmd_op, cmd_arg;
  logic [31:0] cmd_data, rsp_data;
  status_t     rsp_status;

  mcu_interface u_mcu_if (
    .clk, .rst_n,
    .addr(mcu_addr), .wdata(mcu_wdata), .wr(mcu_wr), .rd(mcu_rd), .rdata(mcu_rdata),
    .irq(mcu_irq), .pas_clk_en, .match_evt(rb_match_evt), .msg_pend,
    .cmd_valid, .cmd_op, .cmd_arg, .cmd_data, .cmd_ack,
    .rsp_valid, .rsp_data, .rsp_status
  );

  clock_gate u_pas_gate (.clk, .en(pas_clk_en), .gclk(pas_clk));

  // ---------------- periodically-active subsystem ----------------
  logic        dec_done, enc_start, enc_busy, key_we;
  logic [63:0] dec_plain, enc_plain;
  logic [1:0]  key_idx;
  logic [31:0] key_wdata;

  control_interface u_ctrl_if (
    .clk(pas_clk), .rst_n,
    .mcu_cmd_valid(cmd_valid), .mcu_cmd_op(cmd_op), .mcu_cmd_arg(cmd_arg),
    .mcu_cmd_data(cmd_data), .mcu_cmd_ack(cmd_ack), .mcu_rsp_valid(rsp_valid),
    .rsp_data, .rsp_status,
    .dec_done, .dec_plain, .enc_start, .enc_plain, .enc_busy,
    .key_we, .key_idx, .key_wdata,
    .cas_req(rb_req), .cas_op(rb_op), .cas_addr(rb_addr), .cas_row_en(rb_row_en),
    .cas_data(rb_data), .cas_done(rb_done), .cas_rd_data(rb_rd_data),
    .cas_count(rb_count), .cas_match(rb_match), .match_clr(rb_match_clr),
    .cnt_err(rb_cnt_err), .cam_perr(rb_cam_perr), .msg_pend
  );

  card_interface u_card_if (
    .clk(pas_clk), .rst_n,
    .rx_valid, .rx_data, .tx_valid, .tx_data, .tx_ready,
    .dec_done, .dec_plain, .enc_start, .enc_plain, .enc_busy,
    .key_we, .key_idx, .key_wdata, .overrun
  );

endmodule
