// control_interface: command decoder of the periodically-active subsystem.
//
// Commands reach the card from two sides: decrypted 64-bit blocks from the card
// reader interface, and commands from the microcontroller through the
// microcontroller interface. The decoder executes them one at a time on the CAM,
// the counter (through the CAS register bank) and the TEA key register. A reader
// command is answered with a reply block that is encrypted and sent back; a
// microcontroller command is answered on the response port.
//
// Reader and processor also exchange messages through the decoder. OP_TO_MCU from
// the reader (e.g. an Authenticate request) is not answered; its argument and data
// go into a one-entry mailbox and msg_pend is raised, which interrupts the
// processor. The processor reads the mailbox with OP_MSG_READ (arg[0] = 0 data,
// 1 argument; arg[7] also clears msg_pend) and answers with OP_TO_READER, whose
// data go to the reader in an encrypted reply block. A newer message overwrites an
// unread one. A command decoder serving both the reader and the microcontroller,
// its control of the CAM and counter, and the processor receiving reader
// instructions through it follow the prototype; the command set (sc_pkg::op_e),
// mailbox, block layout and handshakes are this design's own.
//
// Block layout: command [63:56] opcode, [55:48] argument, [31:0] data; reply
// [63:56] opcode, [55:48] status (sc_pkg::status_t), [47:32] zero, [31:0] result.
// The reply's zero field and the reserved status bits are constant by design.
// Reader commands take priority when both sides are waiting.
//
// Timing: a command enters in one clock, decodes in the next; key writes, match
// reads and messages finish in the third (a reply block waits for the encryptor), CAM and counter commands wait for the CAS
// register bank (up to 1.5 CAS periods) plus two clocks.
module control_interface
  import sc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // microcontroller interface
  input  logic                 mcu_cmd_valid,
  input  logic [7:0]           mcu_cmd_op,
  input  logic [7:0]           mcu_cmd_arg,
  input  logic [31:0]          mcu_cmd_data,
  output logic                 mcu_cmd_ack,
  output logic                 mcu_rsp_valid,
  output logic [31:0]          rsp_data,
  output status_t              rsp_status,
  // card reader interface
  input  logic                 dec_done,
  input  logic [63:0]          dec_plain,
  output logic                 enc_start,
  output logic [63:0]          enc_plain,
  input  logic                 enc_busy,
  output logic                 key_we,
  output logic [1:0]           key_idx,
  output logic [31:0]          key_wdata,
  // CAS register bank
  output logic                 cas_req,
  output cas_op_e              cas_op,
  output logic [CAM_AW-1:0]    cas_addr,
  output logic                 cas_row_en,
  output logic [CNT_W-1:0]     cas_data,
  input  logic                 cas_done,
  input  logic [CNT_W-1:0]     cas_rd_data,
  input  logic [CNT_W-1:0]     cas_count,
  input  logic [CAM_WORDS-1:0] cas_match,
  output logic                 match_clr,
  input  logic                 cnt_err,
  input  logic                 cam_perr,
  // reader-to-processor mailbox
  output logic                 msg_pend
);

  typedef enum logic [2:0] {S_IDLE, S_EXEC, S_CAS, S_REL, S_FIN} state_e;

  state_e      state_q;
  logic        from_reader_q;
  logic        send_q;              // the command ends with a reply block to the reader
  logic [7:0]  msg_arg_q;
  logic [31:0] msg_data_q;
  logic [7:0]  op_q, arg_q;
  logic [31:0] data_q, result_q;
  logic        bad_op_q;
  logic        rd_pend_q;
  logic [63:0] rd_blk_q;

  // A decrypted reader block is taken at once when idle, otherwise it waits.
  logic        rd_avail;
  logic [63:0] rd_blk;
  assign rd_avail = dec_done | rd_pend_q;
  assign rd_blk   = dec_done ? dec_plain : rd_blk_q;

  status_t status_now;
  always_comb begin
    status_now            = '0;
    status_now.bad_op     = bad_op_q;
    status_now.cnt_error  = cnt_err;
    status_now.cam_parity = cam_perr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      from_reader_q <= 1'b0;
      send_q        <= 1'b0;
      msg_arg_q     <= '0;
      msg_data_q    <= '0;
      msg_pend      <= 1'b0;
      op_q          <= '0;
      arg_q         <= '0;
      data_q        <= '0;
      result_q      <= '0;
      bad_op_q      <= 1'b0;
      rd_pend_q     <= 1'b0;
      rd_blk_q      <= '0;
      mcu_cmd_ack   <= 1'b0;
      mcu_rsp_valid <= 1'b0;
      rsp_data      <= '0;
      rsp_status    <= '0;
      enc_start     <= 1'b0;
      enc_plain     <= '0;
      key_we        <= 1'b0;
      key_idx       <= '0;
      key_wdata     <= '0;
      cas_req       <= 1'b0;
      cas_op        <= CAS_READ;
      cas_addr      <= '0;
      cas_row_en    <= 1'b0;
      cas_data      <= '0;
      match_clr     <= 1'b0;
    end else begin
      mcu_cmd_ack   <= 1'b0;
      mcu_rsp_valid <= 1'b0;
      enc_start     <= 1'b0;
      key_we        <= 1'b0;
      match_clr     <= 1'b0;
      if (dec_done) begin
        rd_pend_q <= 1'b1;
        rd_blk_q  <= dec_plain;
      end
      unique case (state_q)
        S_IDLE: begin
          if (rd_avail) begin
            from_reader_q <= 1'b1;
            op_q          <= rd_blk[63:56];
            arg_q         <= rd_blk[55:48];
            data_q        <= rd_blk[31:0];
            rd_pend_q     <= 1'b0;
            state_q       <= S_EXEC;
          end else if (mcu_cmd_valid && !mcu_cmd_ack) begin
            from_reader_q <= 1'b0;
            op_q          <= mcu_cmd_op;
            arg_q         <= mcu_cmd_arg;
            data_q        <= mcu_cmd_data;
            mcu_cmd_ack   <= 1'b1;
            state_q       <= S_EXEC;
          end
        end
        S_EXEC: begin
          bad_op_q   <= 1'b0;
          result_q   <= '0;
          cas_addr   <= arg_q[CAM_AW-1:0];
          cas_row_en <= arg_q[7];
          cas_data   <= data_q;
          send_q     <= from_reader_q;
          state_q    <= S_FIN;
          case (op_q)
            OP_CAM_WRITE:  begin cas_op <= CAS_CAM_WR; cas_req <= 1'b1; state_q <= S_CAS; end
            OP_CAM_READ:   begin cas_op <= CAS_READ;   cas_req <= 1'b1; state_q <= S_CAS; end
            OP_CNT_WRITE:  begin cas_op <= CAS_CNT_WR; cas_req <= 1'b1; state_q <= S_CAS; end
            OP_CNT_READ:   begin cas_op <= CAS_READ;   cas_req <= 1'b1; state_q <= S_CAS; end
            OP_MATCH_READ: begin result_q <= 32'(cas_match); match_clr <= 1'b1; end
            OP_KEY_WRITE:  begin key_we <= 1'b1; key_idx <= arg_q[1:0]; key_wdata <= data_q; result_q <= data_q; end
            OP_TO_MCU:
              if (from_reader_q) begin
                msg_arg_q  <= arg_q;
                msg_data_q <= data_q;
                msg_pend   <= 1'b1;
                send_q     <= 1'b0;
              end else bad_op_q <= 1'b1;
            OP_TO_READER:
              if (!from_reader_q) begin send_q <= 1'b1; result_q <= data_q; end
              else bad_op_q <= 1'b1;
            OP_MSG_READ:
              if (!from_reader_q) begin
                result_q <= arg_q[0] ? 32'(msg_arg_q) : msg_data_q;
                if (arg_q[7]) msg_pend <= 1'b0;
              end else bad_op_q <= 1'b1;
            OP_NOP:        ;
            default:       bad_op_q <= 1'b1;
          endcase
        end
        S_CAS: if (cas_done) begin
          cas_req  <= 1'b0;
          result_q <= (op_q == OP_CAM_WRITE || op_q == OP_CAM_READ) ? cas_rd_data : cas_count;
          state_q  <= S_REL;
        end
        S_REL: if (!cas_done) state_q <= S_FIN;
        S_FIN: begin
          if (!send_q || (!enc_busy && !enc_start)) begin
            if (send_q) begin
              enc_start <= 1'b1;
              enc_plain <= {op_q, status_now, 16'h0000, result_q};
            end
            if (!from_reader_q) begin
              mcu_rsp_valid <= 1'b1;
              rsp_data      <= result_q;
              rsp_status    <= status_now;
            end
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A CAS request is held until the register bank reports it done.
  assert property (@(posedge clk) disable iff (!rst_n) (cas_req && !cas_done) |=> cas_req);

endmodule
