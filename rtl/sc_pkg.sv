// sc_pkg: types and constants shared by the smart-card core.
//
// The continually-active subsystem (CAS) works on 32-bit count values and holds
// 32 timing keys; the card reader interface encrypts 64-bit blocks with TEA under
// a 128-bit key. The command opcodes below are understood by the control interface
// both in decrypted reader blocks and in commands from the microcontroller; their
// encoding is this design's own choice. The last three carry messages such as the
// reader's Authenticate command between the reader and the processor.
package sc_pkg;

  localparam int unsigned CNT_W     = 32;  // counter and CAM word width
  localparam int unsigned CAM_WORDS = 32;  // number of timing keys
  localparam int unsigned CAM_AW    = $clog2(CAM_WORDS);

  localparam logic [31:0] TEA_DELTA = 32'h9E37_79B9;

  // Commands of the control interface.
  typedef enum logic [7:0] {
    OP_NOP        = 8'h00,
    OP_CAM_WRITE  = 8'h01,  // arg[4:0] row, arg[7] row enable, data = timing key
    OP_CAM_READ   = 8'h02,  // arg[4:0] row
    OP_CNT_WRITE  = 8'h03,  // data = new count
    OP_CNT_READ   = 8'h04,
    OP_MATCH_READ = 8'h05,  // returns and clears the captured match lines
    OP_KEY_WRITE  = 8'h06,  // arg[1:0] key word, data = key word
    // Messages between the reader and the processor (e.g. Authenticate).
    OP_TO_MCU     = 8'h07,  // reader only: arg, data left in the mailbox for the processor
    OP_TO_READER  = 8'h08,  // processor only: data sent to the reader in a reply block
    OP_MSG_READ   = 8'h09   // processor only: arg[0]=0 data, 1 message arg; arg[7] clears
  } op_e;

  // Status byte returned with every reply.
  typedef struct packed {
    logic [4:0] rsvd;
    logic       cam_parity;  // some enabled CAM row fails its parity check
    logic       cnt_error;   // the counter's error detector has fired
    logic       bad_op;      // opcode not understood
  } status_t;

  // Request from the PAS side to the register bank in front of the CAS.
  typedef enum logic [1:0] {
    CAS_READ   = 2'd0,
    CAS_CAM_WR = 2'd1,
    CAS_CNT_WR = 2'd2
  } cas_op_e;

  typedef struct packed {
    cas_op_e           op;
    logic [CAM_AW-1:0] addr;
    logic              row_en;
    logic [CNT_W-1:0]  data;
  } cas_req_t;

endpackage
