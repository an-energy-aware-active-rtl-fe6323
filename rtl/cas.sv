// cas: the continually-active subsystem.
//
// The fault-tolerant counter counts CAS steps; its corrected count is the search
// word of the fault-tolerant CAM, whose match lines say which stored timing keys
// equal the present time. This is the only part of the card that is clocked while
// the rest sleeps. Counter and CAM and the count-to-CAM connection follow the
// prototype.
//
// Interface: en is the CAS step from the clock divider. cnt_wr/cnt_wdata write
// the count; cam_wr/cam_addr/cam_wdata/cam_wvalid write a CAM row; cam_rdata reads
// the row at cam_addr. seu_* inputs emulate upsets in the counters and the CAM.
// Timing: writes and count steps happen on edges where en is high; the match lines
// follow the count combinationally.
module cas #(
  parameter int unsigned W     = 32,
  parameter int unsigned WORDS = 32,
  parameter int unsigned SEG_W = 8,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   cnt_wr,
  input  logic [W-1:0]           cnt_wdata,
  input  logic                   cam_wr,
  input  logic [AW-1:0]          cam_addr,
  input  logic [W-1:0]           cam_wdata,
  input  logic                   cam_wvalid,
  output logic [W-1:0]           count,
  output logic                   cnt_error,
  output logic [W-1:0]           cam_rdata,
  output logic [WORDS-1:0]       match,
  output logic [WORDS-1:0]       cam_parity_err,
  input  logic [W-1:0]           seu_cnt_main,
  input  logic [W-1:0]           seu_cnt_red,
  input  logic                   seu_cam_en,
  input  logic [AW-1:0]          seu_cam_row,
  input  logic [$clog2(W+1)-1:0] seu_cam_bit
);

  ft_counter #(.W(W), .SEG_W(SEG_W)) u_counter (
    .clk, .rst_n, .en,
    .wr(cnt_wr), .wdata(cnt_wdata),
    .flip_main(seu_cnt_main), .flip_red(seu_cnt_red),
    .count, .error(cnt_error)
  );

  ft_cam #(.WORDS(WORDS), .W(W)) u_cam (
    .clk, .rst_n, .en,
    .wr(cam_wr), .addr(cam_addr), .wdata(cam_wdata), .wvalid(cam_wvalid),
    .search(count), .rdata(cam_rdata), .match, .parity_err(cam_parity_err),
    .inj_en(seu_cam_en), .inj_row(seu_cam_row), .inj_bit(seu_cam_bit)
  );

endmodule
