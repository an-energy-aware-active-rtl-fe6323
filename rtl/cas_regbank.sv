// cas_regbank: register bank between the continually-active subsystem (CAS) and
// the periodically-active subsystem (PAS).
//
// The CAS is built from adiabatic logic and only exchanges data with the ordinary
// logic of the PAS when its power clock peaks. This bank makes that exchange
// explicit: a PAS request (read, counter write or CAM row write) is held in
// registers until the next CAS step (`tick`), where writes are applied, and the
// CAS outputs (count, CAM read word, match lines, error flags) are captured at the
// next `peak`, after which the request is reported done. Match lines captured at
// a peak are ORed into a sticky match register and raise a one-cycle `match_evt`;
// because capture happens once per CAS period, a count value that matches gives
// exactly one event. Using register banks and transferring at the power-clock peak
// follow the prototype; the four-phase handshake and the sticky match register are
// this design's choices.
//
// Interface: req/done is a four-phase handshake (hold req until done, then drop
// it; done falls after req does). match_clr clears the sticky match register (a
// match captured in the same cycle is kept).
// Timing: a read completes at the first peak after the request; a write at the
// first peak after the first tick, i.e. within 1.5 CAS periods.
module cas_regbank
  import sc_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned WORDS = 32,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,
  input  logic             peak,
  // PAS side
  input  logic             req,
  input  cas_op_e          req_op,
  input  logic [AW-1:0]    req_addr,
  input  logic             req_row_en,
  input  logic [W-1:0]     req_data,
  output logic             done,
  output logic [W-1:0]     rd_data_q,
  output logic [W-1:0]     count_q,
  output logic [WORDS-1:0] match_q,
  input  logic             match_clr,
  output logic             match_evt,
  output logic             cnt_err_q,
  output logic             cam_perr_q,
  // CAS side
  output logic             cas_cnt_wr,
  output logic             cas_cam_wr,
  output logic [AW-1:0]    cas_addr,
  output logic [W-1:0]     cas_wdata,
  output logic             cas_wvalid,
  input  logic [W-1:0]     cas_count,
  input  logic             cas_cnt_error,
  input  logic [W-1:0]     cas_rdata,
  input  logic [WORDS-1:0] cas_match,
  input  logic [WORDS-1:0] cas_parity_err
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT_TICK, S_WAIT_PEAK, S_DONE} state_e;
  state_e  state_q;
  cas_op_e op_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      op_q       <= CAS_READ;
      cas_addr   <= '0;
      cas_wdata  <= '0;
      cas_wvalid <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (req) begin
          op_q       <= req_op;
          cas_addr   <= req_addr;
          cas_wdata  <= req_data;
          cas_wvalid <= req_row_en;
          state_q    <= (req_op == CAS_READ) ? S_WAIT_PEAK : S_WAIT_TICK;
        end
        S_WAIT_TICK: if (tick) state_q <= S_WAIT_PEAK;
        S_WAIT_PEAK: if (peak) state_q <= S_DONE;
        S_DONE:      if (!req) state_q <= S_IDLE;
        default:     state_q <= S_IDLE;
      endcase
    end
  end

  // Writes are presented for the whole wait; the CAS acts on them only at tick.
  assign cas_cnt_wr = (state_q == S_WAIT_TICK) && (op_q == CAS_CNT_WR);
  assign cas_cam_wr = (state_q == S_WAIT_TICK) && (op_q == CAS_CAM_WR);
  assign done       = (state_q == S_DONE);

  // Capture at the power-clock peak.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_data_q  <= '0;
      count_q    <= '0;
      match_q    <= '0;
      match_evt  <= 1'b0;
      cnt_err_q  <= 1'b0;
      cam_perr_q <= 1'b0;
    end else begin
      match_evt <= peak && (|cas_match);
      if (peak) begin
        rd_data_q  <= cas_rdata;
        count_q    <= cas_count;
        cnt_err_q  <= cas_cnt_error;
        cam_perr_q <= |cas_parity_err;
      end
      if (peak)           match_q <= (match_clr ? '0 : match_q) | cas_match;
      else if (match_clr) match_q <= '0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(tick && peak));

endmodule
