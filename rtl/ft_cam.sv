// ft_cam: fault-tolerant content-addressable memory of timing keys.
//
// WORDS rows of W bits. Each row also stores a parity bit (even parity over the
// word) and an enable bit. Every row compares its word with `search`, the current
// count, in parallel; a row drives its match line only when it is enabled, equal
// to the count and its stored parity agrees with its stored word. A row hit by an
// upset therefore fails its parity check and can never produce a false match; it
// is reported on parity_err instead. Row parity and matching per row follow the
// prototype; the parity sense, the per-row enable (the "Enable" of the CAM control)
// and clearing all enables at reset are this design's choices. In the prototype
// the match lines are adiabatic (low-swing, driven by the power clock); here they
// are ordinary logic.
//
// Interface: wr with en writes {wvalid, parity(wdata), wdata} to row addr; rdata
// is the word at addr. inj_en/inj_row/inj_bit flip one stored bit (bit W is the
// parity bit) to emulate an upset.
// Timing: writes take effect on edges where en (the CAS step) is high; match,
// parity_err and rdata are combinational.
module ft_cam #(
  parameter int unsigned WORDS = 32,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  wr,
  input  logic [AW-1:0]         addr,
  input  logic [W-1:0]          wdata,
  input  logic                  wvalid,
  input  logic [W-1:0]          search,
  output logic [W-1:0]          rdata,
  output logic [WORDS-1:0]      match,
  output logic [WORDS-1:0]      parity_err,
  input  logic                  inj_en,
  input  logic [AW-1:0]         inj_row,
  input  logic [$clog2(W+1)-1:0] inj_bit
);

  logic [W-1:0]     word_q [WORDS];
  logic [WORDS-1:0] par_q;
  logic [WORDS-1:0] ena_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WORDS; i++) word_q[i] <= '0;
      par_q <= '0;
      ena_q <= '0;
    end else begin
      if (en && wr) begin
        word_q[addr] <= wdata;
        par_q[addr]  <= ^wdata;
        ena_q[addr]  <= wvalid;
      end
      if (inj_en) begin
        if (inj_bit == W[$clog2(W+1)-1:0]) par_q[inj_row] <= ~par_q[inj_row];
        else                               word_q[inj_row][inj_bit[$clog2(W)-1:0]] <= ~word_q[inj_row][inj_bit[$clog2(W)-1:0]];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < WORDS; i++) begin
      logic par_ok;
      par_ok        = ((^word_q[i]) == par_q[i]);
      match[i]      = ena_q[i] && par_ok && (word_q[i] == search);
      parity_err[i] = ena_q[i] && !par_ok;
    end
  end

  assign rdata = word_q[addr];

endmodule
