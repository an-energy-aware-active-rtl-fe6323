// gray_counter: segmented Gray-code counter with parity prediction.
//
// The count is split into W/SEG_W segments. Each segment holds a Gray code and
// advances by one Gray step when every lower segment is at its last code, so a
// single count step changes one bit in each segment that moves. Since one Gray
// step flips exactly one bit, a segment's parity toggles every time it advances.
// A toggle flip-flop per segment predicts that parity; an XOR of the segment's
// bits against the toggle flip-flop exposes any single flipped bit (parity_err).
// Segmenting Gray counters and predicting parity with an XOR and a toggle
// flip-flop follow the prototype; the segment width of 8 bits and keeping one
// predictor per segment (a segment wrap moves two bits in total) are this design's
// choices.
//
// Interface: `en` advances the count by one; `load` (priority over en) loads the
// binary value load_val, stored as Gray code with matching predictors. `flip` is an
// XOR mask applied to the stored code on the next edge, standing in for a
// single-event upset. `value` is the binary count, `gray` the raw state.
// Timing: one clock edge per step; outputs are combinational from the state.
module gray_counter #(
  parameter int unsigned W     = 32,
  parameter int unsigned SEG_W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [W-1:0] load_val,
  input  logic [W-1:0] flip,
  output logic [W-1:0] gray,
  output logic [W-1:0] value,
  output logic         parity_err
);

  localparam int unsigned NSEG = W / SEG_W;

  initial assert (W % SEG_W == 0) else $fatal(1, "W must be a multiple of SEG_W");

  function automatic logic [SEG_W-1:0] bin2gray(input logic [SEG_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [SEG_W-1:0] gray2bin(input logic [SEG_W-1:0] g);
    logic [SEG_W-1:0] b;
    b[SEG_W-1] = g[SEG_W-1];
    for (int i = SEG_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [W-1:0]    g_q;      // Gray state, segment by segment
  logic [NSEG-1:0] tff_q;    // predicted parity of each segment
  logic [W-1:0]    g_d;
  logic [NSEG-1:0] tff_d;
  logic [NSEG-1:0] seg_err;

  always_comb begin
    logic carry;
    carry = en;
    g_d   = g_q;
    tff_d = tff_q;
    for (int s = 0; s < NSEG; s++) begin
      logic [SEG_W-1:0] b;
      b          = gray2bin(g_q[s*SEG_W +: SEG_W]);
      if (carry) begin
        g_d[s*SEG_W +: SEG_W] = bin2gray(b + 1'b1);
        tff_d[s]              = ~tff_q[s];
      end
      carry = carry & (&b);
    end
    if (load) begin
      for (int s = 0; s < NSEG; s++) begin
        g_d[s*SEG_W +: SEG_W] = bin2gray(load_val[s*SEG_W +: SEG_W]);
        tff_d[s]              = ^bin2gray(load_val[s*SEG_W +: SEG_W]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_q   <= '0;
      tff_q <= '0;
    end else begin
      g_q   <= g_d ^ flip;
      tff_q <= tff_d;
    end
  end

  always_comb begin
    for (int s = 0; s < NSEG; s++) begin
      value[s*SEG_W +: SEG_W] = gray2bin(g_q[s*SEG_W +: SEG_W]);
      seg_err[s]              = (^g_q[s*SEG_W +: SEG_W]) ^ tff_q[s];
    end
  end

  assign gray       = g_q;
  assign parity_err = |seg_err;

endmodule
