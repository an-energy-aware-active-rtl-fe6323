// cas_clk_div: rate divider for the continually-active subsystem.
//
// The CAS runs at the primary clock divided by 256 (3.5712 MHz / 256 = 13.95 kHz),
// made with eight flip-flops as in the prototype. Here the eight flip-flops form a
// binary counter and the divided rate is delivered as a one-cycle enable, `tick`,
// rather than as a separate clock net. `peak` marks the middle of each CAS period,
// taken as the moment the power clock of the adiabatic logic is at its peak, when
// data may pass between the CAS and the rest of the card (this placement is this
// design's choice).
//
// Timing: tick is high in cycle 2^DIV_BITS-1 of each period, peak in cycle
// 2^(DIV_BITS-1)-1, so peak comes exactly half a period after tick. Reset clears
// the divider.
module cas_clk_div #(
  parameter int unsigned DIV_BITS = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick,
  output logic peak
);

  logic [DIV_BITS-1:0] div_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div_q <= '0;
    else        div_q <= div_q + 1'b1;
  end

  assign tick = (div_q == {DIV_BITS{1'b1}});
  assign peak = (div_q == {1'b0, {(DIV_BITS-1){1'b1}}});

endmodule
