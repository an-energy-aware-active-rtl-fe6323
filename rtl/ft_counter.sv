// ft_counter: area-redundant, fault-tolerant CAS time counter.
//
// Two identical segmented Gray counters run in parallel. The main counter's
// parity-prediction error detector drives a 2-to-1 multiplexer: while it reports
// an error, the redundant counter's value is given out instead. This structure
// (counter, redundant counter, error detector, 2-to-1 mux) is the prototype's. As
// this design's own addition, the main counter is reloaded from the redundant one
// at the next CAS step after an error, so the pair is back to full redundancy and
// the error flag clears.
//
// Interface: en is the CAS step (one cycle every 256 primary clocks). A write
// (wr with en) loads wdata into both counters. flip_main/flip_red emulate upsets
// in either counter. count is the binary count the CAM is matched against; error
// is the detector output.
// Timing: all state changes happen on edges where en is high, except upsets.
module ft_counter #(
  parameter int unsigned W     = 32,
  parameter int unsigned SEG_W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  input  logic [W-1:0] flip_main,
  input  logic [W-1:0] flip_red,
  output logic [W-1:0] count,
  output logic         error
);

  logic [W-1:0] main_val, red_val;
  logic         main_err, red_err_unused;
  logic         main_load;
  logic [W-1:0] main_load_val;

  // Resynchronise the main counter from the redundant one after an error.
  assign main_load     = en & (wr | main_err);
  assign main_load_val = wr ? wdata : red_val + 1'b1;

  gray_counter #(.W(W), .SEG_W(SEG_W)) u_main (
    .clk, .rst_n,
    .en(en), .load(main_load), .load_val(main_load_val), .flip(flip_main),
    .gray(), .value(main_val), .parity_err(main_err)
  );

  gray_counter #(.W(W), .SEG_W(SEG_W)) u_red (
    .clk, .rst_n,
    .en(en), .load(en & wr), .load_val(wdata), .flip(flip_red),
    .gray(), .value(red_val), .parity_err(red_err_unused)
  );

  assign error = main_err;
  assign count = main_err ? red_val : main_val;

endmodule
