// fcgg_input_ctl: trigger source of one sequencer.
//
// The sequencer input signal is the OR of the external inputs selected by
// the mask field of the sequencer's input control register:
//   sig = |(ext_in & ctl.mask)
// A rising edge of sig, or a test-fire strobe from a register write, gives a
// one-cycle trigger, but only while ctl.enable is set; a disabled sequencer
// ignores both. The masking and the enable follow the design's register
// description; acting on the rising edge (so a long input gives one series)
// is this implementation's choice. ext_in must already be synchronous to clk.
// trig is combinational from the registered edge detector; latency from an
// input edge to trig is zero cycles (after synchronisation).
module fcgg_input_ctl
  import fcgg_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  in_ctl_t            ctl,
  input  logic [NEXT_IN-1:0] ext_in,  // synchronised external inputs
  input  logic               fire,    // one-cycle test-fire strobe
  output logic               trig     // one-cycle sequencer trigger
);

  logic sig, sig_q;

  assign sig = |(ext_in & ctl.mask);

  always_ff @(posedge clk) begin
    if (rst) sig_q <= 1'b0;
    else     sig_q <= sig;
  end

  assign trig = ctl.enable && ((sig && !sig_q) || fire);

endmodule
