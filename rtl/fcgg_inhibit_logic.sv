// fcgg_inhibit_logic: drives the partition inhibit outputs.
//
// Every inhibit output is asserted by either global inhibit input (global
// override). Besides that, output i is asserted when a selected ("included")
// sequencer pulse is high, no selected "excluded" pulse is high, and bit i
// of inhibit_mask_out enables the output:
//   seq     = {echo, prompt}                        (16 pulses)
//   incl    = |(seq & mask_in[15:0])
//   excl    = |(seq & mask_in[31:16])
//   inh[i]  = gin[0] | gin[1] | (incl & ~excl & mask_out[i])
// The equation is the design's. The sequencer term is registered (one clock)
// to avoid glitches; the global inhibit inputs reach the outputs without a
// clock so that an external inhibit takes effect at once. Both of those are
// this implementation's choices.
module fcgg_inhibit_logic
  import fcgg_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NSEQ-1:0]      prompt,
  input  logic [NSEQ-1:0]      echo,
  input  logic [NGINH-1:0]     gin,       // global inhibit inputs
  input  logic [4*NSEQ-1:0]    mask_in,   // inhibit_mask_in register
  input  logic [NPINH-1:0]     mask_out,  // inhibit_mask_out register
  output logic [NPINH-1:0]     inh_out
);

  logic [2*NSEQ-1:0] seq;
  logic              incl, excl;
  logic [NPINH-1:0]  seq_inh_q;

  assign seq  = {echo, prompt};
  assign incl = |(seq & mask_in[2*NSEQ-1:0]);
  assign excl = |(seq & mask_in[4*NSEQ-1:2*NSEQ]);

  always_ff @(posedge clk) begin
    if (rst) seq_inh_q <= '0;
    else     seq_inh_q <= (incl && !excl) ? mask_out : '0;
  end

  assign inh_out = {NPINH{|gin}} | seq_inh_q;

endmodule
