// fcgg_output_logic: forms the external outputs from the sequencer pulses.
//
// Each external output i is the OR of the prompt and echo pulse trains that
// its output control register outN_mask selects: bits 0-7 select the prompt
// pulses of sequencers 0-7, bits 8-15 their echo pulses.
//   ext_out[i] = |({echo, prompt} & out_mask[i])
// That equation is the design's. The outputs are registered here (one clock
// of latency) so that the front panel sees no combinational glitches; that
// register is this implementation's choice.
module fcgg_output_logic
  import fcgg_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  logic [NSEQ-1:0]               prompt,
  input  logic [NSEQ-1:0]               echo,
  input  logic [NEXT_OUT-1:0][2*NSEQ-1:0] out_mask,
  output logic [NEXT_OUT-1:0]           ext_out
);

  logic [NEXT_OUT-1:0] ext_d;

  always_comb begin
    for (int i = 0; i < NEXT_OUT; i++)
      ext_d[i] = |({echo, prompt} & out_mask[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) ext_out <= '0;
    else     ext_out <= ext_d;
  end

endmodule
