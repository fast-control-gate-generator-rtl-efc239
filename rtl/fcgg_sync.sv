// fcgg_sync: two-flip-flop synchroniser for a bus of independent
// asynchronous level signals (the front-panel sequencer inputs). Each bit is
// delayed by two clocks; reset clears both stages.
module fcgg_sync #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
