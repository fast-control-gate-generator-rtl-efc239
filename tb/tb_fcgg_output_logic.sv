// tb_fcgg_output_logic: self-checking test of the external output logic.
//
// Random pulse levels and output masks are applied; each output is expected,
// one clock later, to be the OR over sequencers n of
// (prompt[n] & mask[n]) | (echo[n] & mask[8+n]).
module tb_fcgg_output_logic;
  import fcgg_pkg::*;

  logic                             clk = 1'b0;
  logic                             rst;
  logic [NSEQ-1:0]                  prompt, echo;
  logic [NEXT_OUT-1:0][2*NSEQ-1:0]  out_mask;
  logic [NEXT_OUT-1:0]              ext_out;

  int checks = 0, failures = 0;

  fcgg_output_logic dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NEXT_OUT-1:0] exp_out;
    prompt = '0; echo = '0; out_mask = '0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      // sparse pulses and masks so that outputs are both 0 and 1
      prompt = NSEQ'($urandom & $urandom);
      echo   = NSEQ'($urandom & $urandom);
      for (int o = 0; o < NEXT_OUT; o++) out_mask[o] = 16'(1 << $urandom_range(0, 15)) | 16'($urandom & $urandom & $urandom);
      for (int o = 0; o < NEXT_OUT; o++) begin
        exp_out[o] = 1'b0;
        for (int n = 0; n < NSEQ; n++)
          exp_out[o] |= (prompt[n] & out_mask[o][n]) | (echo[n] & out_mask[o][NSEQ+n]);
      end
      @(posedge clk);
      #1;
      checks++;
      if (ext_out !== exp_out) begin
        failures++;
        if (failures < 10) $display("step %0d: out %b expected %b", i, ext_out, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
