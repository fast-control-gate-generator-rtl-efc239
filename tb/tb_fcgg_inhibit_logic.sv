// tb_fcgg_inhibit_logic: self-checking test of the inhibit output logic.
//
// Random pulse levels, inhibit masks and global inhibits are applied. The
// sequencer part is expected one clock after the pulses, the global inhibit
// part without a clock:
//   inh[i] = gin[0] | gin[1] | (incl & ~excl & mask_out[i])
// Counts how often an output was set by included pulses, blocked by
// excluded pulses and forced by a global inhibit; each must happen.
module tb_fcgg_inhibit_logic;
  import fcgg_pkg::*;

  logic                clk = 1'b0;
  logic                rst;
  logic [NSEQ-1:0]     prompt, echo;
  logic [NGINH-1:0]    gin;
  logic [4*NSEQ-1:0]   mask_in;
  logic [NPINH-1:0]    mask_out;
  logic [NPINH-1:0]    inh_out;

  int checks = 0, failures = 0;
  int n_incl = 0, n_excl = 0, n_glob = 0;

  fcgg_inhibit_logic dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPINH-1:0] seq_part, exp_out;
    bit incl, excl;
    prompt = '0; echo = '0; gin = '0; mask_in = '0; mask_out = '0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      prompt   = NSEQ'($urandom & $urandom);
      echo     = NSEQ'($urandom & $urandom);
      mask_in  = $urandom & $urandom;
      mask_out = NPINH'($urandom);
      incl = 1'b0; excl = 1'b0;
      for (int n = 0; n < NSEQ; n++) begin
        incl |= (prompt[n] & mask_in[n])      | (echo[n] & mask_in[8+n]);
        excl |= (prompt[n] & mask_in[16+n])   | (echo[n] & mask_in[24+n]);
      end
      seq_part = (incl && !excl) ? mask_out : '0;
      if (incl && !excl && mask_out != 0) n_incl++;
      if (incl && excl) n_excl++;
      @(posedge clk);
      #1;
      // globals change after the clock and must act at once
      gin = ($urandom_range(0, 4) == 0) ? NGINH'($urandom_range(1, 3)) : '0;
      #1;
      exp_out = seq_part | {NPINH{gin[0] | gin[1]}};
      if (gin != 0) n_glob++;
      checks++;
      if (inh_out !== exp_out) begin
        failures++;
        if (failures < 10) $display("step %0d: inh %b expected %b", i, inh_out, exp_out);
      end
    end
    checks++;
    if (n_incl == 0 || n_excl == 0 || n_glob == 0) failures++;
    $display("included %0d excluded %0d global %0d", n_incl, n_excl, n_glob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
