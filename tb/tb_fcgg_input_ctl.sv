// tb_fcgg_input_ctl: self-checking test of the trigger source.
//
// Random masks, enables, input levels and test-fire strobes are applied; a
// model computes the masked OR of the inputs, remembers its previous value
// and expects a trigger on each rising edge or fire strobe while enabled.
module tb_fcgg_input_ctl;
  import fcgg_pkg::*;

  logic               clk = 1'b0;
  logic               rst;
  in_ctl_t            ctl;
  logic [NEXT_IN-1:0] ext_in;
  logic               fire;
  logic               trig;

  int checks = 0, failures = 0;
  int n_edge = 0, n_fire = 0, n_disabled = 0;
  bit prev_sig;

  fcgg_input_ctl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit sig, exp_trig;
    ctl = '0; ext_in = '0; fire = 1'b0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    prev_sig = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      if (i % 50 == 0) ctl = in_ctl_t'($urandom_range(0, 31));
      ext_in = NEXT_IN'($urandom);
      fire   = ($urandom_range(0, 9) == 0);
      #1;
      sig = 1'b0;
      for (int b = 0; b < NEXT_IN; b++) sig |= ext_in[b] & ctl.mask[b];
      exp_trig = ctl.enable & ((sig & ~prev_sig) | fire);
      if (!ctl.enable && ((sig & ~prev_sig) | fire)) n_disabled++;
      if (exp_trig && fire) n_fire++;
      else if (exp_trig) n_edge++;
      checks++;
      if (trig !== exp_trig) begin
        failures++;
        if (failures < 10)
          $display("step %0d: trig %0b expected %0b (mask %b in %b)", i, trig, exp_trig, ctl.mask, ext_in);
      end
      prev_sig = sig;
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_edge == 0 || n_fire == 0 || n_disabled == 0) failures++;
    $display("edges %0d fires %0d disabled %0d", n_edge, n_fire, n_disabled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
