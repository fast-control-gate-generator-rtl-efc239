// tb_fcgg_fig1_series: the example pulse series, run through the whole board.
//
// Sequencer 0 is programmed over VME for a series of three prompt pulses
// with echoes and a two-step stagger: delay 5, period 8, width 3, nreps 3,
// step 4, nsteps 2, echo delay 2, echo width 4. External output 0 carries
// its prompt pulses and output 1 its echo pulses. Front-panel input 0 is
// pulsed three times. The expected edge times below are worked out by hand
// from the timing rules, counted from the clock in which the input rises:
//   2 clocks of input synchroniser, 1 clock to the first prompt clock,
//   delay + k*step, 1 clock of output register
//   -> prompt rises at 4 + delay + k*step + j*period   (j = 0, 1, 2)
//   -> echo   rises at that time + echo delay
// so with k = 0, 1, 0 for the three inputs:
//   input 1 and 3: prompt at 9, 17, 25; echo at 11, 19, 27
//   input 2:       prompt at 13, 21, 29; echo at 15, 23, 31
// Every clock of a 40-clock window after each input is compared with that
// waveform (prompt 3 clocks high, echo 4 clocks high).
module tb_fcgg_fig1_series;
  import fcgg_pkg::*;

  localparam logic [15:0] BOARD = 16'h0001;

  logic                clk = 1'b0;
  logic                rst;
  logic [NEXT_IN-1:0]  ext_in;
  logic [NGINH-1:0]    gin;
  logic [NEXT_OUT-1:0] ext_out;
  logic [NPINH-1:0]    inh_out;
  logic [23:1]         vme_addr;
  logic [5:0]          vme_am;
  logic                vme_as_n;
  logic [1:0]          vme_ds_n;
  logic                vme_lword_n;
  logic                vme_write_n;
  logic [31:0]         vme_d_in, vme_d_out;
  logic                vme_d_oe, vme_dtack_n;
  logic [15:0]         dip_sw;

  fcgg_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reg_write(logic [7:0] ofs, logic [31:0] d);
    @(posedge clk); #1;
    vme_addr = {BOARD, ofs[7:1]}; vme_am = 6'h39; vme_lword_n = 1'b0;
    vme_write_n = 1'b0; vme_d_in = d;
    @(posedge clk); #1 vme_as_n = 1'b0;
    @(posedge clk); #1 vme_ds_n = 2'b00;
    for (int i = 0; i < 40 && vme_dtack_n; i++) @(posedge clk);
    #1;
    checks++;
    if (vme_dtack_n) failures++;
    vme_ds_n = 2'b11; vme_as_n = 1'b1;
    for (int i = 0; i < 10 && !vme_dtack_n; i++) @(posedge clk);
  endtask

  function automatic bit high_in(int t, int r0, int w, int per);
    for (int j = 0; j < 3; j++)
      if (t >= r0 + j * per && t < r0 + j * per + w) return 1'b1;
    return 1'b0;
  endfunction

  // one input pulse; compare 40 clocks with prompt first rising at p0
  task automatic run_input(int p0);
    ext_in = 4'b0001;
    for (int t = 1; t <= 40; t++) begin
      @(posedge clk); #1;
      if (t == 2) ext_in = '0;
      checks += 2;
      if (ext_out[0] !== high_in(t, p0, 3, 8)) begin
        failures++;
        $display("clock %0d after input: prompt output %b", t, ext_out[0]);
      end
      if (ext_out[1] !== high_in(t, p0 + 2, 4, 8)) begin
        failures++;
        $display("clock %0d after input: echo output %b", t, ext_out[1]);
      end
    end
  endtask

  initial begin
    ext_in = '0; gin = '0;
    vme_addr = '0; vme_am = '0; vme_as_n = 1'b1; vme_ds_n = 2'b11;
    vme_lword_n = 1'b1; vme_write_n = 1'b1; vme_d_in = '0;
    dip_sw = BOARD;
    rst = 1'b1;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;

    reg_write(8'h00, {2'b00, 10'd3, 20'd8});      // width 3, period 8
    reg_write(8'h04, {12'd3, 20'd5});             // nreps 3, delay 5
    reg_write(8'h08, {4'b0, 12'd2, 16'd4});       // nsteps 2, step 4
    reg_write(8'h0C, {12'b0, 10'd4, 10'd2});      // echo width 4, delay 2
    reg_write(8'hA0, 32'h0000_0001);              // out0 = prompt of seq 0
    reg_write(8'hA4, 32'h0000_0100);              // out1 = echo of seq 0
    reg_write(8'h80, 32'h0000_0005);              // enable, mask = input 0
    repeat (10) @(posedge clk);
    #1;

    run_input(9);    // first input: no stagger
    run_input(13);   // second input: one step of 4
    run_input(9);    // third input: stagger reset
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
