// tb_fcgg_top: end-to-end test of the fast control gate generator.
//
// Everything is done through the board's pins: a bus-functional VME master
// programs all eight sequencers, their input controls, the output masks and
// the inhibit masks with A24/D32 cycles at the dip-switch address, reads
// registers back and issues test fires; the front-panel inputs and global
// inhibits are driven at random. An independent model of the board predicts
// the external and inhibit outputs for every clock:
//   * an external input reaches the trigger logic two clocks after it
//     changes; a trigger is a rising edge of the masked OR of the inputs,
//     or a test fire, which acts in the clock in which DTACK* is first low;
//   * a trigger in cycle c0 gives prompt starts c0+delay+k*step+j*period
//     (j < nreps, k the stagger index), ignored while a series is pending;
//     prompt is high width clocks from start+1, echo echo_width clocks
//     from start+1+echo_delay;
//   * ext_out and the sequencer part of inh_out follow the pulses one clock
//     later; the global inhibits act at once.
// It counts each mechanism (input trigger, test fire, disabled sequencer,
// trigger ignored while busy, stagger wrap, prompt and echo on an output,
// included and excluded inhibit pulses, global inhibit, register read back,
// cycle for another board) and fails if one never happened. All parameters
// of the top are at their defaults.
module tb_fcgg_top;
  import fcgg_pkg::*;

  localparam logic [15:0] BOARD = 16'h5A_0C;

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
  int cyc = 0;

  // mechanism counters
  int n_ext_trig = 0, n_fire = 0, n_disabled = 0, n_busy = 0, n_wrap = 0;
  int n_out_prompt = 0, n_out_echo = 0, n_inh_incl = 0, n_inh_excl = 0;
  int n_glob = 0, n_readback = 0, n_foreign = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- shadow of the programmed registers ----------------
  typedef struct {
    int period, width, delay, nreps, step, nsteps, edly, ewid;
    bit enable;
    int mask;
  } seq_prog_t;
  seq_prog_t prog [NSEQ];
  logic [15:0] omask [NEXT_OUT];
  logic [31:0] imask_in;
  logic [9:0]  imask_out;

  // ---------------- board model ----------------
  typedef struct { int s, w, e, ew; } start_t;
  start_t starts [NSEQ][$];
  int     last_start [NSEQ];
  int     kidx [NSEQ];
  logic [NEXT_IN-1:0] ein_hist [3];   // ext_in of cycles t, t-1, t-2
  bit     sig_prev [NSEQ];
  logic [NSEQ-1:0] p_prev, e_prev;    // model pulses of the previous cycle

  function automatic void model_trig(int n, int c);
    int deff, p;
    if (prog[n].nreps == 0) return;
    if (c <= last_start[n]) begin
      n_busy++;
      return;
    end
    if (kidx[n] >= prog[n].nsteps) kidx[n] = 0;
    deff = prog[n].delay + kidx[n] * prog[n].step;
    if (kidx[n] + 1 >= prog[n].nsteps) begin
      if (kidx[n] > 0) n_wrap++;
      kidx[n] = 0;
    end else kidx[n]++;
    p = (prog[n].period == 0) ? 1 : prog[n].period;
    for (int j = 0; j < prog[n].nreps; j++)
      starts[n].push_back('{c + deff + j * p, prog[n].width, prog[n].edly, prog[n].ewid});
    last_start[n] = c + deff + (prog[n].nreps - 1) * p;
  endfunction

  function automatic bit prompt_m(int n, int t);
    foreach (starts[n][i])
      if (t >= starts[n][i].s + 1 && t < starts[n][i].s + 1 + starts[n][i].w) return 1'b1;
    return 1'b0;
  endfunction

  function automatic bit echo_m(int n, int t);
    foreach (starts[n][i])
      if (t >= starts[n][i].s + 1 + starts[n][i].e &&
          t <  starts[n][i].s + 1 + starts[n][i].e + starts[n][i].ew) return 1'b1;
    return 1'b0;
  endfunction

  function automatic int quiet_after();
    int q = 0;
    for (int n = 0; n < NSEQ; n++)
      foreach (starts[n][i])
        if (starts[n][i].s + starts[n][i].w + starts[n][i].e + starts[n][i].ew + 3 > q)
          q = starts[n][i].s + starts[n][i].w + starts[n][i].e + starts[n][i].ew + 3;
    return q;
  endfunction

  // per-cycle checker, after every clock edge
  bit checker_on = 1'b0;
  always @(posedge clk) begin
    #2;
    cyc++;
    if (checker_on) check_cycle();
  end

  function automatic void check_cycle();
    logic [NSEQ-1:0] pc, ec;
    logic [NEXT_OUT-1:0] exp_out;
    logic [NPINH-1:0] exp_inh;
    bit incl, excl, sig;
    begin
      // expected outputs of cycle cyc from the pulses of cycle cyc-1
      for (int o = 0; o < NEXT_OUT; o++) begin
        exp_out[o] = |({e_prev, p_prev} & omask[o]);
        if (exp_out[o] && |(p_prev & omask[o][7:0]))  n_out_prompt++;
        if (exp_out[o] && |(e_prev & omask[o][15:8])) n_out_echo++;
      end
      incl = |({e_prev, p_prev} & imask_in[15:0]);
      excl = |({e_prev, p_prev} & imask_in[31:16]);
      if (incl && !excl && imask_out != 0) n_inh_incl++;
      if (incl && excl && imask_out != 0)  n_inh_excl++;
      if (gin != 0) n_glob++;
      exp_inh = ((incl && !excl) ? imask_out : '0) | {NPINH{|gin}};
      checks += 2;
      if (ext_out !== exp_out) begin
        failures++;
        if (failures < 20) $display("cycle %0d: ext_out %b expected %b", cyc, ext_out, exp_out);
      end
      if (inh_out !== exp_inh) begin
        failures++;
        if (failures < 20) $display("cycle %0d: inh_out %b expected %b", cyc, inh_out, exp_inh);
      end
      // model pulses of this cycle
      for (int n = 0; n < NSEQ; n++) begin
        pc[n] = prompt_m(n, cyc);
        ec[n] = echo_m(n, cyc);
      end
      p_prev = pc;
      e_prev = ec;
      // external-input triggers of this cycle (inputs of two cycles ago)
      ein_hist[2] = ein_hist[1];
      ein_hist[1] = ein_hist[0];
      ein_hist[0] = ext_in;
      for (int n = 0; n < NSEQ; n++) begin
        sig = |(ein_hist[2] & NEXT_IN'(prog[n].mask));
        if (sig && !sig_prev[n]) begin
          if (prog[n].enable) begin
            n_ext_trig++;
            model_trig(n, cyc);
          end else n_disabled++;
        end
        sig_prev[n] = sig;
      end
      if (cyc % 128 == 0)
        for (int n = 0; n < NSEQ; n++) begin
          start_t keep[$];
          foreach (starts[n][i])
            if (starts[n][i].s + starts[n][i].w + starts[n][i].e + starts[n][i].ew + 3 >= cyc)
              keep.push_back(starts[n][i]);
          starts[n] = keep;
        end
    end
  endfunction

  // ---------------- VME master ----------------
  // Returns 1 if DTACK* came; dt_cyc is the cycle in which it was first low.
  // fire_n >= 0 marks a test fire of that sequencer: the model sees its
  // trigger in the DTACK* cycle.
  task automatic vme_cycle(input logic [23:0] a, input bit write, input logic [31:0] d,
                           output bit acked, output logic [31:0] q, output int dt_cyc,
                           input int fire_n = -1);
    @(posedge clk); #1;
    vme_addr    = a[23:1];
    vme_am      = 6'h39;
    vme_lword_n = 1'b0;
    vme_write_n = !write;
    vme_d_in    = d;
    @(posedge clk); #1;
    vme_as_n = 1'b0;
    @(posedge clk); #1;
    vme_ds_n = 2'b00;
    acked = 1'b0;
    q = '0;
    dt_cyc = -1;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk); #3;
      if (!vme_dtack_n) begin
        acked  = 1'b1;
        dt_cyc = cyc;
        q      = vme_d_out;
        if (fire_n >= 0 && prog[fire_n].enable) begin
          n_fire++;
          model_trig(fire_n, cyc);
        end
        break;
      end
    end
    vme_ds_n = 2'b11;
    vme_as_n = 1'b1;
    for (int i = 0; i < 10 && !vme_dtack_n; i++) @(posedge clk);
    @(posedge clk);
    #1;
  endtask

  task automatic reg_write(int ofs, logic [31:0] d);
    bit acked;
    logic [31:0] q;
    int dc;
    vme_cycle({BOARD, 8'(ofs)}, 1'b1, d, acked, q, dc);
    checks++;
    if (!acked) begin
      failures++;
      $display("no DTACK* for write to 0x%02h", ofs);
    end
  endtask

  task automatic reg_read_check(int ofs, logic [31:0] exp);
    bit acked;
    logic [31:0] q;
    int dc;
    vme_cycle({BOARD, 8'(ofs)}, 1'b0, 32'h0, acked, q, dc);
    checks++;
    n_readback++;
    if (!acked || q !== exp) begin
      failures++;
      $display("read 0x%02h: %h expected %h", ofs, q, exp);
    end
  endtask

  task automatic test_fire(int n);
    bit acked;
    logic [31:0] q;
    int dc;
    logic [31:0] d;
    d = {26'b0, 4'(prog[n].mask), 1'b1, prog[n].enable};
    vme_cycle({BOARD, 8'('h80 + 4 * n)}, 1'b1, d, acked, q, dc, n);
    checks++;
    if (!acked) failures++;
  endtask

  // inputs change 1 time unit after a clock edge
  task automatic idle(int c);
    repeat (c) @(posedge clk);
    #1;
  endtask

  // program everything with a random configuration, outputs quiet
  task automatic program_all(int round);
    int q;
    ext_in = '0;
    q = quiet_after();
    while (cyc < q + 4) idle(1);
    for (int n = 0; n < NSEQ; n++) begin
      prog[n].period = $urandom_range(0, 12);
      prog[n].width  = $urandom_range(0, 6);
      prog[n].delay  = $urandom_range(0, 20);
      prog[n].nreps  = $urandom_range(0, 5);
      prog[n].step   = $urandom_range(0, 6);
      prog[n].nsteps = $urandom_range(0, 4);
      prog[n].edly   = (round == 0 && n == 0) ? 1023 : $urandom_range(0, 30);
      prog[n].ewid   = $urandom_range(0, 6);
      prog[n].enable = ($urandom_range(0, 4) != 0);
      prog[n].mask   = $urandom_range(0, 15);
      reg_write(16 * n + 0, {2'b00, 10'(prog[n].width), 20'(prog[n].period)});
      reg_write(16 * n + 4, {12'(prog[n].nreps), 20'(prog[n].delay)});
      reg_write(16 * n + 8, {4'b0, 12'(prog[n].nsteps), 16'(prog[n].step)});
      reg_write(16 * n + 12, {12'b0, 10'(prog[n].ewid), 10'(prog[n].edly)});
      reg_write('h80 + 4 * n, {26'b0, 4'(prog[n].mask), 1'b0, prog[n].enable});
    end
    for (int o = 0; o < NEXT_OUT; o++) begin
      omask[o] = 16'($urandom & $urandom);
      reg_write('hA0 + 4 * o, {16'b0, omask[o]});
    end
    imask_in  = $urandom & $urandom;
    imask_out = 10'($urandom);
    reg_write('hB0, imask_in);
    reg_write('hB4, {22'b0, imask_out});
    // read a few back
    reg_read_check(16 * (round % NSEQ) + 4, {12'(prog[round % NSEQ].nreps), 20'(prog[round % NSEQ].delay)});
    reg_read_check('h80 + 4 * (round % NSEQ),
                   {26'b0, 4'(prog[round % NSEQ].mask), 1'b0, prog[round % NSEQ].enable});
    reg_read_check('hB0, imask_in);
  endtask

  initial begin
    bit acked;
    logic [31:0] q;
    int dc, q_end;
    ext_in = '0; gin = '0;
    vme_addr = '0; vme_am = '0; vme_as_n = 1'b1; vme_ds_n = 2'b11;
    vme_lword_n = 1'b1; vme_write_n = 1'b1; vme_d_in = '0;
    dip_sw = BOARD;
    for (int n = 0; n < NSEQ; n++) begin
      prog[n] = '{default: 0};
      last_start[n] = -1;
      kidx[n] = 0;
      sig_prev[n] = 1'b0;
    end
    foreach (omask[o]) omask[o] = '0;
    imask_in = '0; imask_out = '0;
    foreach (ein_hist[i]) ein_hist[i] = '0;
    p_prev = '0; e_prev = '0;
    rst = 1'b1;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);
    #3 checker_on = 1'b1;

    // a write for another board changes nothing
    vme_cycle({BOARD ^ 16'h0100, 8'hB4}, 1'b1, 32'h3FF, acked, q, dc);
    if (!acked) n_foreign++;
    reg_read_check('hB4, 32'h0);

    for (int round = 0; round < 40; round++) begin
      program_all(round);
      // activity: input pulses, test fires, global inhibits
      for (int i = 0; i < 40; i++) begin
        case ($urandom_range(0, 5))
          0, 1, 2: begin
            ext_in = NEXT_IN'($urandom);
            idle($urandom_range(1, 3));
            ext_in = '0;
            idle($urandom_range(1, 25));
          end
          3: test_fire($urandom_range(0, NSEQ - 1));
          4: begin
            gin = NGINH'($urandom_range(1, 3));
            idle($urandom_range(1, 6));
            gin = '0;
          end
          default: idle($urandom_range(5, 40));
        endcase
      end
    end
    q_end = quiet_after();
    while (cyc < q_end + 4) @(posedge clk);
    checker_on = 1'b0;

    $display("input triggers %0d, test fires %0d, disabled %0d, ignored while busy %0d, stagger wraps %0d",
             n_ext_trig, n_fire, n_disabled, n_busy, n_wrap);
    $display("output prompt %0d, output echo %0d, inhibit included %0d, excluded %0d, global %0d",
             n_out_prompt, n_out_echo, n_inh_incl, n_inh_excl, n_glob);
    $display("register reads %0d, foreign cycles %0d, cycles %0d", n_readback, n_foreign, cyc);
    checks++;
    if (n_ext_trig == 0 || n_fire == 0 || n_disabled == 0 || n_busy == 0 || n_wrap == 0 ||
        n_out_prompt == 0 || n_out_echo == 0 || n_inh_incl == 0 || n_inh_excl == 0 ||
        n_glob == 0 || n_readback == 0 || n_foreign == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
