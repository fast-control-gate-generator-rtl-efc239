// tb_fcgg_sequencer: self-checking test of one sequencer.
//
// A reference model written from the pulse rules predicts, for every clock,
// the prompt and echo levels: each accepted trigger at cycle c0 gives prompt
// starts s_k = c0 + delay + offset + k*max(period,1), k < nreps; prompt is
// high in cycles s_k+1 .. s_k+width and echo in s_k+1+echo_delay ..
// s_k+echo_delay+echo_width. A trigger is ignored while an earlier series
// still has a start to come (cycle <= its last s_k). Directed cases (the
// example series with three pulses and a three-step stagger, merged pulses,
// echo delay longer than the period, the largest echo delay, nreps = 0,
// triggers while busy) are followed by random configurations. Every cycle
// compares prompt, echo and busy with the model.
module tb_fcgg_sequencer;
  import fcgg_pkg::*;

  logic     clk = 1'b0;
  logic     rst;
  seq_cfg_t cfg;
  logic     trig;
  logic     prompt, echo, busy;

  int checks = 0, failures = 0;
  int cyc = 0;

  fcgg_sequencer dut (.*);

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  typedef struct { int s, w, e, ew; } start_t;
  start_t starts[$];    // prompt starts of all accepted series, with the
                        // width and echo settings in force
  int last_start = -1;  // last start cycle of the newest series
  int k_m = 0;          // stagger index
  int accepted = 0, ignored = 0;

  function automatic bit prompt_exp(int t);
    foreach (starts[i])
      if (t >= starts[i].s + 1 && t < starts[i].s + 1 + starts[i].w) return 1'b1;
    return 1'b0;
  endfunction

  function automatic bit echo_exp(int t);
    foreach (starts[i])
      if (t >= starts[i].s + 1 + starts[i].e && t < starts[i].s + 1 + starts[i].e + starts[i].ew)
        return 1'b1;
    return 1'b0;
  endfunction

  // model of a trigger presented in cycle c
  function automatic void model_trig(int c);
    int deff, p;
    if (c <= last_start || cfg.nreps == 0) begin
      if (cfg.nreps != 0) ignored++;
      return;
    end
    accepted++;
    if (k_m >= int'(cfg.nsteps)) k_m = 0;
    deff = int'(cfg.delay) + k_m * int'(cfg.step);
    k_m  = (k_m + 1 >= int'(cfg.nsteps)) ? 0 : k_m + 1;
    p    = (cfg.period == 0) ? 1 : int'(cfg.period);
    for (int k = 0; k < int'(cfg.nreps); k++)
      starts.push_back('{c + deff + k * p, int'(cfg.width), int'(cfg.echo_delay),
                         int'(cfg.echo_width)});
    last_start = c + deff + (int'(cfg.nreps) - 1) * p;
  endfunction

  // drop starts that can no longer matter
  function automatic void prune(int t);
    start_t keep[$];
    foreach (starts[i])
      if (starts[i].s + starts[i].w + starts[i].e + starts[i].ew + 2 >= t)
        keep.push_back(starts[i]);
    starts = keep;
  endfunction

  // one clock: advance, compare outputs of this cycle, then drive trig
  task automatic step(bit t);
    @(posedge clk);
    #1;
    cyc++;
    checks += 3;
    if (prompt !== prompt_exp(cyc)) begin
      failures++;
      if (failures < 10) $display("cycle %0d: prompt %0b expected %0b", cyc, prompt, !prompt);
    end
    if (echo !== echo_exp(cyc)) begin
      failures++;
      if (failures < 10) $display("cycle %0d: echo %0b expected %0b", cyc, echo, !echo);
    end
    if (busy !== (cyc <= last_start)) begin
      failures++;
      if (failures < 10) $display("cycle %0d: busy %0b", cyc, busy);
    end
    if (cyc % 64 == 0) prune(cyc);
    trig = t;
    if (t) model_trig(cyc);
  endtask

  task automatic idle(int n);
    repeat (n) step(1'b0);
  endtask

  // wait t_end the model says every pulse is over
  task automatic quiesce();
    int t_end;
    t_end = last_start + int'(cfg.width) + int'(cfg.echo_delay) + int'(cfg.echo_width) + 3;
    while (cyc < t_end) step(1'b0);
  endtask

  task automatic set_cfg(int period, int width, int delay, int nreps,
                         int stp, int nsteps, int edly, int ewid);
    quiesce();
    cfg.period = PERIOD_W'(period);  cfg.width  = PWIDTH_W'(width);
    cfg.delay  = DELAY_W'(delay);    cfg.nreps  = NREPS_W'(nreps);
    cfg.step   = STEP_W'(stp);       cfg.nsteps = NSTEPS_W'(nsteps);
    cfg.echo_delay = EDELAY_W'(edly); cfg.echo_width = EWIDTH_W'(ewid);
    cfg.spare  = 2'b00;
  endtask

  int first_rise;

  initial begin
    cfg  = '0;
    trig = 1'b0;
    rst  = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // Example series: 3 prompt pulses, stagger of 3 steps.
    set_cfg(8, 3, 5, 3, 4, 3, 2, 4);
    for (int i = 0; i < 5; i++) begin
      step(1'b1);
      idle(60);
    end
    // Latency: trigger in cycle c0 -> first prompt high in c0+1+delay.
    set_cfg(10, 2, 7, 1, 0, 0, 0, 1);
    step(1'b1);
    first_rise = cyc;
    while (!prompt && cyc < first_rise + 100) step(1'b0);
    checks++;
    if (cyc - first_rise != 8) begin
      failures++;
      $display("latency %0d expected 8", cyc - first_rise);
    end
    // Zero delay, period 0 (acts as 1), merged pulses, echo delay 0.
    set_cfg(0, 1, 0, 4, 0, 0, 0, 2);
    step(1'b1); idle(20);
    // Width longer than the period.
    set_cfg(3, 5, 2, 4, 0, 0, 1, 1);
    step(1'b1); idle(30);
    // Echo delay longer than the period; triggers while busy are ignored.
    set_cfg(6, 2, 3, 5, 2, 2, 20, 3);
    step(1'b1); idle(4); step(1'b1); step(1'b1); idle(40); step(1'b1); idle(60);
    // Largest echo delay.
    set_cfg(100, 4, 0, 3, 0, 0, 1023, 1023);
    step(1'b1); idle(1500);
    // nreps = 0: no pulses at all.
    set_cfg(4, 2, 1, 0, 0, 0, 1, 1);
    step(1'b1); idle(20);

    // Random configurations and triggers.
    for (int r = 0; r < 300; r++) begin
      set_cfg($urandom_range(0, 12), $urandom_range(0, 8), $urandom_range(0, 15),
              $urandom_range(0, 6), $urandom_range(0, 5), $urandom_range(0, 4),
              $urandom_range(0, 40), $urandom_range(0, 8));
      for (int j = 0; j < 6; j++) begin
        step($urandom_range(0, 3) == 0);
        idle($urandom_range(0, 30));
      end
    end
    quiesce();

    checks++;
    if (accepted < 100 || ignored < 10) begin
      failures++;
      $display("too few triggers: accepted %0d ignored %0d", accepted, ignored);
    end
    $display("accepted %0d ignored %0d", accepted, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
