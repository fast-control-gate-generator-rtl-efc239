// fcgg_sequencer: one programmable pulse sequencer.
//
// A one-cycle trigger starts a series of nreps prompt pulses. The first one
// begins delay + offset clocks after the trigger, where offset is the stagger
// offset; each later one begins period clocks after the one before, and each
// is width clocks long. The stagger offset is k*step, where the stagger
// index k is 0 for the first trigger and grows by one for each following
// trigger, for nsteps triggers in all; the next trigger starts again at 0. Every prompt pulse is followed by an echo
// pulse that begins echo_delay clocks after the prompt pulse begins and is
// echo_width clocks long. These rules are the design's; the counting below
// and the edge cases are this implementation's own choices:
//   * timing: a trigger in cycle c0 makes prompt high from cycle
//     c0 + 1 + delay + offset; pulse k (k = 0..nreps-1) rises at
//     c0 + 1 + delay + offset + k*period; echo k rises echo_delay cycles
//     after prompt pulse k rises.
//   * the series is read from cfg while it runs; a trigger that arrives
//     before the last prompt pulse of a series has begun is ignored (busy),
//     and does not advance the stagger.
//   * the offset is computed from the step register at trigger time, so a
//     new step size applies from the next trigger; an index left over from a
//     larger nsteps counts as 0.
//   * nreps = 0 gives no pulses; period = 0 acts as period = 1; width = 0
//     and echo_width = 0 give no output pulse; nsteps 0 or 1 means no stagger.
//   * a pulse that starts while the previous one is still high restarts its
//     width count, so pulses merge when width >= period.
// Echoes are produced by a 2^EDELAY_W-deep one-bit delay line of the prompt
// start strobes (a distributed RAM written every clock), so an echo delay
// longer than the period is handled without extra counters. The delay line
// is not cleared; a slot counts only once it has been written since reset
// and since echo_delay last changed, so changing echo_delay drops echoes
// still pending and never repeats old ones. echo_width is read when an echo
// begins. Reprogram a sequencer while its outputs are quiet.
// Outputs prompt and echo are registered. Synchronous, active-high reset.
// cfg.spare (period_width bits 30-31) has no function and is not read here.
module fcgg_sequencer
  import fcgg_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  seq_cfg_t cfg,
  input  logic     trig,    // one-cycle trigger from input control
  output logic     prompt,  // prompt pulse train
  output logic     echo,    // echo pulse train
  output logic     busy     // a prompt series is in progress
);

  typedef enum logic [1:0] {S_IDLE, S_DELAY, S_RUN} state_t;
  state_t state;

  logic [DEFF_W-1:0]   dcnt;      // delay down-counter
  logic [PERIOD_W-1:0] pcnt;      // period down-counter
  logic [NREPS_W-1:0]  reps_left; // prompt pulses still to start
  logic [NSTEPS_W-1:0] kstep;     // stagger index of the next trigger
  logic [PWIDTH_W-1:0] wcnt;      // prompt width remaining after this cycle
  logic [EWIDTH_W-1:0] ewcnt;     // echo width remaining after this cycle

  logic [NSTEPS_W-1:0] keff;      // stagger index used by this trigger
  logic [DEFF_W-1:0]   deff;
  logic [PERIOD_W-1:0] period_m1;
  logic                accept, start;

  // An index left over from a larger nsteps counts as step 0.
  assign keff      = (kstep < cfg.nsteps) ? kstep : '0;
  assign deff      = DEFF_W'(cfg.delay) + DEFF_W'(keff) * DEFF_W'(cfg.step);
  assign period_m1 = (cfg.period == '0) ? '0 : cfg.period - 1'b1;
  assign accept    = trig && (state == S_IDLE) && (cfg.nreps != '0);
  // start: a prompt pulse begins (prompt rises in the next cycle)
  always_comb begin
    start = 1'b0;
    unique case (state)
      S_IDLE:  start = accept && (deff == '0);
      S_DELAY: start = (dcnt == '0);
      S_RUN:   start = (pcnt == '0);
      default: start = 1'b0;
    endcase
  end

  assign busy = (state != S_IDLE);

  // Series control.
  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      dcnt      <= '0;
      pcnt      <= '0;
      reps_left <= '0;
      kstep     <= '0;
    end else begin
      if (accept) begin
        // advance the stagger for the next trigger
        if ((NSTEPS_W+1)'(keff) + 1'b1 >= (NSTEPS_W+1)'(cfg.nsteps)) kstep <= '0;
        else                                                     kstep <= keff + 1'b1;
        reps_left <= cfg.nreps;
        if (deff != '0) begin
          dcnt  <= deff - 1'b1;
          state <= S_DELAY;
        end
      end else if (state == S_DELAY && !start) begin
        dcnt <= dcnt - 1'b1;
      end else if (state == S_RUN && !start) begin
        pcnt <= pcnt - 1'b1;
      end

      if (start) begin
        pcnt <= period_m1;
        if (accept) reps_left <= cfg.nreps - 1'b1;
        else        reps_left <= reps_left - 1'b1;
        if ((accept ? cfg.nreps : reps_left) == NREPS_W'(1)) state <= S_IDLE;
        else                                                 state <= S_RUN;
      end
    end
  end

  // Prompt width.
  always_ff @(posedge clk) begin
    if (rst) begin
      prompt <= 1'b0;
      wcnt   <= '0;
    end else if (start) begin
      prompt <= (cfg.width != '0);
      wcnt   <= (cfg.width != '0) ? cfg.width - 1'b1 : '0;
    end else if (wcnt != '0) begin
      wcnt   <= wcnt - 1'b1;
    end else begin
      prompt <= 1'b0;
    end
  end

  // A running series always has a prompt pulse left to start.
  a_busy_has_reps: assert property (@(posedge clk) disable iff (rst)
    (state != S_IDLE) |-> (reps_left != '0));

  // Echo delay line: dline[wptr] holds the start strobe of the current
  // cycle; the strobe of echo_delay cycles ago is at wptr - echo_delay.
  localparam int unsigned DL_DEPTH = 1 << EDELAY_W;
  logic                dline [DL_DEPTH];
  logic [EDELAY_W-1:0] wptr;
  logic [EDELAY_W:0]   age;     // cycles since reset or echo delay change
  logic [EDELAY_W-1:0] edly_q;  // echo delay of the previous cycle
  logic                estart;

  // A slot is only read once it has been written since reset and since the
  // echo delay last changed, so old strobes are never echoed twice.
  assign estart = (cfg.echo_delay == '0) ? start
                : (cfg.echo_delay == edly_q) &&
                  (age >= (EDELAY_W+1)'(cfg.echo_delay)) &&
                  dline[EDELAY_W'(wptr - cfg.echo_delay)];

  always_ff @(posedge clk) begin
    dline[wptr] <= start;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      age   <= '0;
      edly_q <= '0;
      echo  <= 1'b0;
      ewcnt <= '0;
    end else begin
      wptr <= wptr + 1'b1;
      edly_q <= cfg.echo_delay;
      if (cfg.echo_delay != edly_q) age <= '0;
      else if (!age[EDELAY_W])      age <= age + 1'b1;
      if (estart) begin
        echo  <= (cfg.echo_width != '0);
        ewcnt <= (cfg.echo_width != '0) ? cfg.echo_width - 1'b1 : '0;
      end else if (ewcnt != '0) begin
        ewcnt <= ewcnt - 1'b1;
      end else begin
        echo  <= 1'b0;
      end
    end
  end

endmodule
